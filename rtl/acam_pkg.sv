// acam_pkg -- shared constants of the 8x8 accuracy-controllable approximate
// multiplier.
//
// The multiplier's column map is fixed by its reduction tree. Partial products
// occupy columns 0..14 and the product has 16 bits. After the carry-save
// stages, the final two-row addition is cut into three parts. The truncated
// part is columns 0..4 and never carries out. The accuracy-controllable part
// is columns 5..11, added by a 7-bit carry-maskable adder. The accurate part
// is columns 12..14, added exactly, with its carry out as product bit 15.
// Stage 2 merges the two accuracy-compensation vectors with OR gates on
// columns 4..10, and stage 3 places half adders on columns 1 and 13 and full
// adders on columns 2..12. All of these numbers follow the published 8-bit
// structure; only the width of the accuracy-level input is this design's own.
package acam_pkg;

  localparam int unsigned OP_W      = 8;             // operand width
  localparam int unsigned COL_W     = 2 * OP_W - 1;  // partial-product columns 0..14
  localparam int unsigned PROD_W    = 2 * OP_W;      // product width

  // Stage 2: columns where V1 and V2 are merged by OR gates
  localparam int unsigned S2_OR_LO  = 4;
  localparam int unsigned S2_OR_HI  = 10;

  // Stage 3: half adders on S3_HA_LO and S3_HA_HI, full adders in between
  localparam int unsigned S3_HA_LO  = 1;
  localparam int unsigned S3_HA_HI  = 13;

  // Stage 4: truncated, accuracy-controllable and accurate parts
  localparam int unsigned TRUNC_HI  = 4;             // columns 0..4 truncated
  localparam int unsigned CMA_LO    = 5;             // columns 5..11 in the CMA
  localparam int unsigned CMA_W     = 7;
  localparam int unsigned ACC_LO    = CMA_LO + CMA_W; // columns 12..14 accurate

  // Accuracy level k: number of upper CMA bits that propagate carries (0..7)
  localparam int unsigned K_W       = $clog2(CMA_W + 1);
  typedef logic [K_W-1:0] acc_level_t;

endpackage
