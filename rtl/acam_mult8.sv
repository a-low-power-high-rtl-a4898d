// acam_mult8 -- 8x8 unsigned accuracy-controllable approximate multiplier.
//
// The product of a and b is formed in four combinational stages whose
// accuracy can be chosen at run time through k (0..7):
//   Stage 1  The eight partial-product rows go through an ATC-8 (four rows
//            of incomplete adder cells plus OR gates), giving P1..P4 and the
//            compensation vector V1; P1..P4 go through an ATC-4, giving P5, P6
//            and V2; a last row of incomplete adder cells turns P5, P6 into P7
//            and Q7. Eight rows become four: P7, Q7, V1, V2.
//   Stage 2  V1 and V2 are ORed on columns 4..10: four rows become three.
//   Stage 3  Half adders (columns 1, 13) and full adders (2..12): two rows.
//   Stage 4  Final addition: columns 0..4 truncated (OR gates, no carry),
//            5..11 a 7-bit carry-maskable adder, 12..14 exact, carry out is
//            bit 15.
// k sets how many upper bits of the carry-maskable adder propagate carries:
// k = 7 is the most accurate setting, k = 0 the fastest and least accurate.
// Even at k = 7 the result is approximate, because of the OR merges in
// stages 1, 2 and 4; it never exceeds a * b.
//
// Interface: a, b (unsigned 8-bit), k (3-bit accuracy level), product
// (16-bit). No clock and no reset: the output follows the inputs after the
// combinational delay. Immediate assertions watch three structural
// invariants of the tree that the stage-3 and stage-4 logic relies on.
//
// The structure and every column range follow the published 8-bit design;
// the binary accuracy input k and its decoder are this design's own.
module acam_mult8
  import acam_pkg::*;
(
  input  logic [OP_W-1:0]   a,
  input  logic [OP_W-1:0]   b,
  input  acc_level_t        k,
  output logic [PROD_W-1:0] product
);

  logic [OP_W-1:0][COL_W-1:0]   pp;
  logic [OP_W/2-1:0][COL_W-1:0] p_s1;     // P1..P4
  logic [1:0][COL_W-1:0]        p_s2;     // P5, P6
  logic [COL_W-1:0]             v1, v2, p7, q7;
  logic [COL_W-1:0]             row_a, row_b, row_c;
  logic [COL_W-1:0]             s3_s, s3_c;
  logic [CMA_W-1:0]             mask_x;

  pp_gen #(.N(OP_W)) u_pp (
    .a   (a),
    .b   (b),
    .rows(pp)
  );

  // Stage 1
  atc #(.N(8), .W(COL_W)) u_atc8 (
    .d(pp),
    .p(p_s1),
    .v(v1)
  );

  atc #(.N(4), .W(COL_W)) u_atc4 (
    .d(p_s1),
    .p(p_s2),
    .v(v2)
  );

  icac_row #(.W(COL_W)) u_icac7 (
    .a(p_s2[0]),
    .b(p_s2[1]),
    .p(p7),
    .q(q7)
  );

  // Stage 2
  stage2_merge u_s2 (
    .p7   (p7),
    .q7   (q7),
    .v1   (v1),
    .v2   (v2),
    .row_a(row_a),
    .row_b(row_b),
    .row_c(row_c)
  );

  // Stage 3
  stage3_csa u_s3 (
    .row_a(row_a),
    .row_b(row_b),
    .row_c(row_c),
    .s    (s3_s),
    .c    (s3_c)
  );

  // Stage 4
  mask_decoder #(.W(CMA_W), .K_W(K_W)) u_mask (
    .k     (k),
    .mask_x(mask_x)
  );

  // Structural invariants the later stages rely on. They hold for every
  // input by construction of the tree: Q7 lies on the stage-2 OR columns
  // only, the middle row is empty where stage 3 uses half adders, and no
  // carry reaches columns 0 and 1, which stage 4 passes through.
  always_comb begin
    for (int i = 0; i < COL_W; i++) begin
      if (i < S2_OR_LO || i > S2_OR_HI)
        assert (q7[i] == 1'b0) else $error("Q7 bit %0d outside the stage-2 window", i);
      if (i <= S3_HA_LO || i >= S3_HA_HI)
        assert (row_b[i] == 1'b0) else $error("middle row bit %0d set at a half-adder column", i);
    end
    assert (s3_c[1:0] == 2'b00) else $error("carry into column 0 or 1");
  end

  final_adder u_s4 (
    .s      (s3_s),
    .c      (s3_c),
    .mask_x (mask_x),
    .product(product)
  );

endmodule
