// stage2_merge -- stage 2 of the multiplier's reduction: four rows to three.
//
// After stage 1 the columns hold four words: the approximate sum P7, the
// recovery vector Q7 and the two accuracy-compensation vectors V1 and V2.
// Only columns LO..HI (4..10) carry a bit in all four words. There V1 and V2
// are merged by one OR gate per column (seven in the 8-bit multiplier), an
// approximation of V1 + V2 that is short and cheap. The result is packed into
// three rows so that no column holds more than three bits:
//   row_a = P7
//   row_b = Q7 on columns LO..HI, V2 elsewhere
//   row_c = V1 | V2 on columns LO..HI, V1 elsewhere
// Q7 is zero outside LO..HI by construction of the tree, so nothing is lost
// by the packing. Purely combinational.
//
// The OR merge and its column range follow the published design; the way the
// remaining bits are distributed over the three rows is this design's own.
module stage2_merge
  import acam_pkg::*;
#(
  parameter int unsigned W  = COL_W,
  parameter int unsigned LO = S2_OR_LO,
  parameter int unsigned HI = S2_OR_HI
) (
  input  logic [W-1:0] p7,
  input  logic [W-1:0] q7,
  input  logic [W-1:0] v1,
  input  logic [W-1:0] v2,
  output logic [W-1:0] row_a,
  output logic [W-1:0] row_b,
  output logic [W-1:0] row_c
);

  always_comb begin
    row_a = p7;
    for (int i = 0; i < W; i++) begin
      if (i >= LO && i <= HI) begin
        row_b[i] = q7[i];
        row_c[i] = v1[i] | v2[i];
      end else begin
        row_b[i] = v2[i];
        row_c[i] = v1[i];
      end
    end
  end

endmodule
