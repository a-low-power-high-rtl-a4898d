// atc -- approximate tree compressor with N inputs (ATC-N).
//
// The N input words are taken in pairs (d[0],d[1]), (d[2],d[3]), ... and each
// pair goes through a row of incomplete adder cells, giving N/2 approximate
// sums p[m] and N/2 error-recovery vectors. The recovery vectors are not kept:
// they are merged bit by bit with OR gates into one accuracy-compensation
// vector v. N inputs thus become N/2 + 1 outputs. The sum of all p[m] plus v
// never exceeds the sum of the inputs; it equals it when no two recovery
// vectors have a 1 in the same column.
//
// Inputs are column-aligned W-bit words. Where one word of a pair has no
// partial product (a constant zero), that cell is a plain wire after constant
// propagation, so in the multiplier each pair costs only the cells of the
// columns where both rows overlap. Structure follows the published design; the
// column-aligned input format is this design's own. Purely combinational.
module atc #(
  parameter int unsigned N = 8,   // number of inputs, even
  parameter int unsigned W = 8    // width of each input word
) (
  input  logic [N-1:0][W-1:0]   d,
  output logic [N/2-1:0][W-1:0] p,   // approximate sums P1..P(N/2)
  output logic [W-1:0]          v    // accuracy compensation vector
);

  logic [N/2-1:0][W-1:0] q;

  for (genvar m = 0; m < N / 2; m++) begin : g_row
    icac_row #(.W(W)) u_row (
      .a(d[2*m]),
      .b(d[2*m+1]),
      .p(p[m]),
      .q(q[m])
    );
  end

  always_comb begin
    v = '0;
    for (int m = 0; m < N / 2; m++) v |= q[m];
  end

endmodule
