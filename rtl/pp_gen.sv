// pp_gen -- partial product generator of an N x N unsigned multiplier.
//
// Row i holds a AND b[i], i.e. the multiplicand gated by one multiplier bit,
// placed at columns i..i+N-1 of a (2N-1)-column vector so that every row can
// be fed straight into the reduction tree with its binary weight. Columns a
// row does not reach are zero. Purely combinational.
//
// The AND-gate partial products are the multiplier's usual first step, as
// the published design states; the row numbering (row i gated by b[i]) matches the
// pp0, pp1, pp2 waveforms of its simulation. The column-aligned output format
// is this design's own choice.
module pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]                  a,
  input  logic [N-1:0]                  b,
  output logic [N-1:0][2*N-2:0]         rows   // rows[i] = (a & {N{b[i]}}) << i
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      rows[i] = '0;
      for (int j = 0; j < N; j++) begin
        rows[i][i+j] = a[j] & b[i];
      end
    end
  end

endmodule
