// cm_half_adder -- carry-maskable half adder.
//
// mask_x is active low. With mask_x = 1 the cell is an exact half adder:
// s = x ^ y, cout = x & y. With mask_x = 0 the carry is forced to 0 and the
// sum becomes x | y, so the cell acts as a single OR gate and stops any carry
// from starting here. Written as t = x & y & mask_x (the unmasked carry),
// s = (x | y) & ~t, cout = t: one term drives both outputs.
// Purely combinational.
//
// The behaviour in both modes follows the published description of the
// carry-maskable half adder; the Boolean form is this design's own.
module cm_half_adder (
  input  logic mask_x,   // 1: exact half adder, 0: OR gate, no carry
  input  logic x,
  input  logic y,
  output logic s,
  output logic cout
);

  logic t;

  always_comb begin
    t    = mask_x & x & y;
    s    = (x | y) & ~t;
    cout = t;
  end

endmodule
