// cm_full_adder -- carry-maskable full adder.
//
// mask_x is active low. With mask_x = 1 the cell is an exact full adder.
// With mask_x = 0 the cell generates no carry of its own: the half sum
// h = x ^ y is replaced by x | y, and the carry out is only the carry in
// propagated through that OR (cout = (x | y) & cin). In the carry-maskable
// adder the masked cells always sit below the unmasked ones, starting from a
// masked half adder, so their carry in is 0 and a masked cell reduces to
// s = x | y, cout = 0 = cin.
// Purely combinational.
//
// Both modes with cin = 0 follow the published design. For a masked cell with
// cin = 1, which the adder never produces, the published design gives no single
// answer; the propagate form above is this design's choice.
module cm_full_adder (
  input  logic mask_x,   // 1: exact full adder, 0: OR-gate sum, no own carry
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic s,
  output logic cout
);

  logic g;   // carry generated by this cell (zero when masked)
  logic h;   // half sum: x ^ y exact, x | y masked

  always_comb begin
    g    = mask_x & x & y;
    h    = (x | y) & ~g;
    s    = h ^ cin;
    cout = g | (h & cin);
  end

endmodule
