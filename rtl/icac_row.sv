// icac_row -- a row of W incomplete adder cells (iCACs).
//
// Each cell takes two bits of equal weight and produces p = a | b and
// q = a & b, both of the same weight as the inputs. Because a + b == p + q
// for single bits, the row turns two W-bit words into an approximate sum
// P = A | B and an error-recovery vector Q = A & B with A + B == P + Q
// exactly: the row is an element of a precise adder, not an approximation.
// Approximation only enters when several Q vectors are later merged by OR.
// Purely combinational; no carries travel between cells.
//
// Cell function and the row arrangement follow the published design; the default
// width of 8 is that of its 8-bit example row.
module icac_row #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p,   // approximate sum
  output logic [W-1:0] q    // error recovery vector
);

  always_comb begin
    for (int i = 0; i < W; i++) begin
      p[i] = a[i] | b[i];
      q[i] = a[i] & b[i];
    end
  end

endmodule
