// cma -- W-bit carry-maskable adder (CMA).
//
// A ripple-carry adder built from one carry-maskable half adder at bit 0 and
// W-1 carry-maskable full adders above it, each with its own active-low
// mask_x bit. With every mask bit at 1 it is an exact W-bit carry-propagate
// adder; with every mask bit at 0 it is W independent 2-input OR gates; with
// the lower W-k bits masked and the upper k unmasked it is an OR array under a
// k-bit adder, so the longest carry path shrinks to k cells. The adder has no
// carry in: the part below it never carries out. cout goes to the exact part
// above.
// Purely combinational.
//
// Cell types, their order and the default width of 7 follow the published design.
module cma #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] mask_x,   // per bit: 1 = add exactly, 0 = OR
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] carry;

  cm_half_adder u_ha (
    .mask_x(mask_x[0]),
    .x     (x[0]),
    .y     (y[0]),
    .s     (s[0]),
    .cout  (carry[1])
  );

  assign carry[0] = 1'b0;   // no carry in; bit 0 is a half adder

  for (genvar i = 1; i < W; i++) begin : g_fa
    cm_full_adder u_fa (
      .mask_x(mask_x[i]),
      .x     (x[i]),
      .y     (y[i]),
      .cin   (carry[i]),
      .s     (s[i]),
      .cout  (carry[i+1])
    );
  end

  assign cout = carry[W];

endmodule
