// mask_decoder -- accuracy level to carry-mask bits.
//
// The accuracy level k (0..W) says how many of the upper bits of the W-bit
// carry-maskable adder work as a carry-propagate adder; the W-k bits below
// them are masked into OR gates. The mask is thus a thermometer code:
// mask_x[j] = 1 for j >= W-k. k = W gives an exact adder (all ones), k = 0
// an all-OR adder (all zeros); a k above W is treated as W.
// Purely combinational.
//
// The meaning of k follows the published design; that k is a binary input decoded
// here, rather than the mask bits being driven directly, is this design's
// choice.
module mask_decoder #(
  parameter int unsigned W   = 7,
  parameter int unsigned K_W = $clog2(W + 1)
) (
  input  logic [K_W-1:0] k,
  output logic [W-1:0]   mask_x
);

  always_comb begin
    for (int j = 0; j < W; j++) begin
      mask_x[j] = (32'(j) + 32'(k) >= 32'(W));
    end
  end

endmodule
