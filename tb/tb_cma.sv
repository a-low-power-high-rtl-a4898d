// tb_cma -- exhaustive test of the 7-bit carry-maskable adder.
// For every thermometer mask (upper k bits unmasked, k = 0..7) and every pair
// of 7-bit inputs, the result must be the OR of the lower 7-k bits plus the
// exact sum of the upper k bits, with the carry out of that sum as cout.
// k = 7 must thus be x + y and k = 0 must be x | y with no carry.
module tb_cma;
  localparam int W = 7;
  logic [W-1:0] x, y, mask_x, s;
  logic cout;
  int checks = 0, failures = 0;

  cma dut (.x(x), .y(y), .mask_x(mask_x), .s(s), .cout(cout));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned lo_bits, expv;
    for (int k = 0; k <= W; k++) begin
      lo_bits = W - k;
      mask_x  = 7'(((1 << k) - 1) << lo_bits);
      for (int a = 0; a < 128; a++) begin
        for (int b = 0; b < 128; b++) begin
          x = 7'(a); y = 7'(b);
          #1;
          expv = ((a | b) & ((1 << lo_bits) - 1))
               + (((a >> lo_bits) + (b >> lo_bits)) << lo_bits);
          checks++;
          if ({cout, s} != 8'(expv)) begin
            failures++;
            if (failures < 10)
              $display("FAIL k=%0d x=%0d y=%0d got %0d exp %0d", k, a, b, {cout, s}, expv);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
