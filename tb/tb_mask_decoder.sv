// tb_mask_decoder -- test of the accuracy-level decoder (W = 7).
// k = 0..7 must give a mask with exactly the upper k bits set.
module tb_mask_decoder;
  logic [2:0] k;
  logic [6:0] mask_x;
  int checks = 0, failures = 0;

  mask_decoder dut (.k(k), .mask_x(mask_x));

  initial begin
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] expm;
    for (int v = 0; v < 8; v++) begin
      k = 3'(v);
      #1;
      expm = '0;
      for (int j = 6; j > 6 - v; j--) expm[j] = 1'b1;
      checks++;
      if (mask_x != expm) begin
        failures++;
        $display("FAIL k=%0d mask=%b expected %b", v, mask_x, expm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
