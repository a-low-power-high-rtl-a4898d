// tb_cm_half_adder -- exhaustive test of the carry-maskable half adder.
// mask_x = 1: exact half adder; mask_x = 0: s = x | y and no carry.
module tb_cm_half_adder;
  logic mask_x, x, y, s, cout;
  int checks = 0, failures = 0;

  cm_half_adder dut (.mask_x(mask_x), .x(x), .y(y), .s(s), .cout(cout));

  initial begin
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {mask_x, x, y} = 3'(v);
      #1;
      checks++;
      if (mask_x) begin
        if ({cout, s} != 2'(x) + 2'(y)) failures++;
      end else begin
        if (cout != 1'b0 || s != (x | y)) failures++;
      end
      if (failures > 0) $display("FAIL mask=%b x=%b y=%b s=%b cout=%b", mask_x, x, y, s, cout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
