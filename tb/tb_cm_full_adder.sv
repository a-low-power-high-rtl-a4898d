// tb_cm_full_adder -- exhaustive test of the carry-maskable full adder.
// mask_x = 1: exact full adder. mask_x = 0 with cin = 0: s = x | y, cout = 0.
// mask_x = 0 with cin = 1 (never produced inside the adder): the masked cell
// only propagates, s = (x | y) ^ 1 and cout = x | y.
module tb_cm_full_adder;
  logic mask_x, x, y, cin, s, cout;
  int checks = 0, failures = 0;

  cm_full_adder dut (.mask_x(mask_x), .x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    for (int v = 0; v < 16; v++) begin
      {mask_x, x, y, cin} = 4'(v);
      #1;
      if (mask_x)    ok = ({cout, s} == 2'(x) + 2'(y) + 2'(cin));
      else if (!cin) ok = (s == (x | y)) && (cout == 1'b0);
      else           ok = (s == !(x | y)) && (cout == (x | y));
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL mask=%b x=%b y=%b cin=%b s=%b cout=%b", mask_x, x, y, cin, s, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
