// tb_icac_row -- test of a row of incomplete adder cells (W = 8).
// Checks the cell truth table bit by bit for every pair of 8-bit inputs,
// that A + B == P + Q, and the worked 8-bit example: A = 01011111,
// B = 00110110 gives P = 01111111, Q = 00010110 and A + B = 10010101.
module tb_icac_row;
  localparam int W = 8;
  logic [W-1:0] a, b, p, q;
  int checks = 0, failures = 0;

  icac_row dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%b b=%b p=%b q=%b", what, a, b, p, q);
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a = 8'(x); b = 8'(y);
        #1;
        for (int i = 0; i < W; i++) begin
          // truth table: (0,0)->(0,0) (0,1)->(1,0) (1,0)->(1,0) (1,1)->(1,1)
          case ({a[i], b[i]})
            2'b00: check(p[i] == 1'b0 && q[i] == 1'b0, "cell 00");
            2'b01: check(p[i] == 1'b1 && q[i] == 1'b0, "cell 01");
            2'b10: check(p[i] == 1'b1 && q[i] == 1'b0, "cell 10");
            2'b11: check(p[i] == 1'b1 && q[i] == 1'b1, "cell 11");
          endcase
        end
        check(9'(p) + 9'(q) == 9'(a) + 9'(b), "A+B == P+Q");
      end
    end
    a = 8'b01011111; b = 8'b00110110; #1;
    check(p == 8'b01111111, "example P");
    check(q == 8'b00010110, "example Q");
    check(9'(p) + 9'(q) == 9'b010010101, "example S");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
