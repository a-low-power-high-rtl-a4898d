// tb_stage3_csa -- test of the stage-3 carry-save row (columns 0..14).
// Inputs are random but shaped like the multiplier's rows: row_a anywhere,
// row_c on columns 1..13, row_b on columns 2..12. The check is that the
// two output rows add up exactly to the three input rows, that the carry row
// is empty in columns 0 and 1, and that columns 0 and 14 pass row_a through.
module tb_stage3_csa;
  logic [14:0] ra, rb, rc, s, c;
  int checks = 0, failures = 0;

  stage3_csa dut (.row_a(ra), .row_b(rb), .row_c(rc), .s(s), .c(c));

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
      if (failures < 10) $display("FAIL %s ra=%h rb=%h rc=%h s=%h c=%h", what, ra, rb, rc, s, c);
    end
  endtask

  initial begin
    for (int t = 0; t < 30000; t++) begin
      ra = 15'($urandom);
      rb = 15'($urandom) & 15'b001_1111_1111_1100;
      rc = 15'($urandom) & 15'b011_1111_1111_1110;
      #1;
      check(32'(s) + 32'(c) == 32'(ra) + 32'(rb) + 32'(rc), "sum preserved");
      check(c[1:0] == 2'b00, "no carry into columns 0, 1");
      check(s[0] == ra[0] && s[14] == ra[14], "columns 0 and 14 pass through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
