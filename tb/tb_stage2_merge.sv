// tb_stage2_merge -- test of the stage-2 merge (columns 0..14, OR on 4..10).
// For random inputs with Q7 confined to columns 4..10, as in the multiplier,
// it checks each output row against its definition, that no column ends up
// with more than three bits, and that the merge loses value only where V1
// and V2 are both 1 inside the OR window.
module tb_stage2_merge;
  logic [14:0] p7, q7, v1, v2, ra, rb, rc;
  int checks = 0, failures = 0;

  stage2_merge dut (.p7(p7), .q7(q7), .v1(v1), .v2(v2),
                    .row_a(ra), .row_b(rb), .row_c(rc));

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
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [14:0] win;
    win = 15'b000_0111_1111_0000;
    for (int t = 0; t < 20000; t++) begin
      p7 = 15'($urandom); q7 = 15'($urandom) & win;
      v1 = 15'($urandom); v2 = 15'($urandom);
      #1;
      check(ra == p7, "row_a");
      check(rb == ((q7 & win) | (v2 & ~win)), "row_b");
      check(rc == (((v1 | v2) & win) | (v1 & ~win)), "row_c");
      check(32'(ra) + 32'(rb) + 32'(rc) + 32'(v1 & v2 & win)
            == 32'(p7) + 32'(q7) + 32'(v1) + 32'(v2), "value lost only by the OR merge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
