// tb_atc -- test of the approximate tree compressor, ATC-8 with 8-bit inputs
// (the default) and an ATC-4 with 15-bit inputs.
// For random inputs it checks every approximate sum P against the OR of its
// input pair, and the compensation vector V against a column-by-column count:
// a column of V is 1 exactly when some pair has both bits set. It also
// checks that sum(P) + V never exceeds the sum of the inputs, and equals it
// whenever no column has two pairs with both bits set.
module tb_atc;
  logic [7:0][7:0]  d8;
  logic [3:0][7:0]  p8;
  logic [7:0]       v8;
  logic [3:0][14:0] d4;
  logic [1:0][14:0] p4;
  logic [14:0]      v4;
  int checks = 0, failures = 0;
  int n_exact = 0, n_lossy = 0;

  atc dut8 (.d(d8), .p(p8), .v(v8));
  atc #(.N(4), .W(15)) dut4 (.d(d4), .p(p4), .v(v4));

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
    int unsigned sin, sout;
    bit collide;
    for (int t = 0; t < 20000; t++) begin
      // sparse inputs now and then, so both exact and lossy cases occur
      for (int i = 0; i < 8; i++)
        d8[i] = (t % 3 == 0) ? 8'($urandom & $urandom & $urandom) : 8'($urandom);
      for (int i = 0; i < 4; i++)
        d4[i] = (t % 3 == 0) ? 15'($urandom & $urandom) : 15'($urandom);
      #1;
      // ATC-8
      sin = 0; sout = 32'(v8); collide = 0;
      for (int m = 0; m < 4; m++) begin
        check(p8[m] == (d8[2*m] | d8[2*m+1]), "ATC-8 P");
        sin  += 32'(d8[2*m]) + 32'(d8[2*m+1]);
        sout += 32'(p8[m]);
      end
      for (int col = 0; col < 8; col++) begin
        int cnt;
        cnt = 0;
        for (int m = 0; m < 4; m++) cnt += int'(d8[2*m][col] & d8[2*m+1][col]);
        check(v8[col] == (cnt > 0), "ATC-8 V column");
        if (cnt > 1) collide = 1;
      end
      check(sout <= sin, "ATC-8 output sum above input sum");
      if (!collide) begin
        check(sout == sin, "ATC-8 exact when recovery vectors are disjoint");
        n_exact++;
      end else begin
        n_lossy++;
      end
      // ATC-4
      for (int m = 0; m < 2; m++) check(p4[m] == (d4[2*m] | d4[2*m+1]), "ATC-4 P");
      check(v4 == ((d4[0] & d4[1]) | (d4[2] & d4[3])), "ATC-4 V");
      check(32'(p4[0]) + 32'(p4[1]) + 32'(v4) <= 32'(d4[0]) + 32'(d4[1]) + 32'(d4[2]) + 32'(d4[3]),
            "ATC-4 output sum above input sum");
    end
    check(n_exact > 0 && n_lossy > 0, "both exact and lossy cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
