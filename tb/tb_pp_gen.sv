// tb_pp_gen -- exhaustive test of the partial product generator (N = 8).
// For every operand pair, row i must equal a << i when b[i] is 1 and zero
// otherwise, and the rows must add up to a * b.
module tb_pp_gen;
  localparam int N = 8;
  logic [N-1:0] a, b;
  logic [N-1:0][2*N-2:0] rows;
  int checks = 0, failures = 0;

  pp_gen dut (.a(a), .b(b), .rows(rows));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned sum;
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a = 8'(x); b = 8'(y);
        #1;
        sum = 0;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (32'(rows[i]) != (((y >> i) & 1) != 0 ? (x << i) : 0)) begin
            failures++;
            if (failures < 10) $display("FAIL row %0d a=%0d b=%0d", i, x, y);
          end
          sum += 32'(rows[i]);
        end
        checks++;
        if (sum != x * y) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
