// tb_final_adder -- test of the stage-4 final adder.
// Random sum and carry rows (carry row empty in columns 0 and 1) are added at
// every accuracy level k, with the mask set to its thermometer code. The
// expected product keeps columns 0 and 1 of s, ORs s and c up to column
// 11-k, and adds s and c exactly from column 12-k upwards, since a masked
// CMA bit never carries. At k = 7 the result must also differ from s + c
// only by the truncated part, at k = 0 it must equal the exact sum above
// column 11 plus the OR below.
module tb_final_adder;
  logic [14:0] s, c;
  logic [6:0]  mask_x;
  logic [15:0] product;
  int checks = 0, failures = 0;
  int n_trunc_diff = 0;

  final_adder dut (.s(s), .c(c), .mask_x(mask_x), .product(product));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned lo, expv, sv, cv;
    for (int t = 0; t < 20000; t++) begin
      sv = 32'(15'($urandom));
      cv = 32'(15'($urandom)) & ~32'h3;
      s = 15'(sv); c = 15'(cv);
      for (int k = 0; k < 8; k++) begin
        mask_x = 7'(((1 << k) - 1) << (7 - k));
        #1;
        lo   = 12 - k;
        expv = (sv & 3) | ((sv | cv) & ((1 << lo) - 1) & ~32'h3);
        expv = expv + (((sv >> lo) + (cv >> lo)) << lo);
        checks++;
        if (product != 16'(expv)) begin
          failures++;
          if (failures < 10)
            $display("FAIL k=%0d s=%h c=%h got %h exp %h", k, s, c, product, expv);
        end
        if (k == 7) begin
          checks++;
          if (32'(product) != sv + cv - ((sv & cv & 32'h1C))) failures++;
          if ((sv & cv & 32'h1C) != 0) n_trunc_diff++;
        end
      end
    end
    checks++;
    if (n_trunc_diff == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
