// tb_acam_mult8 -- end-to-end test of the 8x8 accuracy-controllable
// approximate multiplier.
//
// Applies every operand pair at every accuracy level k = 0..7 (524,288
// vectors, one per nanosecond) and compares the product with a reference
// model written in a different form from the RTL: it works on whole integers
// rather than cells, and for stage 4 it uses the fact that a masked CMA bit
// never carries, so the unmasked CMA bits and the accurate part form one
// exact adder starting at column 12-k:
//   product = S[1:0] | (S|C)[11-k:2] | ((S >> L) + (C >> L)) << L, L = 12-k.
// On top of the bit-exact comparison it checks properties the structure
// guarantees: the product never exceeds a*b, zero operands give zero, the
// 100 x 100 case gives 10000, and the summed error over all operand pairs at
// each k matches a separately computed table. It counts how often each
// approximation mechanism actually changed a result (OR merge inside ATC-8
// and ATC-4, the stage-2 OR merge, the truncated part, carry masking in the
// CMA) and how often the CMA carried into the accurate part; a mechanism
// that never fired counts as a failure. A watchdog ends the run if it stalls.
module tb_acam_mult8;
  import acam_pkg::*;

  logic [7:0]  a, b;
  acc_level_t  k;
  logic [15:0] product;

  int checks   = 0;
  int failures = 0;

  // mechanism counters
  int n_atc8_loss, n_atc4_loss, n_s2_loss, n_trunc_loss, n_mask_loss;
  int n_cma_carry, n_exact, n_bit15;
  int n_level [8];

  // summed error a*b - product over all 65,536 pairs, per k (k = 0..7)
  longint exp_err_sum [8] = '{70076544, 44648576, 30443648, 20942976,
                              15086720, 12288384, 11177088, 10778752};
  longint err_sum [8];

  acam_mult8 dut (.a(a), .b(b), .k(k), .product(product));

  // ---------------- reference model ----------------
  typedef struct packed {
    logic [15:0] prod;
    logic        atc8_loss, atc4_loss, s2_loss, trunc_loss, cma_carry;
  } ref_t;

  function automatic ref_t ref_mult(input int unsigned x, input int unsigned y,
                                    input int unsigned lvl);
    int unsigned r [8];
    int unsigned p [4], q [4];
    int unsigned v1, v2, p5, p6, q5, q6, p7, q7;
    int unsigned ra, rb, rc, s, c, lo, win, t;
    ref_t res;
    for (int i = 0; i < 8; i++) r[i] = ((y >> i) & 1) ? (x << i) : 0;
    for (int m = 0; m < 4; m++) begin
      p[m] = r[2*m] | r[2*m+1];
      q[m] = r[2*m] & r[2*m+1];
    end
    v1 = q[0] | q[1] | q[2] | q[3];
    res.atc8_loss = (v1 != q[0] + q[1] + q[2] + q[3]);
    p5 = p[0] | p[1];  q5 = p[0] & p[1];
    p6 = p[2] | p[3];  q6 = p[2] & p[3];
    v2 = q5 | q6;
    res.atc4_loss = (v2 != q5 + q6);
    p7 = p5 | p6;      q7 = p5 & p6;
    win = 32'h7F << 4;                       // stage-2 OR columns 4..10
    res.s2_loss = ((v1 & v2 & win) != 0);
    ra = p7;
    rb = (q7 & win) | (v2 & ~win);
    rc = ((v1 | v2) & win) | (v1 & ~win);
    // carry-save: per column count of ones
    s = 0; c = 0;
    for (int i = 0; i < 15; i++) begin
      t = ((ra >> i) & 1) + ((rb >> i) & 1) + ((rc >> i) & 1);
      s |= (t & 1) << i;
      c |= (t >> 1) << (i + 1);
    end
    res.trunc_loss = ((s & c & 32'h1C) != 0);
    res.cma_carry  = ((((s >> 5) & 32'h7F) + ((c >> 5) & 32'h7F)) >> 7) != 0;
    lo = 12 - lvl;
    t  = (s & 32'h3) | ((s | c) & ((32'h1 << lo) - 1) & ~32'h3);
    t  = t + ((((s >> lo) + (c >> lo)) << lo));
    res.prod = t[15:0];
    return res;
  endfunction

  // ---------------- watchdog ----------------
  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: a=%0d b=%0d k=%0d product=%0d", what, a, b, k, product);
    end
  endtask

  initial begin
    ref_t rf, r7;
    int unsigned exact;
    for (int lvl = 0; lvl < 8; lvl++) begin
      err_sum[lvl] = 0;
      n_level[lvl] = 0;
    end
    for (int lvl = 0; lvl < 8; lvl++) begin
      for (int x = 0; x < 256; x++) begin
        for (int y = 0; y < 256; y++) begin
          a = 8'(x); b = 8'(y); k = acc_level_t'(lvl);
          #1;
          exact = x * y;
          rf = ref_mult(x, y, lvl);
          r7 = ref_mult(x, y, 7);
          check(product == rf.prod, "bit-exact vs reference");
          check(32'(product) <= exact, "product above a*b");
          if (x == 0 || y == 0) check(product == 0, "zero operand");
          err_sum[lvl] += longint'(exact) - longint'(product);
          n_level[lvl]++;
          if (rf.atc8_loss)  n_atc8_loss++;
          if (rf.atc4_loss)  n_atc4_loss++;
          if (rf.s2_loss)    n_s2_loss++;
          if (rf.trunc_loss) n_trunc_loss++;
          if (rf.cma_carry)  n_cma_carry++;
          if (rf.prod != r7.prod) n_mask_loss++;
          if (32'(product) == exact) n_exact++;
          if (product[15]) n_bit15++;
        end
      end
    end

    // directed cases: the 100 x 100 run of the published waveform, and the
    // accuracy-level switch made on the fly with the operands held
    a = 8'd100; b = 8'd100;
    for (int lvl = 0; lvl < 8; lvl++) begin
      k = acc_level_t'(lvl); #1;
      check(product == 16'd10000, "100 x 100");
    end
    a = 8'd255; b = 8'd255;
    k = 3'd7; #1; check(product == 16'd57309, "255 x 255, k=7");
    k = 3'd0; #1; check(product == 16'd53245, "255 x 255, k=0");
    k = 3'd7; #1; check(product == 16'd57309, "255 x 255, back to k=7");

    for (int lvl = 0; lvl < 8; lvl++) begin
      checks++;
      if (err_sum[lvl] != exp_err_sum[lvl]) begin
        failures++;
        $display("FAIL error sum at k=%0d: %0d, expected %0d",
                 lvl, err_sum[lvl], exp_err_sum[lvl]);
      end
      // accuracy does not get worse as k grows
      if (lvl > 0) begin
        checks++;
        if (err_sum[lvl] > err_sum[lvl-1]) begin
          failures++;
          $display("FAIL error sum grows from k=%0d to k=%0d", lvl - 1, lvl);
        end
      end
      checks++;
      if (n_level[lvl] == 0) failures++;
    end

    $display("mechanisms: ATC-8 OR loss=%0d ATC-4 OR loss=%0d stage-2 OR loss=%0d",
             n_atc8_loss, n_atc4_loss, n_s2_loss);
    $display("            truncation loss=%0d carry-mask loss=%0d CMA carry-out=%0d",
             n_trunc_loss, n_mask_loss, n_cma_carry);
    $display("            exact results=%0d product bit 15 set=%0d", n_exact, n_bit15);
    for (int lvl = 0; lvl < 8; lvl++)
      $display("            k=%0d mean error=%0d.%03d", lvl, err_sum[lvl] / 65536,
               ((err_sum[lvl] % 65536) * 1000) / 65536);
    checks += 8;
    if (n_atc8_loss  == 0) failures++;
    if (n_atc4_loss  == 0) failures++;
    if (n_s2_loss    == 0) failures++;
    if (n_trunc_loss == 0) failures++;
    if (n_mask_loss  == 0) failures++;
    if (n_cma_carry  == 0) failures++;
    if (n_exact      == 0) failures++;
    if (n_bit15      == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
