// final_adder -- stage 4 of the multiplier: the split final addition.
//
// Adds the sum row s and the carry row c left by the carry-save stages and
// returns the product. The addition is cut into three parts:
//   * truncated part, columns 0..TRUNC_HI (0..4): columns 0 and 1 hold a
//     single bit and pass through; columns 2..4 are formed by one OR gate
//     each, so no carry leaves this part;
//   * accuracy-controllable part, columns CMA_LO..ACC_LO-1 (5..11): a
//     carry-maskable adder whose mask bits choose how many of its upper bits
//     propagate carries;
//   * accurate part, columns ACC_LO..COL_W-1 (12..14): an exact ripple adder
//     fed by the carry out of the CMA; its carry out is product bit 15.
// Purely combinational.
//
// The three parts, their column ranges and gate types follow the published design.
// The c row is empty in columns 0 and 1, which is why they pass s through.
module final_adder
  import acam_pkg::*;
(
  input  logic [COL_W-1:0]  s,
  input  logic [COL_W-1:0]  c,
  input  logic [CMA_W-1:0]  mask_x,
  output logic [PROD_W-1:0] product
);

  logic [CMA_W-1:0] cma_s;
  logic             cma_cout;
  logic [COL_W-ACC_LO:0] acc_carry;
  logic [COL_W-ACC_LO-1:0] acc_sum;

  cma #(.W(CMA_W)) u_cma (
    .x     (s[CMA_LO +: CMA_W]),
    .y     (c[CMA_LO +: CMA_W]),
    .mask_x(mask_x),
    .s     (cma_s),
    .cout  (cma_cout)
  );

  always_comb begin
    product = '0;
    // truncated part
    product[0] = s[0];
    product[1] = s[1];
    for (int i = 2; i <= TRUNC_HI; i++) product[i] = s[i] | c[i];
    // accuracy-controllable part
    product[CMA_LO +: CMA_W] = cma_s;
    // accurate part
    product[ACC_LO +: COL_W-ACC_LO] = acc_sum;
    product[PROD_W-1] = acc_carry[COL_W-ACC_LO];
  end

  // accurate part: exact ripple-carry adder fed by the CMA's carry out
  assign acc_carry[0] = cma_cout;
  for (genvar i = 0; i < COL_W - ACC_LO; i++) begin : g_acc
    logic xa, ya;
    assign xa             = s[ACC_LO+i];
    assign ya             = c[ACC_LO+i];
    assign acc_sum[i]     = xa ^ ya ^ acc_carry[i];
    assign acc_carry[i+1] = (xa & ya) | (acc_carry[i] & (xa ^ ya));
  end

endmodule
