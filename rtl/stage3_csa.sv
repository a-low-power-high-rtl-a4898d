// stage3_csa -- stage 3 of the multiplier's reduction: three rows to two.
//
// A carry-save row of exact adders. Columns HA_LO and HA_HI (1 and 13) hold
// two bits and get a half adder; the columns between them (2..12) hold three
// bits and get a full adder (eleven in the 8-bit multiplier). The columns
// outside that range hold a single bit of row_a, which passes through. Each
// adder leaves its sum in s at its own column and its carry in c one column
// higher, so s + c == row_a + row_b + row_c exactly. The half adders add
// row_a and row_c: row_b is empty in those columns.
// Purely combinational.
//
// Adder types and their columns follow the published design.
module stage3_csa
  import acam_pkg::*;
#(
  parameter int unsigned W     = COL_W,
  parameter int unsigned HA_LO = S3_HA_LO,
  parameter int unsigned HA_HI = S3_HA_HI
) (
  input  logic [W-1:0] row_a,
  input  logic [W-1:0] row_b,
  input  logic [W-1:0] row_c,
  output logic [W-1:0] s,     // sum row
  output logic [W-1:0] c      // carry row, already shifted to its weight
);

  always_comb begin
    s = '0;
    c = '0;
    for (int i = 0; i < W; i++) begin
      if (i == HA_LO || i == HA_HI) begin
        s[i] = row_a[i] ^ row_c[i];
        if (i + 1 < W) c[i+1] = row_a[i] & row_c[i];
      end else if (i > HA_LO && i < HA_HI) begin
        s[i] = row_a[i] ^ row_b[i] ^ row_c[i];
        if (i + 1 < W)
          c[i+1] = (row_a[i] & row_b[i]) | (row_c[i] & (row_a[i] ^ row_b[i]));
      end else begin
        s[i] = row_a[i];
      end
    end
  end

endmodule
