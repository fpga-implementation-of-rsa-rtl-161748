// aam_32x8: 32x8-bit additive array multiplier.
//
// Computes P = A*B + C + D combinationally, with A and C 32 bits wide and B
// and D 8 bits wide; P is 40 bits and cannot overflow, since
// (2^32-1)(2^8-1) + (2^32-1) + (2^8-1) = 2^40 - 1.
// The array has one row of 32 full adders per bit of B, as in the published
// array figure: row k adds the partial product A&B[k] to the 32 upper sum bits
// of the row above (C for row 0), with D[k] entering as the carry into the
// rightmost adder. The least significant sum of row k is product bit P[k];
// the last row's carry-out and upper sum bits give P[39:8].
// Each row is written as a ripple chain of full adders. No clock; the block is
// purely combinational.
module aam_32x8 (
  input  logic [31:0] a,
  input  logic [7:0]  b,
  input  logic [31:0] c,
  input  logic [7:0]  d,
  output logic [39:0] p
);

  // row_in[k] : 32-bit value added in row k; row_in[0] = c
  logic [31:0] row_in [0:8];
  logic [32:0] carry  [0:7];
  logic [31:0] sum    [0:7];

  assign row_in[0] = c;

  for (genvar k = 0; k < 8; k++) begin : g_row
    assign carry[k][0] = d[k];
    for (genvar j = 0; j < 32; j++) begin : g_fa
      logic pp;
      assign pp = a[j] & b[k];
      assign sum[k][j]     = pp ^ row_in[k][j] ^ carry[k][j];
      assign carry[k][j+1] = (pp & row_in[k][j]) | (pp & carry[k][j]) |
                             (row_in[k][j] & carry[k][j]);
    end
    assign p[k] = sum[k][0];
    // upper 31 sum bits plus the row carry-out move down to the next row
    assign row_in[k+1] = {carry[k][32], sum[k][31:1]};
  end

  assign p[39:8] = row_in[8];

endmodule
