// additive_multiplier: 32-bit additive multiplier, {out_high,out_low} = A*B + C + D.
//
// A full 32x32 multiplier is too large for the target, so the product is
// built from four passes through the 32x8 additive array (aam_32x8), one byte
// of B per clock, least significant byte first. Registers follow the
// published block diagram: Reg_A holds A; Reg_B holds B and a multiplexer
// picks its byte; Reg_D holds D and a multiplexer picks the matching byte of
// D; Reg_C is loaded with C at start and afterwards with the upper 32 bits of
// the array output (the carry word fed back). The low byte of each pass is
// shifted into the 64-bit output register (Ram_out), whose final upper half
// is the last pass's upper 32 bits.
//   pass k: t_k = A*B[k] + (k==0 ? C : t_{k-1}>>8) + D[k]
// which sums to A*B + C + D; the result cannot exceed 2^64-1.
//
// Timing: 'start' is sampled with the operands on one clock edge; the four
// passes take the next four edges, and 'done' is high (for one cycle) with
// the result valid in out_high/out_low after the fourth. A new start may be
// given in the cycle 'done' is high. out_high/out_low hold their value until
// the next operation finishes.
module additive_multiplier (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] in_a,
  input  logic [31:0] in_b,
  input  logic [31:0] in_c,
  input  logic [31:0] in_d,
  output logic        busy,
  output logic        done,
  output logic [31:0] out_high,
  output logic [31:0] out_low
);

  logic [31:0] reg_a, reg_b, reg_c, reg_d;
  logic [1:0]  byte_sel;
  logic [7:0]  reg_b_out, reg_d_out;
  logic [39:0] mul_out;
  logic [63:0] ram_out;
  logic [23:0] low_acc;   // low bytes of passes 0..2

  // byte multiplexers after Reg_B and Reg_D
  always_comb begin
    reg_b_out = reg_b[8*byte_sel +: 8];
    reg_d_out = reg_d[8*byte_sel +: 8];
  end

  aam_32x8 u_aam (
    .a (reg_a),
    .b (reg_b_out),
    .c (reg_c),
    .d (reg_d_out),
    .p (mul_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_a    <= '0;
      reg_b    <= '0;
      reg_c    <= '0;
      reg_d    <= '0;
      byte_sel <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      low_acc  <= '0;
      ram_out  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        reg_a    <= in_a;
        reg_b    <= in_b;
        reg_c    <= in_c;          // C multiplexer: external operand
        reg_d    <= in_d;
        byte_sel <= 2'd0;
        busy     <= 1'b1;
      end else if (busy) begin
        reg_c    <= mul_out[39:8]; // C multiplexer: carry word fed back
        low_acc  <= {mul_out[7:0], low_acc[23:8]};
        byte_sel <= byte_sel + 2'd1;
        if (byte_sel == 2'd3) begin
          busy    <= 1'b0;
          done    <= 1'b1;
          ram_out <= {mul_out[39:8], mul_out[7:0], low_acc};
        end
      end
    end
  end

  assign out_high = ram_out[63:32];
  assign out_low  = ram_out[31:0];

endmodule
