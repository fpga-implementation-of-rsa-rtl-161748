// mont_mult: word-serial Montgomery modular multiplier, A = x*y*R^-1 mod m.
//
// Operands are NW words of 32 bits (R = 2^(32*NW)); x, y and m are read from
// the coprocessor memory one word at a time, the result is written back to
// memory at dst_base. Every arithmetic step is a 32-bit multiply-add
// {hi,lo} = a*b + c + d done by the 4-cycle additive multiplier, including
// the additions and the final subtraction, so the datapath is that unit, a
// few 32-bit registers (x_i, u_i, m', the two carries C1/C2, the sum S and
// the most significant word a_n) and the accumulator shift register.
//
// For each word x_i (i = 0..NW-1) one row of the algorithm runs:
//   (C1,S) = x_i*y_0 + a_0 ;  u_i = m'*S mod 2^32 ;  (C2,-) = m_0*u_i + S
//   for j = 1..NW-1:  (C1,S) = x_i*y_j + a_j + C1
//                     (C2,S) = m_j*u_i + S + C2 ;  a_(j-1) = S
//   (a_n, a_(NW-1)) = C1 + C2 + a_n
// The states follow the published state diagram: S1 initiate, S2 calculate
// u_i, S3 the inner multiply-adds, S4 test the j count, S5 load the top word,
// S6 load the carry, S7 test the i count, S8 compute t - m word by word into
// memory, S9 test the most significant word, S10 test the subtraction borrow,
// S11 copy t itself to memory when t < m.
//
// Interface: 'cancel' returns the unit to idle at once (the processor's
// initialise bit). Pulse 'start' with the four base addresses (and y_one = 1 to
// use y = 1 instead of reading y); 'busy' is high until the one-cycle 'done'.
// The memory port is synchronous: read data arrives the cycle after mem_en
// with mem_we = 0. x, y < m, m odd and m' = -m^-1 mod 2^32 (stored at
// mp_addr) are required; the result is then fully reduced, < m.
// Timing: 14*NW^2 + 23*NW + 5 cycles from start to done
// (15 077 for NW = 32, 377 us at 40 MHz).
// The memory map, the handshake and the fusing of the two end-of-row
// additions into one multiply-add are this design's own choices.
module mont_mult #(
  parameter int unsigned NW = 32,  // words per operand
  parameter int unsigned AW = 9    // memory word-address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          cancel,
  input  logic          y_one,
  input  logic [AW-1:0] x_base,
  input  logic [AW-1:0] y_base,
  input  logic [AW-1:0] m_base,
  input  logic [AW-1:0] dst_base,
  input  logic [AW-1:0] mp_addr,
  output logic          busy,
  output logic          done,
  // memory port
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [31:0]   mem_wdata,
  input  logic [31:0]   mem_rdata
);

  localparam int unsigned CW = $clog2(NW) + 1;

  typedef enum logic [4:0] {
    S_IDLE,
    S1_INIT,  S1_LDMP,
    S2_RDX,   S2_LDX,   S2_OP1,   S2_W1,  S2_OP2, S2_W2, S2_OP3, S2_W3,
    S3_RDY,   S3_OPA,   S3_WA,    S3_OPB, S3_WB,
    S4_CHKJ,
    S5_LOAD,  S5_W,
    S6_CARRY,
    S7_CHKI,
    S8_RD,    S8_OP,    S8_W,
    S9_MSW,   S10_BORROW,
    S11_COPY,
    S_END
  } state_e;

  state_e state, state_n;

  logic [CW-1:0] i_cnt, j_cnt;
  logic [31:0]   xi, ru, mp, c1, c2, s_reg, an;
  logic          cy;      // subtraction carry (1 = no borrow)
  logic [31:0]   hi_q, lo_q;
  logic          am_start, am_busy, am_done;
  logic [31:0]   am_a, am_b, am_c, am_d;

  // accumulator
  logic          sr_clr, sr_shift;
  logic [31:0]   sr_din, sr_q0, sr_q1;

  acc_shift_reg #(.NW(NW), .W(32)) u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (sr_clr),
    .shift (sr_shift),
    .din   (sr_din),
    .q0    (sr_q0),
    .q1    (sr_q1)
  );

  additive_multiplier u_am (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (am_start),
    .in_a     (am_a),
    .in_b     (am_b),
    .in_c     (am_c),
    .in_d     (am_d),
    .busy     (am_busy),
    .done     (am_done),
    .out_high (hi_q),
    .out_low  (lo_q)
  );

  // word j of y: memory, or the constant 1
  function automatic logic [31:0] y_word(input logic one, input logic [CW-1:0] j,
                                         input logic [31:0] rd);
    if (one) return (j == '0) ? 32'd1 : 32'd0;
    return rd;
  endfunction

  function automatic logic [AW-1:0] at(input logic [AW-1:0] base, input logic [CW-1:0] idx);
    return base + AW'(idx);
  endfunction

  wire last_j = (j_cnt == CW'(NW-1));
  wire last_i = (i_cnt == CW'(NW-1));

  always_comb begin
    state_n   = state;
    am_start  = 1'b0;
    am_a      = '0;
    am_b      = '0;
    am_c      = '0;
    am_d      = '0;
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    sr_clr    = 1'b0;
    sr_shift  = 1'b0;
    sr_din    = '0;
    unique case (state)
      S_IDLE:    if (start) state_n = S1_INIT;
      S1_INIT: begin
        sr_clr   = 1'b1;
        mem_en   = 1'b1;
        mem_addr = mp_addr;
        state_n  = S1_LDMP;
      end
      S1_LDMP:   state_n = S2_RDX;
      // ---- S2: u_i ----
      S2_RDX: begin
        mem_en   = 1'b1;
        mem_addr = at(x_base, i_cnt);
        state_n  = S2_LDX;
      end
      S2_LDX: begin
        mem_en   = 1'b1;
        mem_addr = y_base;
        state_n  = S2_OP1;
      end
      S2_OP1: begin
        am_start = 1'b1;
        am_a = xi; am_b = y_word(y_one, '0, mem_rdata); am_c = sr_q0;
        state_n  = S2_W1;
      end
      S2_W1:     if (am_done) state_n = S2_OP2;
      S2_OP2: begin
        am_start = 1'b1;
        am_a = mp; am_b = s_reg;
        state_n  = S2_W2;
      end
      S2_W2: if (am_done) begin
        mem_en   = 1'b1;
        mem_addr = m_base;
        state_n  = S2_OP3;
      end
      S2_OP3: begin
        am_start = 1'b1;
        am_a = mem_rdata; am_b = ru; am_c = s_reg;
        state_n  = S2_W3;
      end
      S2_W3:     if (am_done) state_n = S3_RDY;
      // ---- S3: x_i*y_j + a_j + C1, then m_j*u_i + S + C2 ----
      S3_RDY: begin
        mem_en   = 1'b1;
        mem_addr = at(y_base, j_cnt);
        state_n  = S3_OPA;
      end
      S3_OPA: begin
        am_start = 1'b1;
        am_a = xi; am_b = y_word(y_one, j_cnt, mem_rdata); am_c = sr_q1; am_d = c1;
        state_n  = S3_WA;
      end
      S3_WA: if (am_done) begin
        mem_en   = 1'b1;
        mem_addr = at(m_base, j_cnt);
        state_n  = S3_OPB;
      end
      S3_OPB: begin
        am_start = 1'b1;
        am_a = mem_rdata; am_b = ru; am_c = s_reg; am_d = c2;
        state_n  = S3_WB;
      end
      S3_WB: if (am_done) begin
        sr_shift = 1'b1;          // a_(j-1) = S
        sr_din   = lo_q;
        state_n  = S4_CHKJ;
      end
      S4_CHKJ:   state_n = last_j ? S5_LOAD : S3_RDY;
      // ---- S5/S6: top words of the row ----
      S5_LOAD: begin
        am_start = 1'b1;
        am_a = c1; am_b = 32'd1; am_c = c2; am_d = an;
        state_n  = S5_W;
      end
      S5_W: if (am_done) begin
        sr_shift = 1'b1;          // a_(NW-1)
        sr_din   = lo_q;
        state_n  = S6_CARRY;
      end
      S6_CARRY:  state_n = S7_CHKI;
      S7_CHKI:   state_n = last_i ? S8_RD : S2_RDX;
      // ---- S8: t - m into memory, accumulator rotates ----
      S8_RD: begin
        mem_en   = 1'b1;
        mem_addr = at(m_base, j_cnt);
        state_n  = S8_OP;
      end
      S8_OP: begin
        am_start = 1'b1;
        am_a = ~mem_rdata; am_b = 32'd1; am_c = sr_q0; am_d = {31'd0, cy};
        state_n  = S8_W;
      end
      S8_W: if (am_done) begin
        mem_en    = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = at(dst_base, j_cnt);
        mem_wdata = lo_q;
        sr_shift  = 1'b1;
        sr_din    = sr_q0;
        state_n   = last_j ? S9_MSW : S8_RD;
      end
      S9_MSW:     state_n = (an != '0) ? S_END : S10_BORROW;
      S10_BORROW: state_n = cy ? S_END : S11_COPY;
      S11_COPY: begin
        mem_en    = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = at(dst_base, j_cnt);
        mem_wdata = sr_q0;
        sr_shift  = 1'b1;
        sr_din    = sr_q0;
        if (last_j) state_n = S_END;
      end
      S_END:     state_n = S_IDLE;
      default:   state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      i_cnt <= '0;
      j_cnt <= '0;
      xi    <= '0;
      ru    <= '0;
      mp    <= '0;
      c1    <= '0;
      c2    <= '0;
      s_reg <= '0;
      an    <= '0;
      cy    <= 1'b1;
    end else if (cancel) begin
      state <= S_IDLE;
    end else begin
      state <= state_n;
      unique case (state)
        S1_INIT: begin
          i_cnt <= '0;
          an    <= '0;
        end
        S1_LDMP:  mp <= mem_rdata;
        S2_LDX:   xi <= mem_rdata;
        S2_W1:    if (am_done) begin c1 <= hi_q; s_reg <= lo_q; end
        S2_W2:    if (am_done) ru <= lo_q;
        S2_W3:    if (am_done) begin c2 <= hi_q; j_cnt <= CW'(1); end
        S3_WA:    if (am_done) begin c1 <= hi_q; s_reg <= lo_q; end
        S3_WB:    if (am_done) c2 <= hi_q;
        S4_CHKJ:  if (!last_j) j_cnt <= j_cnt + 1'b1;
        S6_CARRY: an <= hi_q;
        S7_CHKI: begin
          if (!last_i) i_cnt <= i_cnt + 1'b1;
          else begin
            j_cnt <= '0;
            cy    <= 1'b1;
          end
        end
        S8_W: if (am_done) begin
          cy    <= hi_q[0];
          j_cnt <= last_j ? '0 : j_cnt + 1'b1;
        end
        S11_COPY: j_cnt <= last_j ? '0 : j_cnt + 1'b1;
        default: ;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_END);

  // the additive multiplier is only started when it is free
  a_am_free: assert property (@(posedge clk) disable iff (!rst_n) am_start |-> !am_busy);

endmodule
