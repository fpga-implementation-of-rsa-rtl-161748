// rsa_controller: operation sequencer of the RSA coprocessor.
//
// Turns the control register into a sequence of Montgomery multiplications
// Mont(a,b) = a*b*R^-1 mod m, each run by mont_mult on operands in memory:
//   multiplication (mode bit 0):  A = Mont(x, R^2)          (x*R mod m)
//                                 RES = Mont(A, y)          (x*y mod m)
//   exponentiation (mode bit 1):  XP = Mont(x, R^2)         (x*R mod m)
//                                 A  = Mont(R^2, 1)         (R mod m)
//                                 for each exponent bit, most significant first:
//                                   A = Mont(A, A); if bit: A = Mont(A, XP)
//                                 RES = Mont(A, 1)          (leave Montgomery form)
// The exponentiation follows the published left-to-right algorithm with its
// conversion into and out of the Montgomery domain. The exponent is scanned
// over 16 bits (bit 2 = 0, encryption) or over all 32*NW bits (bit 2 = 1,
// decryption); leading zero bits are harmless because A starts at R mod m,
// the Montgomery form of 1. R^2 mod m and m' are supplied by the host; the
// conversion through R^2 and the memory map are this design's own choices.
//
// Interface: 'start' (control bit 0) is taken in the idle state and cleared
// through start_clr; 'init' (bit 3) returns the sequencer to idle and aborts
// the modular multiplier (mm_abort). 'busy'
// gives the memory to the core; eop_set pulses once at the end. The
// controller reads exponent words itself through its memory port
// (ctl_en/ctl_addr, data on mem_out one cycle later) while mont_mult is idle.
module rsa_controller
  import rsa_pkg::*;
#(
  parameter int unsigned NW = 32,
  parameter int unsigned AW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  // control register
  input  logic          start,
  input  logic          sel_m,
  input  logic          mod_e,
  input  logic          init,
  output logic          start_clr,
  output logic          init_clr,
  output logic          eop_set,
  output logic          busy,
  // modular multiplier
  output logic          mm_start,
  output logic          mm_abort,
  output logic          mm_y_one,
  output logic [AW-1:0] mm_x_base,
  output logic [AW-1:0] mm_y_base,
  output logic [AW-1:0] mm_dst_base,
  input  logic          mm_done,
  // memory read port for the exponent
  output logic          ctl_en,
  output logic [AW-1:0] ctl_addr,
  input  logic [31:0]   mem_out
);

  localparam int unsigned EBITS = 32 * NW;
  localparam int unsigned BW    = $clog2(EBITS) + 1;

  typedef enum logic [3:0] {
    C_IDLE,
    C_MUL_A, C_MUL_RES,
    C_EXP_XP, C_EXP_A1,
    C_EXP_RDE, C_EXP_LDE, C_EXP_SQ, C_EXP_MUL, C_EXP_NEXT,
    C_FIN,
    C_EOP
  } cstate_e;

  cstate_e state;
  logic          call_pending;   // Mont call issued, waiting for mm_done
  logic [BW-1:0] bit_idx;
  logic [31:0]   e_word;
  logic          e_bit;

  function automatic logic [AW-1:0] region(input int unsigned r);
    return AW'(r * NW);
  endfunction

  assign e_bit = e_word[bit_idx[4:0]];

  // operands of the Montgomery call belonging to each state
  always_comb begin
    mm_y_one    = 1'b0;
    mm_x_base   = region(REG_X);
    mm_y_base   = region(REG_Y);
    mm_dst_base = region(REG_A);
    unique case (state)
      C_MUL_A:   begin mm_x_base = region(REG_X);  mm_y_base = region(REG_R2); mm_dst_base = region(REG_A);   end
      C_MUL_RES: begin mm_x_base = region(REG_A);  mm_y_base = region(REG_Y);  mm_dst_base = region(REG_RES); end
      C_EXP_XP:  begin mm_x_base = region(REG_X);  mm_y_base = region(REG_R2); mm_dst_base = region(REG_XP);  end
      C_EXP_A1:  begin mm_x_base = region(REG_R2); mm_y_one  = 1'b1;           mm_dst_base = region(REG_A);   end
      C_EXP_SQ:  begin mm_x_base = region(REG_A);  mm_y_base = region(REG_A);  mm_dst_base = region(REG_A);   end
      C_EXP_MUL: begin mm_x_base = region(REG_A);  mm_y_base = region(REG_XP); mm_dst_base = region(REG_A);   end
      C_FIN:     begin mm_x_base = region(REG_A);  mm_y_one  = 1'b1;           mm_dst_base = region(REG_RES); end
      default: ;
    endcase
  end

  wire call_state = (state == C_MUL_A) || (state == C_MUL_RES) || (state == C_EXP_XP) ||
                    (state == C_EXP_A1) || (state == C_EXP_SQ) || (state == C_EXP_MUL) ||
                    (state == C_FIN);

  logic call_done;
  assign mm_start  = call_state && !call_pending;
  assign call_done = call_state && call_pending && mm_done;

  assign ctl_en    = (state == C_EXP_RDE);
  assign ctl_addr  = region(REG_E) + AW'(bit_idx[BW-1:5]);
  assign start_clr = (state == C_IDLE) && start && !init;
  assign init_clr  = init;
  assign mm_abort  = init;
  assign eop_set   = (state == C_EOP);
  assign busy      = (state != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= C_IDLE;
      call_pending <= 1'b0;
      bit_idx      <= '0;
      e_word       <= '0;
    end else if (init) begin
      state        <= C_IDLE;
      call_pending <= 1'b0;
    end else begin
      if (mm_start) call_pending <= 1'b1;
      if (call_done) call_pending <= 1'b0;
      unique case (state)
        C_IDLE: if (start) state <= sel_m ? C_EXP_XP : C_MUL_A;
        C_MUL_A:   if (call_done) state <= C_MUL_RES;
        C_MUL_RES: if (call_done) state <= C_EOP;
        C_EXP_XP:  if (call_done) state <= C_EXP_A1;
        C_EXP_A1:  if (call_done) begin
          bit_idx <= mod_e ? BW'(EBITS-1) : BW'(ENC_KEY_BITS-1);
          state   <= C_EXP_RDE;
        end
        C_EXP_RDE: state <= C_EXP_LDE;
        C_EXP_LDE: begin
          e_word <= mem_out;
          state  <= C_EXP_SQ;
        end
        C_EXP_SQ:  if (call_done) state <= e_bit ? C_EXP_MUL : C_EXP_NEXT;
        C_EXP_MUL: if (call_done) state <= C_EXP_NEXT;
        C_EXP_NEXT: begin
          if (bit_idx == '0) state <= C_FIN;
          else begin
            bit_idx <= bit_idx - 1'b1;
            // a new exponent word is fetched when the index crosses a word edge
            state   <= (bit_idx[4:0] == 5'd0) ? C_EXP_RDE : C_EXP_SQ;
          end
        end
        C_FIN:     if (call_done) state <= C_EOP;
        C_EOP:     state <= C_IDLE;
        default:   state <= C_IDLE;
      endcase
    end
  end

endmodule
