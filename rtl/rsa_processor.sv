// rsa_processor: RSA public-key coprocessor (top level).
//
// Computes x*y mod m or x^e mod m for NW-word (32*NW-bit, 1024 by default)
// operands with a single 32-bit datapath, trading speed for area as a smart
// card requires. The blocks and their names follow the published processor
// diagram: the host interface, the control register, the controller, the
// operand memory with its port multiplexers (selected by mode_sel = core
// busy), and the modular multiplier, which holds the additive multiplier, its
// 32-bit data registers and the accumulator shift register.
//
// Use: with the core idle, the host writes x, y (or the exponent), m,
// R^2 mod m (R = 2^(32*NW)) and m' = -m^-1 mod 2^32 into the memory regions of
// rsa_pkg, then writes the control register (address bit AW set) with bit 0
// (start), bit 1 (0: multiply, 1: exponentiate) and bit 2 (0: 16-bit key,
// 1: full-length key). It polls bit 4 (or waits for irq) and reads the result
// region. Each host access is a one-cycle strobe on arm_con[0] (arm_con[1]
// = write); read data appears on arm_rdata the next cycle.
// Timing: one modular multiplication takes 14*NW^2 + 23*NW + 5 cycles plus two for the controller.
module rsa_processor
  import rsa_pkg::*;
#(
  parameter int unsigned NW    = NWORDS_DEFAULT,
  parameter int unsigned DEPTH = NREGIONS * NW,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW:0]   arm_addr,
  input  logic [31:0]   arm_data,
  input  logic [1:0]    arm_con,
  output logic [31:0]   arm_rdata,
  output logic          irq
);

  // interface <-> memory / control register
  logic            inf_en, inf_rwn, reg_load;
  logic [AW-1:0]   a_inf;
  logic [31:0]     inf_data, mem_out;
  logic [CR_W-1:0] sig_con, cr_q;
  // control register fields
  logic            cr_start, cr_sel_m, cr_mod_e, cr_init, cr_eop;
  // controller
  logic            start_clr, init_clr, eop_set, mode_sel;
  logic            mm_start, mm_abort, mm_y_one, mm_busy, mm_done;
  logic [AW-1:0]   mm_x_base, mm_y_base, mm_dst_base;
  logic            ctl_en;
  logic [AW-1:0]   ctl_addr;
  // modular multiplier memory port
  logic            mm_en, mm_we;
  logic [AW-1:0]   mm_addr;
  logic [31:0]     mac_out;
  // memory port after the multiplexers
  logic            en_m, rwn_m;
  logic [AW-1:0]   addr_m;
  logic [31:0]     din_m;

  rsa_interface #(.AW(AW)) u_interface (
    .clk       (clk),
    .rst_n     (rst_n),
    .arm_addr  (arm_addr),
    .arm_data  (arm_data),
    .arm_con   (arm_con),
    .arm_rdata (arm_rdata),
    .core_busy (mode_sel),
    .inf_en    (inf_en),
    .inf_rwn   (inf_rwn),
    .a_inf     (a_inf),
    .inf_data  (inf_data),
    .mem_out   (mem_out),
    .reg_load  (reg_load),
    .sig_con   (sig_con),
    .cr_q      (cr_q)
  );

  rsa_ctrl_reg u_con_reg (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (reg_load),
    .din       (sig_con),
    .start_clr (start_clr),
    .init_clr  (init_clr),
    .eop_set   (eop_set),
    .q         (cr_q),
    .start     (cr_start),
    .sel_m     (cr_sel_m),
    .mod_e     (cr_mod_e),
    .init      (cr_init),
    .eop       (cr_eop)
  );

  rsa_controller #(.NW(NW), .AW(AW)) u_controller (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (cr_start),
    .sel_m       (cr_sel_m),
    .mod_e       (cr_mod_e),
    .init        (cr_init),
    .start_clr   (start_clr),
    .init_clr    (init_clr),
    .eop_set     (eop_set),
    .busy        (mode_sel),
    .mm_start    (mm_start),
    .mm_abort    (mm_abort),
    .mm_y_one    (mm_y_one),
    .mm_x_base   (mm_x_base),
    .mm_y_base   (mm_y_base),
    .mm_dst_base (mm_dst_base),
    .mm_done     (mm_done),
    .ctl_en      (ctl_en),
    .ctl_addr    (ctl_addr),
    .mem_out     (mem_out)
  );

  mont_mult #(.NW(NW), .AW(AW)) u_modmul (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (mm_start),
    .cancel    (mm_abort),
    .y_one     (mm_y_one),
    .x_base    (mm_x_base),
    .y_base    (mm_y_base),
    .m_base    (AW'(REG_M * NW)),
    .dst_base  (mm_dst_base),
    .mp_addr   (AW'(REG_MPRIME * NW)),
    .busy      (mm_busy),
    .done      (mm_done),
    .mem_en    (mm_en),
    .mem_we    (mm_we),
    .mem_addr  (mm_addr),
    .mem_wdata (mac_out),
    .mem_rdata (mem_out)
  );

  // memory port multiplexers: host while idle, else controller / multiplier
  always_comb begin
    if (!mode_sel) begin
      en_m   = inf_en;
      rwn_m  = inf_rwn;
      addr_m = a_inf;
      din_m  = inf_data;
    end else if (mm_busy) begin
      en_m   = mm_en;
      rwn_m  = !mm_we;
      addr_m = mm_addr;
      din_m  = mac_out;
    end else begin
      en_m   = ctl_en;
      rwn_m  = 1'b1;
      addr_m = ctl_addr;
      din_m  = mac_out;
    end
  end

  rsa_memory #(.DEPTH(DEPTH), .AW(AW)) u_memory (
    .clk     (clk),
    .en      (en_m),
    .rwn     (rwn_m),
    .addr    (addr_m),
    .d_in    (din_m),
    .mem_out (mem_out)
  );

  assign irq = cr_eop;

  // the controller starts a product only while the multiplier is idle, and
  // the host never reaches the memory while the core owns it
  a_mm_idle:  assert property (@(posedge clk) disable iff (!rst_n) mm_start |-> !mm_busy);
  a_mem_own:  assert property (@(posedge clk) disable iff (!rst_n) (mode_sel && en_m) |-> !inf_en);

endmodule
