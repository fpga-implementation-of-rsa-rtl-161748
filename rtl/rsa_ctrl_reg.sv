// rsa_ctrl_reg: the coprocessor's 5-bit control register.
//
// Bit 0 starts an operation, bit 1 selects modular multiplication (0) or
// exponentiation (1), bit 2 selects encryption with a 16-bit key (0) or
// decryption with a full-length key (1), bit 3 initialises the processor and
// bit 4 reports the end of an operation; this bit assignment is the
// published one. The host writes the register through the interface
// ('load' with 'din'); the controller clears the start and initialise bits
// when it takes them ('start_clr', 'init_clr') and sets the end bit with
// 'eop_set'. Starting or initialising also clears the end bit. Which side
// clears which bit is this design's own choice. All updates happen on the
// rising clock edge; a host write wins over the controller in the same cycle.
module rsa_ctrl_reg
  import rsa_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [CR_W-1:0] din,
  input  logic            start_clr,
  input  logic            init_clr,
  input  logic            eop_set,
  output logic [CR_W-1:0] q,
  output logic            start,
  output logic            sel_m,
  output logic            mod_e,
  output logic            init,
  output logic            eop
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (load) begin
      q <= din;
      if (din[CR_START] || din[CR_INIT]) q[CR_EOP] <= 1'b0;
    end else begin
      if (start_clr) q[CR_START] <= 1'b0;
      if (init_clr)  q[CR_INIT]  <= 1'b0;
      if (eop_set)   q[CR_EOP]   <= 1'b1;
    end
  end

  assign start = q[CR_START];
  assign sel_m = q[CR_MODE];
  assign mod_e = q[CR_EXPM];
  assign init  = q[CR_INIT];
  assign eop   = q[CR_EOP];

endmodule
