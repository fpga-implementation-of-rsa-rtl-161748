// rsa_interface: host (ARM) bus interface of the coprocessor.
//
// A simple synchronous slave port. arm_con[0] selects the coprocessor for one
// cycle and arm_con[1] makes that access a write. Address bit AW selects the
// control register (1) or the memory (0, word address in arm_addr[AW-1:0]).
// A memory write drives the memory port (inf_en, inf_rwn = 0, a_inf,
// inf_data); a control-register write pulses reg_load with the low five data
// bits on sig_con. A read returns, on arm_rdata in the following cycle, the
// memory word or the control register. While the core is busy (core_busy)
// the memory belongs to the controller: host memory accesses are then
// ignored and read back as zero, but the control register stays accessible
// so the host can poll the end bit. The bus protocol, the address map and
// the busy rule are this design's own; the published diagram only names the
// interface block and its signals.
module rsa_interface
  import rsa_pkg::*;
#(
  parameter int unsigned AW = 9
) (
  input  logic            clk,
  input  logic            rst_n,
  // host side
  input  logic [AW:0]     arm_addr,
  input  logic [31:0]     arm_data,
  input  logic [1:0]      arm_con,     // [0] select, [1] write
  output logic [31:0]     arm_rdata,
  // core side
  input  logic            core_busy,
  output logic            inf_en,
  output logic            inf_rwn,
  output logic [AW-1:0]   a_inf,
  output logic [31:0]     inf_data,
  input  logic [31:0]     mem_out,
  output logic            reg_load,
  output logic [CR_W-1:0] sig_con,
  input  logic [CR_W-1:0] cr_q
);

  logic sel_reg, wr;
  typedef enum logic [1:0] { RD_NONE, RD_MEM, RD_REG } rd_src_e;
  rd_src_e rd_src;

  assign sel_reg  = arm_addr[AW];
  assign wr       = arm_con[1];

  always_comb begin
    inf_en   = arm_con[0] && !sel_reg && !core_busy;
    inf_rwn  = !wr;
    a_inf    = arm_addr[AW-1:0];
    inf_data = arm_data;
    reg_load = arm_con[0] && sel_reg && wr;
    sig_con  = arm_data[CR_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                 rd_src <= RD_NONE;
    else if (arm_con[0] && !wr &&  sel_reg)     rd_src <= RD_REG;
    else if (arm_con[0] && !wr && !core_busy)   rd_src <= RD_MEM;
    else                                        rd_src <= RD_NONE;
  end

  logic [CR_W-1:0] cr_hold;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cr_hold <= '0;
    else        cr_hold <= cr_q;
  end

  always_comb begin
    unique case (rd_src)
      RD_MEM:  arm_rdata = mem_out;
      RD_REG:  arm_rdata = {{(32-CR_W){1'b0}}, cr_hold};
      default: arm_rdata = '0;
    endcase
  end

endmodule
