// tb_rsa_interface: self-checking testbench of the host bus interface.
// Checks address decoding (memory or control register), the memory strobes
// and their suppression while the core is busy, the control-register write
// strobe, and the read-back multiplexer one cycle after a read.
module tb_rsa_interface;
  import rsa_pkg::*;
  localparam int AW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AW:0]     arm_addr;
  logic [31:0]     arm_data, arm_rdata, inf_data, mem_out;
  logic [1:0]      arm_con;
  logic            core_busy, inf_en, inf_rwn, reg_load;
  logic [AW-1:0]   a_inf;
  logic [CR_W-1:0] sig_con, cr_q;
  int checks = 0, failures = 0;

  rsa_interface #(.AW(AW)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    bit sel, wr, busy_q, is_reg;
    logic [CR_W-1:0] cr_then;
    arm_addr = 0; arm_data = 0; arm_con = 0; core_busy = 0; mem_out = 0; cr_q = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      arm_addr = (AW+1)'($urandom); arm_data = $urandom;
      sel = $urandom % 4 != 0; wr = $urandom % 2;
      arm_con = {wr, sel}; core_busy = $urandom % 3 == 0; busy_q = core_busy;
      cr_q = CR_W'($urandom); cr_then = cr_q;
      is_reg = arm_addr[AW];
      #1;
      check(inf_en === (sel && !is_reg && !busy_q), "memory enable");
      if (inf_en) begin
        check(inf_rwn === !wr, "read/write");
        check(a_inf === arm_addr[AW-1:0], "memory address");
        check(inf_data === arm_data, "memory data");
      end
      check(reg_load === (sel && is_reg && wr), "control register load");
      if (reg_load) check(sig_con === arm_data[CR_W-1:0], "control data");
      @(negedge clk);
      arm_con = 0;
      mem_out = $urandom;
      #1;
      if (sel && !wr && is_reg)
        check(arm_rdata === {27'd0, cr_then}, "control register read-back");
      else if (sel && !wr && !busy_q)
        check(arm_rdata === mem_out, "memory read-back");
      else
        check(arm_rdata === 32'd0, "no read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
