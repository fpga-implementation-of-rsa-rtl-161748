// tb_rsa_ctrl_reg: self-checking testbench of the control register.
// Random host writes and controller clear/set requests against a bit model:
// host write loads all bits (clearing the end bit when start or initialise is
// written), the controller clears start/initialise and sets the end bit.
module tb_rsa_ctrl_reg;
  import rsa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            load, start_clr, init_clr, eop_set;
  logic [CR_W-1:0] din, q, model;
  logic            start, sel_m, mod_e, init, eop;
  int checks = 0, failures = 0;

  rsa_ctrl_reg dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; start_clr = 0; init_clr = 0; eop_set = 0; din = 0; model = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      load = ($urandom % 4) == 0; din = CR_W'($urandom);
      start_clr = $urandom % 2; init_clr = $urandom % 2; eop_set = ($urandom % 3) == 0;
      @(negedge clk);
      if (load) begin
        model = din;
        if (din[0] || din[3]) model[4] = 1'b0;
      end else begin
        if (start_clr) model[0] = 1'b0;
        if (init_clr)  model[3] = 1'b0;
        if (eop_set)   model[4] = 1'b1;
      end
      checks++;
      if (q !== model || {eop, init, mod_e, sel_m, start} !== model) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d q=%b exp %b", t, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
