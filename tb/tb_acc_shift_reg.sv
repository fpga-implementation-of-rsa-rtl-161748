// tb_acc_shift_reg: self-checking testbench of the accumulator shift register.
// Compares the q0/q1 taps with a queue model under random shift and clear
// sequences (NW = 5).
module tb_acc_shift_reg;
  localparam int NW = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        clr, shift;
  logic [31:0] din, q0, q1;
  logic [31:0] model [NW];
  int checks = 0, failures = 0;

  acc_shift_reg #(.NW(NW), .W(32)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; shift = 0; din = 0;
    foreach (model[k]) model[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (q0 !== model[0] || q1 !== model[1]) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d q0=%h q1=%h exp %h %h", t, q0, q1, model[0], model[1]);
      end
      clr   = ($urandom % 50) == 0;
      shift = $urandom % 2;
      din   = $urandom;
      if (clr) foreach (model[k]) model[k] = 0;
      else if (shift) begin
        for (int k = 0; k < NW-1; k++) model[k] = model[k+1];
        model[NW-1] = din;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
