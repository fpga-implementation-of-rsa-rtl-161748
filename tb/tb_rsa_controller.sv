// tb_rsa_controller: self-checking testbench of the operation sequencer.
//
// The modular multiplier is replaced by a model that logs each call (source
// regions, destination, y = 1) and answers 'done' after a random delay; the
// memory is a model that returns exponent words. For multiplication and for
// both exponent lengths the logged call sequence is compared with the one
// expected from the left-to-right square-and-multiply algorithm, and the
// start/end handshakes with the control register are checked. NW = 2.
module tb_rsa_controller;
  import rsa_pkg::*;
  localparam int NW = 2, AW = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start, sel_m, mod_e, init, start_clr, init_clr, eop_set, busy;
  logic          mm_start, mm_abort, mm_y_one, mm_done, ctl_en;
  logic [AW-1:0] mm_x_base, mm_y_base, mm_dst_base, ctl_addr;
  logic [31:0]   mem_out;
  logic [31:0]   ewords [NW];

  rsa_controller #(.NW(NW), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  // call log: {y_one, x region, y region, dst region}
  typedef struct packed { logic one; logic [3:0] x, y, d; } call_t;
  call_t log_q[$], exp_q[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // multiplier model
  int delay;
  initial begin
    mm_done = 0;
    forever begin
      @(posedge clk);
      if (mm_start === 1'b1) begin
        log_q.push_back('{mm_y_one, 4'(mm_x_base / NW), mm_y_one ? 4'hF : 4'(mm_y_base / NW),
                          4'(mm_dst_base / NW)});
        delay = 3 + $urandom % 6;
        repeat (delay) @(posedge clk);
        #1 mm_done = 1;
        @(posedge clk);
        #1 mm_done = 0;
      end
    end
  end

  // exponent memory model, one-cycle read latency
  always @(posedge clk) if (ctl_en) mem_out <= ewords[(ctl_addr - REG_E*NW)];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic call_t c(bit one, int x, int y, int d);
    return '{one, 4'(x), one ? 4'hF : 4'(y), 4'(d)};
  endfunction

  task automatic run(input bit mode, input bit dec);
    int cyc, n_eop, nbits;
    log_q.delete(); exp_q.delete();
    if (!mode) begin
      exp_q.push_back(c(0, REG_X, REG_R2, REG_A));
      exp_q.push_back(c(0, REG_A, REG_Y, REG_RES));
    end else begin
      exp_q.push_back(c(0, REG_X, REG_R2, REG_XP));
      exp_q.push_back(c(1, REG_R2, 0, REG_A));
      nbits = dec ? 32*NW : 16;
      for (int i = nbits - 1; i >= 0; i--) begin
        exp_q.push_back(c(0, REG_A, REG_A, REG_A));
        if (ewords[i/32][i%32]) exp_q.push_back(c(0, REG_A, REG_XP, REG_A));
      end
      exp_q.push_back(c(1, REG_A, 0, REG_RES));
    end
    @(negedge clk);
    sel_m = mode; mod_e = dec; start = 1;
    #1 check(start_clr === 1'b1, "start taken");
    @(negedge clk);
    start = 0;
    cyc = 0; n_eop = 0;
    while (busy && cyc < 20000) begin
      if (eop_set) n_eop++;
      @(negedge clk); cyc++;
    end
    check(n_eop == 1, "one end-of-operation pulse");
    check(log_q.size() == exp_q.size(), $sformatf("call count %0d exp %0d", log_q.size(), exp_q.size()));
    for (int k = 0; k < exp_q.size() && k < log_q.size(); k++)
      check(log_q[k] === exp_q[k], $sformatf("call %0d: %h exp %h", k, log_q[k], exp_q[k]));
  endtask

  initial begin
    start = 0; sel_m = 0; mod_e = 0; init = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      foreach (ewords[k]) ewords[k] = $urandom;
      run(t % 3 != 0, t % 3 == 2);
    end
    // initialise aborts an exponentiation
    @(negedge clk);
    sel_m = 1; mod_e = 1; start = 1;
    @(negedge clk);
    start = 0;
    repeat (50) @(negedge clk);
    init = 1;
    #1 check(mm_abort === 1'b1 && init_clr === 1'b1, "init aborts the multiplier");
    @(negedge clk);
    init = 0;
    check(busy === 1'b0, "idle after init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
