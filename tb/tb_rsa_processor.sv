// tb_rsa_processor: end-to-end testbench of the RSA coprocessor.
//
// Drives the top level only through its host bus, at NW = 4 (128-bit
// operands) so that many operations fit in a short run. Each operation
// loads x, y or e, m, R^2 mod m and m' into memory, writes the control
// register, waits for the end bit (and irq), reads the result region back
// and compares it with wide-integer reference arithmetic. Covered: modular
// multiplication, exponentiation with a 16-bit key (encryption) and with a
// full-length key (decryption), an initialise request that aborts a running
// exponentiation, host memory writes ignored while the core is busy, and the
// three endings of the modular multiplier. Each mechanism is counted and a
// failure is counted for one that never happened.
module tb_rsa_processor;
  import rsa_pkg::*;
  import rsa_ref_pkg::*;

  localparam int NW = 4;
  localparam int N  = 32 * NW;
  localparam int AW = $clog2(NREGIONS * NW);
  typedef rsa_ref #(N) ref_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AW:0]  arm_addr;
  logic [31:0]  arm_data, arm_rdata;
  logic [1:0]   arm_con;
  logic         irq;

  rsa_processor #(.NW(NW)) dut (.*);

  int checks = 0, failures = 0;
  int n_mul = 0, n_enc = 0, n_dec = 0, n_init = 0, n_blocked = 0;
  int n_msw = 0, n_sub = 0, n_copy = 0, n_expmul = 0, n_expskip = 0, n_efetch = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (dut.u_modmul.state.name() == "S9_MSW" && dut.u_modmul.an != 0) n_msw++;
    if (dut.u_modmul.state.name() == "S10_BORROW" && dut.u_modmul.cy) n_sub++;
    if (dut.u_modmul.state.name() == "S11_COPY" && dut.u_modmul.j_cnt == 0) n_copy++;
    if (dut.u_controller.state.name() == "C_EXP_SQ" && dut.u_controller.call_done)
      if (dut.u_controller.e_bit) n_expmul++; else n_expskip++;
    if (dut.u_controller.state.name() == "C_EXP_RDE") n_efetch++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic bus_write(input logic [AW:0] a, input logic [31:0] d);
    @(negedge clk);
    arm_addr = a; arm_data = d; arm_con = 2'b11;
    @(negedge clk);
    arm_con = 2'b00;
  endtask

  task automatic bus_read(input logic [AW:0] a, output logic [31:0] d);
    @(negedge clk);
    arm_addr = a; arm_con = 2'b01;
    @(negedge clk);
    arm_con = 2'b00;
    d = arm_rdata;
  endtask

  task automatic put(input int region, input logic [N-1:0] v);
    for (int k = 0; k < NW; k++) bus_write((AW+1)'(region * NW + k), v[32*k +: 32]);
  endtask

  task automatic get(input int region, output logic [N-1:0] v);
    logic [31:0] w;
    for (int k = 0; k < NW; k++) begin
      bus_read((AW+1)'(region * NW + k), w);
      v[32*k +: 32] = w;
    end
  endtask

  localparam logic [AW:0] CR_ADDR = {1'b1, {AW{1'b0}}};

  task automatic load_mod(input logic [N-1:0] m);
    put(REG_M, m);
    put(REG_R2, ref_t::r2_mod(m));
    bus_write((AW+1)'(REG_MPRIME * NW), ref_t::mprime(m));
  endtask

  task automatic wait_eop(output int cycles);
    logic [31:0] cr;
    cycles = 0;
    do begin
      bus_read(CR_ADDR, cr);
      cycles += 2;
    end while (!cr[CR_EOP] && cycles < 2000000);
    check(irq === 1'b1, "irq follows the end bit");
  endtask

  initial begin
    logic [N-1:0] x, y, e, m, r, exp_v;
    logic [31:0]  cr;
    int cyc;
    arm_addr = '0; arm_data = '0; arm_con = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- modular multiplication ----
    for (int t = 0; t < 6; t++) begin
      m = ref_t::rand_mod(t % 2 == 1);
      x = ref_t::rand_below(m);
      y = ref_t::rand_below(m);
      load_mod(m); put(REG_X, x); put(REG_Y, y);
      bus_write(CR_ADDR, 32'b00001);
      wait_eop(cyc);
      get(REG_RES, r);
      exp_v = ref_t::mulmod(x, y, m);
      check(r === exp_v, $sformatf("x*y mod m: got %h exp %h", r, exp_v));
      check(cyc <= 2 * (14*NW*NW + 23*NW + 8) + 40, $sformatf("multiplication took %0d cycles", cyc));
      n_mul++;
    end

    // ---- encryption, 16-bit key ----
    for (int t = 0; t < 4; t++) begin
      m = ref_t::rand_mod(t % 2 == 0);
      x = ref_t::rand_below(m);
      e = '0;
      e[15:0] = (t == 0) ? 16'h0001 : 16'($urandom);
      if (t == 1) e[16] = 1'b1;          // 65537: bit 16 lies outside the key
      e[N-1] = 1'b1;                     // upper bits are ignored in this mode
      load_mod(m); put(REG_X, x); put(REG_E, e);
      bus_write(CR_ADDR, 32'b00011);
      wait_eop(cyc);
      get(REG_RES, r);
      exp_v = ref_t::powmod(x, e, m, 16);
      check(r === exp_v, $sformatf("enc: got %h exp %h", r, exp_v));
      n_enc++;
    end

    // ---- decryption, full-length key ----
    for (int t = 0; t < 3; t++) begin
      m = ref_t::rand_mod(t == 1);
      x = ref_t::rand_below(m);
      e = ref_t::rand_num();
      if (t == 2) e = '0;
      load_mod(m); put(REG_X, x); put(REG_E, e);
      bus_write(CR_ADDR, 32'b00111);
      // the memory belongs to the core now: this write must be ignored
      bus_write((AW+1)'(REG_X * NW), 32'hDEAD_BEEF);
      n_blocked++;
      wait_eop(cyc);
      get(REG_RES, r);
      exp_v = ref_t::powmod(x, e, m, N);
      check(r === exp_v, $sformatf("dec: got %h exp %h", r, exp_v));
      get(REG_X, r);
      check(r === x, "host write during busy was ignored");
      n_dec++;
    end

    // ---- initialise aborts a running operation ----
    bus_write(CR_ADDR, 32'b00111);
    repeat (2000) @(negedge clk);
    bus_write(CR_ADDR, 32'b01000);
    repeat (4) @(negedge clk);
    bus_read(CR_ADDR, cr);
    check(cr[4:0] === 5'b00000, $sformatf("after init: control register %b", cr[4:0]));
    check(dut.u_controller.busy === 1'b0, "controller idle after init");
    n_init++;
    // and the processor still works afterwards
    x = ref_t::rand_below(m);
    y = ref_t::rand_below(m);
    put(REG_X, x); put(REG_Y, y);
    bus_write(CR_ADDR, 32'b00001);
    wait_eop(cyc);
    get(REG_RES, r);
    check(r === ref_t::mulmod(x, y, m), "multiplication after init");

    $display("mul=%0d enc=%0d dec=%0d init=%0d blocked=%0d", n_mul, n_enc, n_dec, n_init, n_blocked);
    $display("modmul endings msw=%0d subtract=%0d copy=%0d", n_msw, n_sub, n_copy);
    $display("exponent bits multiply=%0d skip=%0d word fetches=%0d", n_expmul, n_expskip, n_efetch);
    check(n_mul > 0 && n_enc > 0 && n_dec > 0 && n_init > 0 && n_blocked > 0, "operation modes");
    check(n_msw > 0, "MSW ending");
    check(n_sub > 0, "subtract ending");
    check(n_copy > 0, "copy ending");
    check(n_expmul > 0 && n_expskip > 0, "exponent bit cases");
    check(n_efetch > n_enc + n_dec, "exponent word fetches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
