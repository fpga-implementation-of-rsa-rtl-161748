// tb_rsa_processor_full: the coprocessor at its full 1024-bit size.
//
// Uses rsa_processor with its default parameters (NW = 32 words). Through
// the host bus it performs one 1024-bit modular multiplication and one
// 1024-bit exponentiation in the 16-bit key mode (a random 16-bit key with
// its top bit set), compares both results with wide-integer
// reference arithmetic and checks the cycle counts: a modular multiplication
// costs 14*NW^2 + 23*NW + 8 cycles or less, about 377 us at 40 MHz.
module tb_rsa_processor_full;
  import rsa_pkg::*;
  import rsa_ref_pkg::*;

  localparam int NW = NWORDS_DEFAULT;
  localparam int N  = 32 * NW;
  localparam int AW = $clog2(NREGIONS * NW);
  localparam int MM_CYCLES = 14*NW*NW + 23*NW + 8;
  typedef rsa_ref #(N) ref_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AW:0]  arm_addr;
  logic [31:0]  arm_data, arm_rdata;
  logic [1:0]   arm_con;
  logic         irq;

  rsa_processor dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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

  // runs one operation and returns the cycles from start to the end bit
  task automatic run_op(input logic [4:0] cr_val, output int cycles);
    bus_write(CR_ADDR, {27'd0, cr_val});
    cycles = 0;
    while (!irq) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    logic [N-1:0] x, y, e, m, r, exp_v;
    int cyc, n_mm;
    arm_addr = '0; arm_data = '0; arm_con = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    m = ref_t::rand_mod(0);
    x = ref_t::rand_below(m);
    y = ref_t::rand_below(m);
    put(REG_M, m);
    put(REG_R2, ref_t::r2_mod(m));
    bus_write((AW+1)'(REG_MPRIME * NW), ref_t::mprime(m));
    put(REG_X, x);
    put(REG_Y, y);

    // 1024-bit modular multiplication: two Montgomery products
    run_op(5'b00001, cyc);
    get(REG_RES, r);
    exp_v = ref_t::mulmod(x, y, m);
    check(r === exp_v, "1024-bit x*y mod m");
    check(cyc <= 2 * MM_CYCLES + 40, $sformatf("multiplication: %0d cycles", cyc));
    $display("1024-bit x*y mod m: %0d cycles (two Montgomery products), %0d ns at 40 MHz",
             cyc, cyc * 25);

    // 1024-bit exponentiation, 16-bit key
    e = '0;
    e[15:0] = 16'h8000 | 16'($urandom);
    put(REG_E, e);
    run_op(5'b00011, cyc);
    get(REG_RES, r);
    exp_v = ref_t::powmod(x, e, m, 16);
    check(r === exp_v, "1024-bit x^e mod m, 16-bit key");
    n_mm = 3 + 16 + $countones(e[15:0]);
    check(cyc <= n_mm * (MM_CYCLES + 20), $sformatf("encryption: %0d cycles", cyc));
    $display("1024-bit encryption, 16-bit key with %0d ones: %0d Montgomery products, %0d cycles, %0d us at 40 MHz",
             $countones(e[15:0]), n_mm, cyc, cyc / 40);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
