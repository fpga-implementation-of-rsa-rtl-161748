// tb_rsa_decrypt_1024: a full 1024-bit decryption on the default coprocessor.
//
// Uses rsa_processor with its default parameters (NW = 32 words) and runs
// one exponentiation in decryption mode: a random 1024-bit message and a
// random 1024-bit private exponent with its top bit set. The result is
// compared with wide-integer square-and-multiply, and the cycle count with
// (3 + 1024 + ones(d)) Montgomery products of at most 14*NW^2 + 23*NW + 8
// cycles each. About 23 million cycles are simulated.
module tb_rsa_decrypt_1024;
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
    repeat (30000000) @(posedge clk);
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
    logic [N-1:0] x, e, m, r, exp_v;
    int cyc, n_mm;
    arm_addr = '0; arm_data = '0; arm_con = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    m = ref_t::rand_mod(0);
    x = ref_t::rand_below(m);
    put(REG_M, m);
    put(REG_R2, ref_t::r2_mod(m));
    bus_write((AW+1)'(REG_MPRIME * NW), ref_t::mprime(m));
    put(REG_X, x);

    e = ref_t::rand_num();
    e[N-1] = 1'b1;
    put(REG_E, e);
    run_op(5'b00111, cyc);
    get(REG_RES, r);
    exp_v = ref_t::powmod(x, e, m, N);
    check(r === exp_v, "1024-bit x^d mod m, 1024-bit key");
    n_mm = 3 + N + $countones(e);
    check(cyc <= n_mm * (MM_CYCLES + 20), $sformatf("decryption: %0d cycles", cyc));
    $display("1024-bit decryption, key with %0d ones: %0d Montgomery products, %0d cycles, %0d ms at 40 MHz",
             $countones(e), n_mm, cyc, cyc / 40000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
