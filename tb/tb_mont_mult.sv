// tb_mont_mult: self-checking testbench of the Montgomery multiplier.
//
// Runs mont_mult at NW = 4 (128-bit operands) against a behavioural
// synchronous memory. Each trial loads random x, y < m and m' into memory,
// starts the multiplier and compares the result region with the full-width
// Montgomery product x*y*2^-128 mod m computed by the reference package. It
// also checks y = 1 mode, source = destination, that x/y/m are left intact,
// the cycle count (14*NW^2 + 23*NW + 8 bound) and counts which ending of the
// state diagram each trial took (subtract with MSW set, subtract without
// borrow, copy of t), and that 'cancel' stops a running product.
module tb_mont_mult;
  import rsa_ref_pkg::*;

  localparam int NW = 4;
  localparam int N  = 32 * NW;
  localparam int AW = 6;
  typedef rsa_ref #(N) ref_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start, cancel, y_one, busy, done, mem_en, mem_we;
  logic [AW-1:0] x_base, y_base, m_base, dst_base, mp_addr, mem_addr;
  logic [31:0]   mem_wdata, mem_rdata;
  logic [31:0]   mem [1<<AW];

  always_ff @(posedge clk) begin
    if (mem_en) begin
      if (mem_we) mem[mem_addr] <= mem_wdata;
      else        mem_rdata     <= mem[mem_addr];
    end
  end

  mont_mult #(.NW(NW), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  int n_msw = 0, n_sub = 0, n_copy = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // which ending did the state diagram take
  always @(posedge clk) begin
    if (dut.state.name() == "S9_MSW" && dut.an != 0) n_msw++;
    if (dut.state.name() == "S10_BORROW" && dut.cy) n_sub++;
    if (dut.state.name() == "S11_COPY" && dut.j_cnt == 0) n_copy++;
  end

  task automatic put(input logic [AW-1:0] base, input logic [N-1:0] v);
    for (int k = 0; k < NW; k++) mem[base + k] = v[32*k +: 32];
  endtask
  function automatic logic [N-1:0] get(input logic [AW-1:0] base);
    logic [N-1:0] v;
    for (int k = 0; k < NW; k++) v[32*k +: 32] = mem[base + k];
    return v;
  endfunction

  task automatic run(input logic [AW-1:0] xb, yb, db, input bit one, output int cycles);
    @(negedge clk);
    x_base = xb; y_base = yb; dst_base = db; y_one = one; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    logic [N-1:0] x, y, m, exp_v, got;
    int cyc;
    start = 0; cancel = 0; y_one = 0;
    x_base = 0; y_base = 4; m_base = 8; dst_base = 12; mp_addr = 16;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      m = ref_t::rand_mod(t % 2 == 1);
      x = ref_t::rand_below(m);
      y = ref_t::rand_below(m);
      if (t == 2) x = m - 1;
      if (t == 3) begin x = m - 1; y = m - 1; end
      if (t == 4) x = 0;
      put(0, x); put(4, y); put(8, m);
      mem[16] = ref_t::mprime(m);
      case (t % 3)
        0: begin
          run(0, 4, 12, 0, cyc);
          exp_v = ref_t::mont(x, y, m);
          got = get(12);
        end
        1: begin   // y = 1: leaves the Montgomery domain
          run(0, 4, 12, 1, cyc);
          exp_v = ref_t::mont(x, 1, m);
          got = get(12);
        end
        default: begin  // result written over its own x operand, squaring
          run(0, 0, 0, 0, cyc);
          exp_v = ref_t::mont(x, x, m);
          got = get(0);
        end
      endcase
      checks++;
      if (got !== exp_v) begin
        failures++;
        $display("FAIL trial %0d: got %h exp %h", t, got, exp_v);
      end
      checks++;
      if (get(8) !== m || (t % 3 != 2 && get(0) !== x)) begin
        failures++;
        $display("FAIL trial %0d: operand overwritten", t);
      end
      checks++;
      if (cyc > 14*NW*NW + 23*NW + 8) begin
        failures++;
        $display("FAIL trial %0d: %0d cycles", t, cyc);
      end
      if (t == 0) $display("one Montgomery product, NW=%0d: %0d cycles", NW, cyc);
    end
    // cancel stops a running product at once; the next product is unaffected
    @(negedge clk);
    x_base = 0; y_base = 4; dst_base = 12; y_one = 0; start = 1;
    @(negedge clk);
    start = 0;
    repeat (100) @(negedge clk);
    cancel = 1;
    @(negedge clk);
    cancel = 0;
    checks++;
    if (busy !== 1'b0) begin
      failures++;
      $display("FAIL: still busy after cancel");
    end
    run(0, 4, 12, 0, cyc);
    checks++;
    if (get(12) !== ref_t::mont(get(0), get(4), get(8))) begin
      failures++;
      $display("FAIL: product after cancel");
    end
    $display("endings: msw=%0d subtract=%0d copy=%0d", n_msw, n_sub, n_copy);
    checks++;
    if (n_msw == 0 || n_sub == 0 || n_copy == 0) begin
      failures++;
      $display("FAIL: an ending of the state diagram was never taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
