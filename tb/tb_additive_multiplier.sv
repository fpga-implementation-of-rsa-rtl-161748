// tb_additive_multiplier: self-checking testbench of the 4-cycle additive multiplier.
// Issues back-to-back and spaced operations with corner and random operands,
// compares {out_high,out_low} with A*B + C + D in 64-bit arithmetic and checks
// that 'done' comes exactly four clock edges after the start edge.
module tb_additive_multiplier;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start, busy, done;
  logic [31:0] in_a, in_b, in_c, in_d, out_high, out_low;
  int checks = 0, failures = 0;

  additive_multiplier dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] exp_v;
    int lat;
    start = 0; in_a = 0; in_b = 0; in_c = 0; in_d = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      case (t)
        0: begin in_a = '1; in_b = '1; in_c = '1; in_d = '1; end
        1: begin in_a = 32'h8000_0001; in_b = 32'h0000_0100; in_c = 0; in_d = 32'hFFFF_FFFF; end
        default: begin in_a = $urandom; in_b = $urandom; in_c = $urandom; in_d = $urandom; end
      endcase
      exp_v = 64'(in_a) * 64'(in_b) + 64'(in_c) + 64'(in_d);
      start = 1;
      @(negedge clk);
      start = 0;
      in_a = $urandom; in_b = $urandom; in_c = $urandom; in_d = $urandom; // must not matter
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if ({out_high, out_low} !== exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d got %h exp %h", t, {out_high, out_low}, exp_v);
      end
      checks++;
      if (lat != 5) begin  // the start cycle plus four passes
        failures++;
        if (failures < 10) $display("FAIL latency %0d", lat);
      end
      if (t % 2 == 0) repeat (t % 5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
