// tb_rsa_memory: self-checking testbench of the operand RAM.
// Random writes and reads against an array model; checks the one-cycle read
// latency and that mem_out holds its value while the port is idle or writing.
module tb_rsa_memory;
  localparam int DEPTH = 64, AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          en, rwn;
  logic [AW-1:0] addr;
  logic [31:0]   d_in, mem_out, held;
  logic [31:0]   model [DEPTH];
  int checks = 0, failures = 0;

  rsa_memory #(.DEPTH(DEPTH), .AW(AW)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; rwn = 1; addr = 0; d_in = 0;
    // fill
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      en = 1; rwn = 0; addr = AW'(k); d_in = $urandom; model[k] = d_in;
    end
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      en = $urandom % 4 != 0; rwn = $urandom % 2; addr = AW'($urandom); d_in = $urandom;
      held = mem_out;
      if (en && rwn) begin
        @(negedge clk);
        checks++;
        if (mem_out !== model[addr]) begin
          failures++;
          if (failures < 10) $display("FAIL read %0d: %h exp %h", addr, mem_out, model[addr]);
        end
        en = 0;
      end else begin
        if (en && !rwn) model[addr] = d_in;
        @(negedge clk);
        checks++;
        if (mem_out !== held) begin
          failures++;
          if (failures < 10) $display("FAIL mem_out changed without a read");
        end
        en = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
