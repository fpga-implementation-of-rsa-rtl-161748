// tb_aam_32x8: self-checking testbench of the 32x8 additive array multiplier.
// Applies corner and random operands and compares P with A*B + C + D
// computed in 40-bit integer arithmetic.
module tb_aam_32x8;
  logic [31:0] a, c;
  logic [7:0]  b, d;
  logic [39:0] p;
  int checks = 0, failures = 0;

  aam_32x8 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [39:0] exp_v;
    for (int t = 0; t < 3000; t++) begin
      case (t)
        0: begin a = '1; b = '1; c = '1; d = '1; end
        1: begin a = '0; b = '0; c = '0; d = '0; end
        2: begin a = '1; b = 8'h01; c = '0; d = '0; end
        3: begin a = '0; b = '0; c = '1; d = '1; end
        default: begin a = $urandom; b = 8'($urandom); c = $urandom; d = 8'($urandom); end
      endcase
      #1;
      exp_v = 40'(a) * 40'(b) + 40'(c) + 40'(d);
      checks++;
      if (p !== exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h c=%h d=%h p=%h exp=%h", a, b, c, d, p, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
