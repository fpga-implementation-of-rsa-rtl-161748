// rsa_memory: single-port operand/result RAM of the coprocessor.
//
// DEPTH words of 32 bits with a synchronous port: when 'en' is high, rwn = 0
// writes d_in at addr on the rising edge, rwn = 1 reads addr and mem_out
// holds that word from the next cycle on (until the next read). The RAM
// holds the operands loaded by the host, the intermediate values of an
// exponentiation and the result. The port multiplexers that give the port to
// the host interface or to the controller sit in the top level. Port names
// (Enable, RWn, D_in, addr, mem_out) follow the published block diagram; the
// size is set by the top from the operand length.
module rsa_memory #(
  parameter int unsigned DEPTH = 288,   // 9 regions x 32 words
  parameter int unsigned AW    = 9
) (
  input  logic          clk,
  input  logic          en,
  input  logic          rwn,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   d_in,
  output logic [31:0]   mem_out
);

  logic [31:0] ram [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (!rwn) ram[addr] <= d_in;
      else      mem_out   <= ram[addr];
    end
  end

endmodule
