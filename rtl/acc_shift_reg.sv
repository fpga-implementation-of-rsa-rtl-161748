// acc_shift_reg: word-wide shift register that holds the Montgomery accumulator.
//
// Keeping the NW-word intermediate value in a shift register, instead of
// writing it back to memory on every inner-loop step, is the published
// remedy for the memory traffic of the word-serial algorithm. The register
// shifts towards index 0: on 'shift' every word moves down one place and
// 'din' enters at the top (index NW-1). Two taps are brought out: q0, the
// word at index 0, and q1, the word at index 1. The multiplier reads a_0 from
// q0 at the start of a row and a_j from q1 while it shifts the new a_(j-1) in,
// so one row of the algorithm turns the register over exactly once. 'clr'
// zeroes all words (takes priority over 'shift'). All actions take effect on
// the rising clock edge.
module acc_shift_reg #(
  parameter int unsigned NW = 32,   // words held (1024-bit operand / 32)
  parameter int unsigned W  = 32    // word width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         shift,
  input  logic [W-1:0] din,
  output logic [W-1:0] q0,
  output logic [W-1:0] q1
);

  logic [W-1:0] sr [NW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NW; k++) sr[k] <= '0;
    end else if (clr) begin
      for (int k = 0; k < NW; k++) sr[k] <= '0;
    end else if (shift) begin
      for (int k = 0; k < NW-1; k++) sr[k] <= sr[k+1];
      sr[NW-1] <= din;
    end
  end

  assign q0 = sr[0];
  assign q1 = (NW > 1) ? sr[(NW > 1) ? 1 : 0] : sr[0];

endmodule
