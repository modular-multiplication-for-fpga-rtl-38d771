// mod_xor: the IDEA group operation "bitwise exclusive or" of two 16-bit
// words with GAMMA optional output registers (0 or 1 in the reference
// architecture). Implemented in LUTs; the register exists only to cut the
// critical path of a pipelined round.
// Latency: GAMMA clock cycles, a new operand pair every cycle.
module mod_xor
  import idea_pkg::*;
#(
  parameter int unsigned GAMMA = 1
) (
  input  logic  clk,
  input  word_t a,
  input  word_t b,
  output word_t s
);
  word_t x;
  assign x = a ^ b;
  delay_line #(.WIDTH(N), .DEPTH(GAMMA)) u_pipe (.clk(clk), .d(x), .q(s));
endmodule
