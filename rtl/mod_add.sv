// mod_add: the IDEA group operation "addition modulo 2^16" with BETA
// optional output registers (BETA = 0 or 1 in the reference architecture;
// any value is accepted). A plain n-bit adder whose carry out is dropped;
// on an FPGA it maps onto the fast carry chain.
// Latency: BETA clock cycles, a new operand pair every cycle.
module mod_add
  import idea_pkg::*;
#(
  parameter int unsigned BETA = 1
) (
  input  logic  clk,
  input  word_t a,
  input  word_t b,
  output word_t s
);
  word_t sum;
  assign sum = a + b;   // wraps modulo 2^16
  delay_line #(.WIDTH(N), .DEPTH(BETA)) u_pipe (.clk(clk), .d(sum), .q(s));
endmodule
