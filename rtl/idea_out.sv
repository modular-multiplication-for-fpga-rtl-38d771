// idea_out: the IDEA output transformation. It takes the block produced by
// round 8 (whose middle words are swapped) and the four last subkeys:
//   C1 = Z1 (.) K1,  C2 = Z3 + K2,  C3 = Z2 + K3,  C4 = Z4 (.) K4
// i.e. the second word of the round output is added to K3 and the third to
// K2, which undoes the swap of the last round. The two multipliers (latency
// ALPHA) and two adders (latency BETA) are aligned to max(ALPHA,BETA) with
// delay registers after the faster pair.
// Latency: out_latency(ALPHA,BETA) cycles (3 with the defaults), one block
// per cycle. Subkeys must be held constant while a block passes.
module idea_out
  import idea_pkg::*;
#(
  parameter mul_algo_e   ALGO      = ALGO_NP1,
  parameter int unsigned M1        = 1,
  parameter int unsigned M2        = 1,
  parameter int unsigned M3        = 1,
  parameter int unsigned M4        = 1,
  parameter bit          TREE_MULT = 1'b0,
  parameter int unsigned BETA      = 1
) (
  input  logic         clk,
  input  block_t       z,
  input  word_t  [3:0] k,      // k[0] = K1 ... k[3] = K4 of the output round
  output block_t       c
);
  localparam int unsigned ALPHA = mul_latency(ALGO, M1, M2, M3, M4);
  localparam int unsigned T0    = imax(ALPHA, BETA);

  word_t c1, c2, c3, c4;

  idea_mul #(.ALGO(ALGO), .M1(M1), .M2(M2), .M3(M3), .M4(M4), .TREE_MULT(TREE_MULT))
    u_mul1 (.clk(clk), .x(z[0]), .y(k[0]), .p(c1));
  mod_add #(.BETA(BETA)) u_add2 (.clk(clk), .a(z[2]), .b(k[1]), .s(c2));
  mod_add #(.BETA(BETA)) u_add3 (.clk(clk), .a(z[1]), .b(k[2]), .s(c3));
  idea_mul #(.ALGO(ALGO), .M1(M1), .M2(M2), .M3(M3), .M4(M4), .TREE_MULT(TREE_MULT))
    u_mul4 (.clk(clk), .x(z[3]), .y(k[3]), .p(c4));

  delay_line #(.WIDTH(N), .DEPTH(T0 - ALPHA)) u_al1 (.clk(clk), .d(c1), .q(c[0]));
  delay_line #(.WIDTH(N), .DEPTH(T0 - BETA))  u_al2 (.clk(clk), .d(c2), .q(c[1]));
  delay_line #(.WIDTH(N), .DEPTH(T0 - BETA))  u_al3 (.clk(clk), .d(c3), .q(c[2]));
  delay_line #(.WIDTH(N), .DEPTH(T0 - ALPHA)) u_al4 (.clk(clk), .d(c4), .q(c[3]));
endmodule
