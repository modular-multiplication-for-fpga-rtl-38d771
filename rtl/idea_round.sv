// idea_round: one round of IDEA with pipelined group operators.
//
// Data flow (words X1..X4, subkeys K1..K6):
//   key layer   Y1 = X1 (.) K1, Y2 = X2 + K2, Y3 = X3 + K3, Y4 = X4 (.) K4
//   MA layer    E = Y1 ^ Y3, F = Y2 ^ Y4,
//               G = E (.) K5, H = G + F, t1 = H (.) K6, t2 = t1 + G
//   output      (Y1 ^ t1, Y3 ^ t1, Y2 ^ t2, Y4 ^ t2)  -- middle words swapped
// where (.) is multiplication modulo 2^16+1 (latency ALPHA), + is addition
// modulo 2^16 (latency BETA) and ^ is XOR (latency GAMMA).
//
// Because the three operators have different latencies, delay registers
// keep every operand in step: the adders (or the multipliers) of the key
// layer are followed by ALPHA-BETA (or BETA-ALPHA) registers, F waits
// ALPHA cycles for G, G waits ALPHA+BETA cycles for t1, t1 waits BETA cycles
// for t2, and Y1..Y4 wait 2*ALPHA+2*BETA+GAMMA cycles for t1/t2.
// Latency: round_latency(ALPHA,BETA,GAMMA) = max(ALPHA,BETA) + 2*ALPHA +
// 2*BETA + 2*GAMMA cycles (13 with the defaults), one block per cycle.
//
// Subkeys: with KEY_ALIGN = 0 all six subkeys are sampled when they are
// used and must be held constant (the fully unrolled processor keeps them in
// its subkey memory). With KEY_ALIGN = 1 the six subkeys are given together
// with the block and K5/K6 are delayed internally, so an iterative processor
// can change the subkeys every cycle. The structure and delays follow the
// reference round diagram; the key alignment option is this design's choice.
module idea_round
  import idea_pkg::*;
#(
  parameter mul_algo_e   ALGO      = ALGO_NP1,
  parameter int unsigned M1        = 1,
  parameter int unsigned M2        = 1,
  parameter int unsigned M3        = 1,
  parameter int unsigned M4        = 1,
  parameter bit          TREE_MULT = 1'b0,
  parameter int unsigned BETA      = 1,
  parameter int unsigned GAMMA     = 1,
  parameter bit          KEY_ALIGN = 1'b0
) (
  input  logic           clk,
  input  block_t         x,
  input  word_t  [5:0]   k,     // k[0] = K1 ... k[5] = K6
  output block_t         y
);
  localparam int unsigned ALPHA = mul_latency(ALGO, M1, M2, M3, M4);
  localparam int unsigned T0    = imax(ALPHA, BETA);

  word_t y1, y2, y3, y4, y1a, y2a, y3a, y4a, y1d, y2d, y3d, y4d;
  word_t e, f, fd, g, gd, h, t1, t1d, t2, k5, k6;

  // Key layer
  idea_mul #(.ALGO(ALGO), .M1(M1), .M2(M2), .M3(M3), .M4(M4), .TREE_MULT(TREE_MULT))
    u_mul1 (.clk(clk), .x(x[0]), .y(k[0]), .p(y1));
  mod_add #(.BETA(BETA)) u_add2 (.clk(clk), .a(x[1]), .b(k[1]), .s(y2));
  mod_add #(.BETA(BETA)) u_add3 (.clk(clk), .a(x[2]), .b(k[2]), .s(y3));
  idea_mul #(.ALGO(ALGO), .M1(M1), .M2(M2), .M3(M3), .M4(M4), .TREE_MULT(TREE_MULT))
    u_mul4 (.clk(clk), .x(x[3]), .y(k[3]), .p(y4));

  delay_line #(.WIDTH(N), .DEPTH(T0 - ALPHA)) u_al1 (.clk(clk), .d(y1), .q(y1a));
  delay_line #(.WIDTH(N), .DEPTH(T0 - BETA))  u_al2 (.clk(clk), .d(y2), .q(y2a));
  delay_line #(.WIDTH(N), .DEPTH(T0 - BETA))  u_al3 (.clk(clk), .d(y3), .q(y3a));
  delay_line #(.WIDTH(N), .DEPTH(T0 - ALPHA)) u_al4 (.clk(clk), .d(y4), .q(y4a));

  // Subkeys of the MA layer
  if (KEY_ALIGN) begin : g_key_align
    delay_line #(.WIDTH(N), .DEPTH(T0 + GAMMA))                u_k5 (.clk(clk), .d(k[4]), .q(k5));
    delay_line #(.WIDTH(N), .DEPTH(T0 + GAMMA + ALPHA + BETA)) u_k6 (.clk(clk), .d(k[5]), .q(k6));
  end else begin : g_key_static
    assign k5 = k[4];
    assign k6 = k[5];
  end

  // MA (multiply-add) layer
  mod_xor #(.GAMMA(GAMMA)) u_xe (.clk(clk), .a(y1a), .b(y3a), .s(e));
  mod_xor #(.GAMMA(GAMMA)) u_xf (.clk(clk), .a(y2a), .b(y4a), .s(f));
  idea_mul #(.ALGO(ALGO), .M1(M1), .M2(M2), .M3(M3), .M4(M4), .TREE_MULT(TREE_MULT))
    u_mul5 (.clk(clk), .x(e), .y(k5), .p(g));
  delay_line #(.WIDTH(N), .DEPTH(ALPHA)) u_fifo_f (.clk(clk), .d(f), .q(fd));
  mod_add #(.BETA(BETA)) u_addh (.clk(clk), .a(g), .b(fd), .s(h));
  idea_mul #(.ALGO(ALGO), .M1(M1), .M2(M2), .M3(M3), .M4(M4), .TREE_MULT(TREE_MULT))
    u_mul6 (.clk(clk), .x(h), .y(k6), .p(t1));
  delay_line #(.WIDTH(N), .DEPTH(ALPHA + BETA)) u_dg (.clk(clk), .d(g), .q(gd));
  mod_add #(.BETA(BETA)) u_addt2 (.clk(clk), .a(t1), .b(gd), .s(t2));
  delay_line #(.WIDTH(N), .DEPTH(BETA)) u_dt1 (.clk(clk), .d(t1), .q(t1d));

  // Output layer
  localparam int unsigned YD = 2*ALPHA + 2*BETA + GAMMA;
  delay_line #(.WIDTH(N), .DEPTH(YD)) u_dy1 (.clk(clk), .d(y1a), .q(y1d));
  delay_line #(.WIDTH(N), .DEPTH(YD)) u_dy2 (.clk(clk), .d(y2a), .q(y2d));
  delay_line #(.WIDTH(N), .DEPTH(YD)) u_dy3 (.clk(clk), .d(y3a), .q(y3d));
  delay_line #(.WIDTH(N), .DEPTH(YD)) u_dy4 (.clk(clk), .d(y4a), .q(y4d));

  mod_xor #(.GAMMA(GAMMA)) u_xo1 (.clk(clk), .a(y1d), .b(t1d), .s(y[0]));
  mod_xor #(.GAMMA(GAMMA)) u_xo2 (.clk(clk), .a(y3d), .b(t1d), .s(y[1]));
  mod_xor #(.GAMMA(GAMMA)) u_xo3 (.clk(clk), .a(y2d), .b(t2),  .s(y[2]));
  mod_xor #(.GAMMA(GAMMA)) u_xo4 (.clk(clk), .a(y4d), .b(t2),  .s(y[3]));
endmodule
