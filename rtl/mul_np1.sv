// mul_np1: IDEA multiplication modulo 2^16+1 built on one (n+1)x(n+1)
// unsigned multiplier followed by a modulo correction.
//
// How it works: a zero operand stands for 2^16, so each operand is widened
// to 17 bits as {x==0, x}; this is the "=0" detector feeding the top bit of
// the multiplier. The 33-bit product P = 2^n*D + M is then reduced with
// 2^n = -1 and 2^2n = 1 (mod 2^n+1):
//   s, c  = M + ~D[15:0] + 1     (n-bit sum s, carry out c)
//   cin   = ~(c ^ D[16])         (the "not xor" gate)
//   x.y   = (s + cin) mod 2^n
// which covers 0*0 = 1, 0*1 = 1*0 = 0 and the 2^n -> 0 encoding without a
// special-case multiplexer.
//
// Timing: M1 registers after the multiplier (a synthesis tool may retime
// them into it; 0..3, or 0..1 when an embedded 18x18 block is used), M2
// after the first adder, M3 after the final adder. Latency alpha =
// M1+M2+M3 cycles, one new operand pair every cycle. The defaults (1,1,1)
// are the setting of the fastest processor. The structure and the pipeline
// points follow the reference design; the register placement within the M1
// group is this implementation's choice (all at the multiplier output).
module mul_np1
  import idea_pkg::*;
#(
  parameter int unsigned M1 = 1,
  parameter int unsigned M2 = 1,
  parameter int unsigned M3 = 1
) (
  input  logic  clk,
  input  word_t x,
  input  word_t y,
  output word_t p
);
  logic [N:0]     xt, yt;        // 17-bit operands, 0 replaced by 2^16
  logic [2*N:0]   prod, prod_q;  // 33-bit product
  logic [N:0]     sum1;          // {carry, M + ~D + 1}
  logic           cin;
  logic [N:0]     st2, st2_q;    // {cin, s}
  word_t          res;

  assign xt   = {(x == '0), x};
  assign yt   = {(y == '0), y};
  assign prod = xt * yt;

  delay_line #(.WIDTH(2*N+1), .DEPTH(M1)) u_m1 (.clk(clk), .d(prod), .q(prod_q));

  assign sum1 = {1'b0, prod_q[N-1:0]} + {1'b0, ~prod_q[2*N-1:N]} + (N+1)'(1);
  assign cin  = ~(sum1[N] ^ prod_q[2*N]);
  assign st2  = {cin, sum1[N-1:0]};

  delay_line #(.WIDTH(N+1), .DEPTH(M2)) u_m2 (.clk(clk), .d(st2), .q(st2_q));

  assign res = st2_q[N-1:0] + word_t'(st2_q[N]);

  delay_line #(.WIDTH(N), .DEPTH(M3)) u_m3 (.clk(clk), .d(res), .q(p));
endmodule
