// idea_mul: the IDEA operation x (.) y, multiplication modulo 2^16+1 with
// the word 0 standing for 2^16, built with the operator chosen by ALGO:
//   ALGO_LOW_HIGH  Low-High algorithm (mul_lowhigh), pipeline M1, M2, M3
//   ALGO_NP1       17x17 multiplier with modulo correction (mul_np1)
//   ALGO_CSA       modulo carry-save adders (mul_csa), pipeline M1..M4
// Latency alpha = mul_latency(ALGO, M1, M2, M3, M4) cycles, one operand pair
// per cycle. The defaults give the operator of the fastest processor: the
// (n+1)x(n+1) multiplier with one register at each of its three points.
module idea_mul
  import idea_pkg::*;
#(
  parameter mul_algo_e   ALGO      = ALGO_NP1,
  parameter int unsigned M1        = 1,
  parameter int unsigned M2        = 1,
  parameter int unsigned M3        = 1,
  parameter int unsigned M4        = 1,
  parameter bit          TREE_MULT = 1'b0
) (
  input  logic  clk,
  input  word_t x,
  input  word_t y,
  output word_t p
);
  if (ALGO == ALGO_LOW_HIGH) begin : g_lh
    mul_lowhigh #(.M1(M1), .M2(M2), .M3(M3), .TREE_MULT(TREE_MULT))
      u_mul (.clk(clk), .x(x), .y(y), .p(p));
  end else if (ALGO == ALGO_CSA) begin : g_csa
    mul_csa #(.M1(M1), .M2(M2), .M3(M3), .M4(M4))
      u_mul (.clk(clk), .x(x), .y(y), .p(p));
  end else begin : g_np1
    mul_np1 #(.M1(M1), .M2(M2), .M3(M3))
      u_mul (.clk(clk), .x(x), .y(y), .p(p));
  end
endmodule
