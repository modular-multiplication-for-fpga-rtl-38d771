// mul_csa: IDEA multiplication modulo 2^16+1 with modulo-reduced partial
// products and modulo carry-save adders (Zimmermann's scheme), for FPGAs
// without embedded multipliers.
//
// How it works. Since y*2^i = (y rotated left by i, wrapped bits inverted)
// - (2^i - 1) modulo 2^n+1, each partial product is
//   PP_i = x_i ? {y[n-1-i:0], ~y[n-1:n-i]} : (2^i - 1)
// and xy = n + 2 + sum(PP_i) mod 2^n+1. The 16 partial products and the
// constant 2 are reduced to two words by 15 modulo carry-save adders. Each
// one is an ordinary 3:2 counter whose carry out of bit n-1 is inverted
// and fed back into bit 0 (2^n = -1), which adds 1 to the sum. The final
// modulo adder adds one more: (a + b + 1) mod 2^n+1 = (a + b + ~cout)
// mod 2^n, computed as two adders (with and without the +1) and a
// multiplexer driven by the carry out of a + b. In total n ones are added,
// which supplies the constant n of the formula.
// A zero operand (2^n) is handled by the 2^n correction unit, whose pair
// (C*, S*) = (~y, 1) if x = 0, (~x, 1) if y = 0, (0, 0) if both are zero
// replaces the carry-save result in front of the final adder.
//
// Timing: M1 after the partial product generator, M2 after the carry-save
// adders, M3 after the multiplexers, M4 after the final adder (each 0 or 1
// in the reference design). Latency alpha = M1+M2+M3+M4, one operand pair
// per cycle. The order of the carry-save adders (a balanced tree built by
// taking operands three at a time in arrival order) is this
// implementation's choice.
module mul_csa
  import idea_pkg::*;
#(
  parameter int unsigned M1 = 1,
  parameter int unsigned M2 = 1,
  parameter int unsigned M3 = 1,
  parameter int unsigned M4 = 1
) (
  input  logic  clk,
  input  word_t x,
  input  word_t y,
  output word_t p
);
  localparam int unsigned NOPS = N + 1;          // 16 partial products + constant 2
  localparam int unsigned NCSA = NOPS - 2;       // 15 carry-save adders
  localparam int unsigned NSLOT = NOPS + 2*NCSA; // operand queue length

  // Partial products and correction ------------------------------------
  word_t pp [N];
  word_t pp_q [N];
  logic  zx, zy;
  logic [2*N:0] corr, corr_q, corr_q2;   // {sel, C*, S*}
  word_t c_star, s_star;

  for (genvar i = 0; i < N; i++) begin : g_ppg
    word_t rot;
    if (i == 0) begin : g_r0
      assign rot = y;
    end else begin : g_ri
      assign rot = {y[N-1-i:0], ~y[N-1:N-i]};
    end
    assign pp[i] = x[i] ? rot : word_t'((1 << i) - 1);
    delay_line #(.WIDTH(N), .DEPTH(M1)) u_m1 (.clk(clk), .d(pp[i]), .q(pp_q[i]));
  end

  assign zx = (x == '0);
  assign zy = (y == '0);
  always_comb begin
    if (zx && zy)  begin c_star = '0; s_star = '0; end
    else if (zx)   begin c_star = ~y; s_star = word_t'(1); end
    else           begin c_star = ~x; s_star = word_t'(1); end
  end
  assign corr = {(zx | zy), c_star, s_star};

  delay_line #(.WIDTH(2*N+1), .DEPTH(M1)) u_m1c (.clk(clk), .d(corr), .q(corr_q));
  delay_line #(.WIDTH(2*N+1), .DEPTH(M2)) u_m2c (.clk(clk), .d(corr_q), .q(corr_q2));

  // Modulo 2^n+1 carry-save adder tree ----------------------------------
  word_t ops [NSLOT];
  always_comb begin
    for (int i = 0; i < N; i++) ops[i] = pp_q[i];
    ops[N] = word_t'(2);
    for (int k = 0; k < NCSA; k++) begin
      word_t a, b, c, cy;
      a  = ops[3*k];
      b  = ops[3*k+1];
      c  = ops[3*k+2];
      cy = (a & b) | (a & c) | (b & c);
      ops[NOPS+2*k]   = a ^ b ^ c;
      ops[NOPS+2*k+1] = {cy[N-2:0], ~cy[N-1]};   // end-around inverted carry
    end
  end

  logic [2*N-1:0] sc, sc_q;   // {S, C}
  assign sc = {ops[NSLOT-2], ops[NSLOT-1]};
  delay_line #(.WIDTH(2*N), .DEPTH(M2)) u_m2 (.clk(clk), .d(sc), .q(sc_q));

  // Correction multiplexers ----------------------------------------------
  logic [2*N-1:0] ab, ab_q;
  assign ab = corr_q2[2*N] ? {corr_q2[N-1:0], corr_q2[2*N-1:N]} : sc_q;
  delay_line #(.WIDTH(2*N), .DEPTH(M3)) u_m3 (.clk(clk), .d(ab), .q(ab_q));

  // Final modulo 2^n+1 adder ---------------------------------------------
  logic [N:0] sum0;
  word_t      sum1, res;
  assign sum0 = {1'b0, ab_q[2*N-1:N]} + {1'b0, ab_q[N-1:0]};
  assign sum1 = ab_q[2*N-1:N] + ab_q[N-1:0] + word_t'(1);
  assign res  = sum0[N] ? sum0[N-1:0] : sum1;

  delay_line #(.WIDTH(N), .DEPTH(M4)) u_m4 (.clk(clk), .d(res), .q(p));
endmodule
