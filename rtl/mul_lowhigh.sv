// mul_lowhigh: IDEA multiplication modulo 2^16+1 with the Low-High
// algorithm. For non-zero operands the 32-bit product is split into its low
// half c_L = xy mod 2^n and high half c_H = xy div 2^n, and
//   x.y = (c_L - c_H + [c_H > c_L]) mod 2^n.
// A zero operand (standing for 2^16) is handled by a multiplexer that
// replaces (c_L, c_H) with ((1 - y) mod 2^n, 0) when x = 0 and
// ((1 - x) mod 2^n, 0) when y = 0; two n-bit subtracters compute these next
// to the multiplier. After the multiplexer come a modulo 2^n subtracter and
// a comparator, then a modulo 2^n adder that adds the comparator bit.
//
// Timing: M1 registers after the multiplier and the two subtracters, M2
// after the subtracter/comparator, M3 after the final adder: latency alpha
// = M1+M2+M3, one operand pair per cycle. With TREE_MULT = 1 the 16x16
// product comes from the explicit adder tree (umul_tree) and the M1 stages
// are placed between its levels instead of after it; this option is this
// implementation's way of offering the hand-built multiplier, the default
// uses the plain "*" that a tool maps onto an embedded multiplier.
module mul_lowhigh
  import idea_pkg::*;
#(
  parameter int unsigned M1        = 1,
  parameter int unsigned M2        = 1,
  parameter int unsigned M3        = 1,
  parameter bit          TREE_MULT = 1'b0
) (
  input  logic  clk,
  input  word_t x,
  input  word_t y,
  output word_t p
);
  logic [2*N-1:0] prod_q;
  word_t          one_m_x, one_m_y;
  logic [2*N+1:0] side, side_q;     // {x==0, y==0, 1-x, 1-y}
  word_t          c_l, c_h, diff, res;
  logic           gt;
  logic [N:0]     st2, st2_q;       // {gt, diff}

  if (TREE_MULT) begin : g_tree
    umul_tree #(.N(N), .STAGES(M1)) u_mul (.clk(clk), .x(x), .y(y), .p(prod_q));
  end else begin : g_star
    logic [2*N-1:0] prod;
    assign prod = x * y;
    delay_line #(.WIDTH(2*N), .DEPTH(M1)) u_m1p (.clk(clk), .d(prod), .q(prod_q));
  end

  assign one_m_x = word_t'(1) - x;
  assign one_m_y = word_t'(1) - y;
  assign side    = {(x == '0), (y == '0), one_m_x, one_m_y};

  delay_line #(.WIDTH(2*N+2), .DEPTH(M1)) u_m1s (.clk(clk), .d(side), .q(side_q));

  // Operand multiplexer: y == 0 takes precedence (it also covers x = y = 0).
  always_comb begin
    if (side_q[2*N]) begin            // y == 0
      c_l = side_q[2*N-1:N];          // (1 - x) mod 2^n
      c_h = '0;
    end else if (side_q[2*N+1]) begin // x == 0, y != 0
      c_l = side_q[N-1:0];            // (1 - y) mod 2^n
      c_h = '0;
    end else begin
      c_l = prod_q[N-1:0];
      c_h = prod_q[2*N-1:N];
    end
  end

  assign diff = c_l - c_h;
  assign gt   = (c_h > c_l);
  assign st2  = {gt, diff};

  delay_line #(.WIDTH(N+1), .DEPTH(M2)) u_m2 (.clk(clk), .d(st2), .q(st2_q));

  assign res = st2_q[N-1:0] + word_t'(st2_q[N]);

  delay_line #(.WIDTH(N), .DEPTH(M3)) u_m3 (.clk(clk), .d(res), .q(p));
endmodule
