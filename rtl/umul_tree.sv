// umul_tree: unsigned N x N multiplier written out as a binary tree of
// carry-propagate adders, so that the synthesis tool does not choose the
// structure. Level 0 holds the partial products P_i = x_i * y. Level l adds
// pairs of level l-1 terms, the odd one shifted left by 2^(l-1):
//   T(l,j) = 2^(2^(l-1)) * T(l-1,2j+1) + T(l-1,2j)
// Each level-l term fits in N + 2^l bits (two N-bit partial products give
// an (N+2)-bit sum, four give N+4 bits, and so on), and the adders are sized
// to exactly that width. After log2(N) levels the single term is the
// 2N-bit product.
//
// Timing: STAGES pipeline registers (0 .. log2(N)-1) are placed between
// adder levels, spread evenly: one stage sits after the middle level, three
// stages after every level but the last. Latency STAGES cycles, one new
// operand pair per cycle. N must be a power of two.
module umul_tree #(
  parameter int unsigned N      = 16,
  parameter int unsigned STAGES = 0
) (
  input  logic           clk,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  localparam int unsigned LEVELS = $clog2(N);

  if ((1 << LEVELS) != N) begin : g_bad_n
    $error("umul_tree: N must be a power of two");
  end
  if (STAGES >= LEVELS) begin : g_bad_stages
    $error("umul_tree: STAGES must be below log2(N)");
  end

  // Register after level l when the even spread of STAGES+1 segments over
  // LEVELS levels puts a boundary there.
  function automatic bit reg_after(int unsigned l);
    return ((l * (STAGES + 1)) / LEVELS) != (((l - 1) * (STAGES + 1)) / LEVELS);
  endfunction

  typedef logic [2*N-1:0] term_t;

  term_t pp [N];
  for (genvar i = 0; i < N; i++) begin : g_pp
    assign pp[i] = x[i] ? term_t'(y) : '0;
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned W     = N + (1 << l);        // width of a level-l term
    localparam int unsigned SHIFT = 1 << (l - 1);
    localparam int unsigned CNT   = N >> l;
    term_t t [CNT];                                     // level-l terms (after any register)
    for (genvar j = 0; j < CNT; j++) begin : g_add
      term_t hi, lo;
      logic [W-1:0] s;
      if (l == 1) begin : g_from_pp
        assign hi = pp[2*j+1];
        assign lo = pp[2*j];
      end else begin : g_from_lvl
        assign hi = g_lvl[l-1].t[2*j+1];
        assign lo = g_lvl[l-1].t[2*j];
      end
      assign s = W'(hi << SHIFT) + W'(lo);
      if (l < LEVELS && reg_after(l)) begin : g_reg
        always_ff @(posedge clk) t[j] <= term_t'(s);
      end else begin : g_comb
        assign t[j] = term_t'(s);
      end
    end
  end

  assign p = g_lvl[LEVELS].t[0];
endmodule
