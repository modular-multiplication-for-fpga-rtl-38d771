// idea_pkg: types, constants and latency helpers shared by the IDEA
// processor. IDEA works on 16-bit words; a 64-bit block is four words and
// a full key schedule holds 52 subkeys (six per round for eight rounds,
// four for the output transformation). The latency helpers compute the
// pipeline depth of the modular multiplier (alpha) and of one round from
// the per-operator register counts, so that every module that has to stay
// in step with a round uses the same numbers.
package idea_pkg;

  localparam int unsigned N        = 16;  // word width n
  localparam int unsigned ROUNDS   = 8;   // full rounds
  localparam int unsigned NSUBKEYS = 52;  // 6*8 + 4

  typedef logic [N-1:0] word_t;
  typedef word_t [3:0]  block_t;          // block_t[0] is the first word X1

  // Modular multiplier selection (the numbering follows the four
  // algorithms: 1 Low-High, 3 (n+1)x(n+1) multiplier, 4 carry-save).
  typedef enum int {
    ALGO_LOW_HIGH = 1,
    ALGO_NP1      = 3,
    ALGO_CSA      = 4
  } mul_algo_e;

  // Token that travels with a block through an iterative processor: valid
  // flag and the index of the pass through the hardware rounds (0..7).
  typedef struct packed {
    logic       valid;
    logic [2:0] pass;
  } token_t;

  function automatic int unsigned imax(int unsigned a, int unsigned b);
    return (a > b) ? a : b;
  endfunction

  // Latency alpha of a multiplier: m1+m2+m3, plus m4 for the carry-save one.
  function automatic int unsigned mul_latency(mul_algo_e algo, int unsigned m1,
                                              int unsigned m2, int unsigned m3,
                                              int unsigned m4);
    return m1 + m2 + m3 + ((algo == ALGO_CSA) ? m4 : 0);
  endfunction

  // Latency of one round: key layer aligned to max(alpha,beta), then the
  // first XOR, two multiplications, two additions and the output XOR.
  function automatic int unsigned round_latency(int unsigned alpha, int unsigned beta,
                                                int unsigned gamma);
    return imax(alpha, beta) + 2*alpha + 2*beta + 2*gamma;
  endfunction

  // Latency of the output transformation.
  function automatic int unsigned out_latency(int unsigned alpha, int unsigned beta);
    return imax(alpha, beta);
  endfunction

endpackage
