// idea_top: five IDEA processors generated from the same parametric
// building blocks, side by side, each with its own subkey memory and ports.
// Each is one of the evaluated configurations of the architecture:
//   fast_*  8+1 rounds fully unrolled, (n+1)x(n+1) multiplier operator,
//           m1 = m2 = m3 = 1, beta = gamma = 1: the highest-throughput
//           configuration, one 64-bit block per clock, 109-cycle latency
//           (107 pipeline stages plus the I/O registers).
//   csa_*   8+1 rounds fully unrolled with the carry-save adder operator
//           (m1..m4 = 1), the choice for devices without embedded
//           multipliers; 134-cycle latency.
//   ve_*    8+1 rounds fully unrolled, Low-High operator on the explicit
//           adder-tree 16x16 multiplier with m1 = 2, m2 = m3 = 1 (a
//           four-cycle multiplier for FPGAs without multiplier blocks);
//           134-cycle latency.
//   fb_*    1+1 rounds, combinational round, Low-High operator: the
//           iterative processor for feedback modes such as CBC, one block
//           per 8 cycles (9 cycles from loop entry to result).
//   it4_*   4+1 rounds, pipelined like fast_* (13-cycle rounds): 52 blocks
//           can be in flight in its loop, each making two passes; 55
//           pipeline stages from loop entry to result.
// Every processor has: a subkey write port (*_key_we, *_key_addr,
// *_key_data; address 6*(r-1)+(i-1) for K_i of round r, 48..51 for the
// output round), a block input (*_in_valid, *_in_block, and *_in_ready for
// the iterative ones), and a block output (*_out_valid, *_out_block).
// Blocks are four 16-bit words, word 0 first. One clock, synchronous
// active-low reset. Putting these five side by side is this top's choice.
module idea_top
  import idea_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,

  input  logic       fast_key_we,
  input  logic [5:0] fast_key_addr,
  input  word_t      fast_key_data,
  input  logic       fast_in_valid,
  input  block_t     fast_in_block,
  output logic       fast_out_valid,
  output block_t     fast_out_block,

  input  logic       csa_key_we,
  input  logic [5:0] csa_key_addr,
  input  word_t      csa_key_data,
  input  logic       csa_in_valid,
  input  block_t     csa_in_block,
  output logic       csa_out_valid,
  output block_t     csa_out_block,

  input  logic       ve_key_we,
  input  logic [5:0] ve_key_addr,
  input  word_t      ve_key_data,
  input  logic       ve_in_valid,
  input  block_t     ve_in_block,
  output logic       ve_out_valid,
  output block_t     ve_out_block,

  input  logic       fb_key_we,
  input  logic [5:0] fb_key_addr,
  input  word_t      fb_key_data,
  input  logic       fb_in_valid,
  output logic       fb_in_ready,
  input  block_t     fb_in_block,
  output logic       fb_out_valid,
  output block_t     fb_out_block,

  input  logic       it4_key_we,
  input  logic [5:0] it4_key_addr,
  input  word_t      it4_key_data,
  input  logic       it4_in_valid,
  output logic       it4_in_ready,
  input  block_t     it4_in_block,
  output logic       it4_out_valid,
  output block_t     it4_out_block
);
  idea_unrolled #(.ALGO(ALGO_NP1), .M1(1), .M2(1), .M3(1), .BETA(1), .GAMMA(1))
    u_fast (.clk(clk), .rst_n(rst_n),
            .key_we(fast_key_we), .key_addr(fast_key_addr), .key_data(fast_key_data),
            .in_valid(fast_in_valid), .in_block(fast_in_block),
            .out_valid(fast_out_valid), .out_block(fast_out_block));

  idea_unrolled #(.ALGO(ALGO_CSA), .M1(1), .M2(1), .M3(1), .M4(1), .BETA(1), .GAMMA(1))
    u_csa (.clk(clk), .rst_n(rst_n),
           .key_we(csa_key_we), .key_addr(csa_key_addr), .key_data(csa_key_data),
           .in_valid(csa_in_valid), .in_block(csa_in_block),
           .out_valid(csa_out_valid), .out_block(csa_out_block));

  idea_unrolled #(.ALGO(ALGO_LOW_HIGH), .M1(2), .M2(1), .M3(1), .TREE_MULT(1'b1),
                  .BETA(1), .GAMMA(1))
    u_ve (.clk(clk), .rst_n(rst_n),
          .key_we(ve_key_we), .key_addr(ve_key_addr), .key_data(ve_key_data),
          .in_valid(ve_in_valid), .in_block(ve_in_block),
          .out_valid(ve_out_valid), .out_block(ve_out_block));

  idea_iterative #(.R(1), .ALGO(ALGO_LOW_HIGH), .M1(0), .M2(0), .M3(0), .BETA(0), .GAMMA(0))
    u_fb (.clk(clk), .rst_n(rst_n),
          .key_we(fb_key_we), .key_addr(fb_key_addr), .key_data(fb_key_data),
          .in_valid(fb_in_valid), .in_ready(fb_in_ready), .in_block(fb_in_block),
          .out_valid(fb_out_valid), .out_block(fb_out_block));

  idea_iterative #(.R(4), .ALGO(ALGO_NP1), .M1(1), .M2(1), .M3(1), .BETA(1), .GAMMA(1))
    u_it4 (.clk(clk), .rst_n(rst_n),
           .key_we(it4_key_we), .key_addr(it4_key_addr), .key_data(it4_key_data),
           .in_valid(it4_in_valid), .in_ready(it4_in_ready), .in_block(it4_in_block),
           .out_valid(it4_out_valid), .out_block(it4_out_block));
endmodule
