// idea_unrolled: fully unrolled IDEA processor, eight rounds followed by
// the output transformation ("8+1 rounds"), for non-feedback modes (ECB,
// counter mode, or d interleaved feedback streams).
//
// A block entering at in_block passes through eight idea_round instances
// and idea_out; every round reads its six subkeys straight from the subkey
// memory, so the subkeys must stay constant while blocks are in flight.
// Control is a single token (a valid bit) that moves in step with each
// block. All inputs and outputs pass through one register (IO_REGS = 1),
// as the I/O flip-flops of the FPGA would. BOUNDARY registers may be placed
// between successive rounds (none in the reference configuration).
//
// Timing: one block per clock cycle; latency 2*IO_REGS +
// 8*round_latency + 7*BOUNDARY + out_latency cycles. With the defaults
// ((n+1)x(n+1) multiplier, m1 = m2 = m3 = 1, beta = gamma = 1) the datapath
// holds 8*13 + 3 = 107 pipeline stages and the latency is 109 cycles.
//
// Interface: key_we/key_addr/key_data write one subkey (see subkey_mem for
// the address map); in_valid/in_block present a block (word 0 first);
// out_valid/out_block deliver the ciphertext (or plaintext, when
// decryption subkeys are loaded). No back-pressure. Synchronous
// active-low reset clears the token pipeline.
module idea_unrolled
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
  parameter int unsigned BOUNDARY  = 0,
  parameter bit          IO_REGS   = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       key_we,
  input  logic [5:0] key_addr,
  input  word_t      key_data,
  input  logic       in_valid,
  input  block_t     in_block,
  output logic       out_valid,
  output block_t     out_block
);
  localparam int unsigned ALPHA    = mul_latency(ALGO, M1, M2, M3, M4);
  localparam int unsigned LR       = round_latency(ALPHA, BETA, GAMMA);
  localparam int unsigned CORE_LAT = ROUNDS*LR + (ROUNDS-1)*BOUNDARY + out_latency(ALPHA, BETA);

  word_t [NSUBKEYS-1:0] keys;
  subkey_mem u_keys (.clk(clk), .we(key_we), .addr(key_addr), .wdata(key_data), .keys(keys));

  // Input registers
  logic   v_in;
  block_t b_in;
  if (IO_REGS) begin : g_in_reg
    always_ff @(posedge clk) begin
      if (!rst_n) v_in <= 1'b0;
      else        v_in <= in_valid;
      b_in <= in_block;
    end
  end else begin : g_in_wire
    assign v_in = in_valid;
    assign b_in = in_block;
  end

  // Datapath: rounds 1..8 and the output transformation
  block_t stage_in [ROUNDS+1];
  assign stage_in[0] = b_in;
  for (genvar r = 0; r < ROUNDS; r++) begin : g_round
    block_t r_out;
    idea_round #(.ALGO(ALGO), .M1(M1), .M2(M2), .M3(M3), .M4(M4), .TREE_MULT(TREE_MULT),
                 .BETA(BETA), .GAMMA(GAMMA), .KEY_ALIGN(1'b0))
      u_round (.clk(clk), .x(stage_in[r]), .k(keys[6*r +: 6]), .y(r_out));
    delay_line #(.WIDTH(4*N), .DEPTH((r < ROUNDS-1) ? BOUNDARY : 0))
      u_boundary (.clk(clk), .d(r_out), .q(stage_in[r+1]));
  end

  block_t c_core;
  idea_out #(.ALGO(ALGO), .M1(M1), .M2(M2), .M3(M3), .M4(M4), .TREE_MULT(TREE_MULT), .BETA(BETA))
    u_out (.clk(clk), .z(stage_in[ROUNDS]), .k(keys[6*ROUNDS +: 4]), .c(c_core));

  // Token (valid) pipeline, in step with the datapath
  logic [CORE_LAT-1:0] tok;
  always_ff @(posedge clk) begin
    if (!rst_n) tok <= '0;
    else        tok <= {tok[CORE_LAT-2:0], v_in};
  end

  // Output registers
  if (IO_REGS) begin : g_out_reg
    always_ff @(posedge clk) begin
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= tok[CORE_LAT-1];
      out_block <= c_core;
    end
  end else begin : g_out_wire
    assign out_valid = tok[CORE_LAT-1];
    assign out_block = c_core;
  end
endmodule
