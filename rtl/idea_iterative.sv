// idea_iterative: iterative IDEA processor with R hardware rounds (R = 1, 2
// or 4, the "1+1", "2+1" and "4+1" architectures) and one output
// transformation.
//
// A multiplexer at the loop entry takes either a new block or the block
// coming back from the loop end. The block passes through the R rounds
// (with BOUNDARY registers between them) and, when the rounds end without a
// register (GAMMA = 0), through one loop register; it then goes round again
// until it has made 8/R passes, and on the last one it is handed to the
// output transformation instead. Each block carries a token (token_ctrl)
// with its pass number; at each round entry the token selects that round's
// six subkeys, round index pass*R + j, from the subkey memory, and the
// round delays K5/K6 along with the data. Pipelined rounds therefore hold
// as many independent blocks as the loop has registers.
//
// Timing: with combinational rounds (the defaults, alpha = beta = gamma = 0)
// a block is accepted every 8 cycles when the blocks are independent, and
// its result is registered 9 cycles after it entered the loop, which is the
// pace of a feedback mode such as CBC. Loop depth DEPTH = R*round_latency +
// (R-1)*BOUNDARY + (GAMMA == 0); output latency out_latency + IO register.
// The defaults are the 1+1 feedback-mode configuration with the Low-High
// multiplier.
//
// Interface: subkey write port as in subkey_mem; in_valid/in_ready
// handshake (a block is taken when both are high); out_valid/out_block
// for one cycle per finished block, no back-pressure. IO_REGS = 1 puts a
// register on the input (with its own valid) and on the output. Synchronous
// active-low reset.
module idea_iterative
  import idea_pkg::*;
#(
  parameter int unsigned R         = 1,
  parameter mul_algo_e   ALGO      = ALGO_LOW_HIGH,
  parameter int unsigned M1        = 0,
  parameter int unsigned M2        = 0,
  parameter int unsigned M3        = 0,
  parameter int unsigned M4        = 0,
  parameter bit          TREE_MULT = 1'b0,
  parameter int unsigned BETA      = 0,
  parameter int unsigned GAMMA     = 0,
  parameter int unsigned BOUNDARY  = 0,
  parameter bit          IO_REGS   = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       key_we,
  input  logic [5:0] key_addr,
  input  word_t      key_data,
  input  logic       in_valid,
  output logic       in_ready,
  input  block_t     in_block,
  output logic       out_valid,
  output block_t     out_block
);
  localparam int unsigned ALPHA    = mul_latency(ALGO, M1, M2, M3, M4);
  localparam int unsigned LR       = round_latency(ALPHA, BETA, GAMMA);
  localparam int unsigned STEP     = LR + BOUNDARY;             // round-to-round distance
  localparam int unsigned LOOP_REG = (GAMMA == 0) ? 1 : 0;
  localparam int unsigned DEPTH    = R*LR + (R-1)*BOUNDARY + LOOP_REG;
  localparam int unsigned PASSES   = ROUNDS / R;
  localparam int unsigned OLAT     = out_latency(ALPHA, BETA);

  if (R != 1 && R != 2 && R != 4) begin : g_bad_r
    $error("idea_iterative: R must be 1, 2 or 4");
  end

  word_t [NSUBKEYS-1:0] keys;
  subkey_mem u_keys (.clk(clk), .we(key_we), .addr(key_addr), .wdata(key_data), .keys(keys));

  // Input register with handshake
  logic   q_valid, accept, finish;
  block_t q_block;
  if (IO_REGS) begin : g_in_reg
    assign in_ready = !q_valid || accept;
    always_ff @(posedge clk) begin
      if (!rst_n) q_valid <= 1'b0;
      else if (in_ready) q_valid <= in_valid;
      if (in_ready) q_block <= in_block;
    end
  end else begin : g_in_wire
    assign q_valid  = in_valid;
    assign q_block  = in_block;
    assign in_ready = accept;
  end

  // Control unit
  token_t tok [DEPTH+1];
  token_ctrl #(.DEPTH(DEPTH), .PASSES(PASSES)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .new_valid(q_valid),
    .accept(accept), .finish(finish), .tok(tok));

  // Loop datapath
  block_t loop_end;
  block_t stage_in [R+1];
  assign stage_in[0] = accept ? q_block : loop_end;

  for (genvar j = 0; j < R; j++) begin : g_round
    block_t      r_out;
    word_t [5:0] rk;
    logic [5:0]  kbase;                       // 6 * (pass*R + j)
    assign kbase = 6'(6 * (int'(tok[j*STEP].pass) * R + j));
    always_comb begin
      for (int i = 0; i < 6; i++) rk[i] = keys[kbase + 6'(i)];
    end
    idea_round #(.ALGO(ALGO), .M1(M1), .M2(M2), .M3(M3), .M4(M4), .TREE_MULT(TREE_MULT),
                 .BETA(BETA), .GAMMA(GAMMA), .KEY_ALIGN(1'b1))
      u_round (.clk(clk), .x(stage_in[j]), .k(rk), .y(r_out));
    delay_line #(.WIDTH(4*N), .DEPTH((j < R-1) ? BOUNDARY : LOOP_REG))
      u_boundary (.clk(clk), .d(r_out), .q(stage_in[j+1]));
  end
  assign loop_end = stage_in[R];

  // Output transformation and its valid pipeline
  block_t c_core;
  idea_out #(.ALGO(ALGO), .M1(M1), .M2(M2), .M3(M3), .M4(M4), .TREE_MULT(TREE_MULT), .BETA(BETA))
    u_out (.clk(clk), .z(loop_end), .k(keys[6*ROUNDS +: 4]), .c(c_core));

  logic [OLAT:0] ovalid;
  assign ovalid[0] = finish;
  for (genvar i = 1; i <= OLAT; i++) begin : g_ov
    always_ff @(posedge clk) begin
      if (!rst_n) ovalid[i] <= 1'b0;
      else        ovalid[i] <= ovalid[i-1];
    end
  end

  if (IO_REGS) begin : g_out_reg
    always_ff @(posedge clk) begin
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= ovalid[OLAT];
      out_block <= c_core;
    end
  end else begin : g_out_wire
    assign out_valid = ovalid[OLAT];
    assign out_block = c_core;
  end
endmodule
