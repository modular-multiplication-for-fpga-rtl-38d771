// token_ctrl: control unit of an iterative IDEA processor. Every block in
// the loop carries a token: a valid flag and the number of the pass it is
// making through the hardware rounds. The tokens move through a shift
// register as long as the data loop (DEPTH registers), so the token at
// position i always describes the data i cycles after the loop entry; the
// processor reads the pass number at each round's entry to select that
// round's subkeys.
//
// At the loop end a token either goes round again (pass + 1), or, on its
// last pass (PASSES-1), leaves for the output transformation (`finish`).
// The slot it frees, or an empty slot, is offered to a new block: `accept`
// is high when `new_valid` is high and the slot is free, and the entry
// multiplexer then takes the new block with pass 0.
// Timing: tok[0] is the combinational entry token, tok[i] (1..DEPTH) the
// registered one i cycles later. Synchronous active-low reset empties the
// loop. The token idea follows the reference design; its encoding and the
// accept rule are this design's choice.
module token_ctrl
  import idea_pkg::*;
#(
  parameter int unsigned DEPTH  = 1,
  parameter int unsigned PASSES = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   new_valid,
  output logic   accept,
  output logic   finish,
  output token_t tok [DEPTH+1]
);
  token_t ring [DEPTH];
  token_t tail;
  logic   free;

  if (PASSES < 1 || PASSES > 8) begin : g_bad_passes
    $error("token_ctrl: PASSES must be 1..8");
  end

  assign tail   = ring[DEPTH-1];
  assign finish = tail.valid && (int'(tail.pass) == PASSES - 1);
  assign free   = !tail.valid || finish;
  assign accept = free && new_valid;

  always_comb begin
    if (accept)     tok[0] = '{valid: 1'b1, pass: 3'd0};
    else if (free)  tok[0] = '{valid: 1'b0, pass: 3'd0};
    else            tok[0] = '{valid: 1'b1, pass: tail.pass + 3'd1};
    for (int i = 1; i <= DEPTH; i++) tok[i] = ring[i-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) ring[i] <= '{valid: 1'b0, pass: 3'd0};
    end else begin
      ring[0] <= tok[0];
      for (int i = 1; i < DEPTH; i++) ring[i] <= ring[i-1];
    end
  end

  // A block on its last pass always leaves: the entry never sees a pass
  // number beyond PASSES-1.
  a_pass_range: assert property (@(posedge clk) disable iff (!rst_n)
    tok[0].valid |-> int'(tok[0].pass) < PASSES);
endmodule
