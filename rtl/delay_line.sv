// delay_line: a chain of DEPTH registers of WIDTH bits. These are the
// synchronisation registers that keep the operands of an IDEA round in step
// when the operators are pipelined (the boxes marked with a latency, and the
// "FIFO" of depth alpha, in the round diagram). DEPTH = 0 gives a plain wire.
// No reset: the contents are data, and the valid information travels in a
// separate token pipeline.
module delay_line #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
    assign q = stage[DEPTH-1];
  end
endmodule
