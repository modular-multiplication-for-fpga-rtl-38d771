// tb_token_ctrl: self-checking testbench for token_ctrl (loop of DEPTH = 3,
// PASSES = 4, and DEPTH = 1, PASSES = 8). A random new_valid stream is
// applied. The expected behaviour is derived from the arrival times alone:
// a block accepted at cycle t sits at the loop end at t + k*DEPTH with pass
// k-1, so it must finish exactly at t + PASSES*DEPTH, and a new block must
// be accepted at cycle c exactly when new_valid is high and no block
// accepted at c - k*DEPTH (k = 1..PASSES-1) still occupies the slot. The
// pass number seen at the loop entry for a recirculating block is checked
// too. Refusals (back-pressure) must occur.
module tb_token_ctrl;
  import idea_pkg::*;

  localparam int NC = 4000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int refusals = 0;

  logic rst_n, nv_a, nv_b;
  logic acc_a, fin_a, acc_b, fin_b;
  token_t tok_a [4];
  token_t tok_b [2];
  bit hist_a [NC], hist_b [NC];

  token_ctrl #(.DEPTH(3), .PASSES(4)) u_a (.clk(clk), .rst_n(rst_n), .new_valid(nv_a),
                                           .accept(acc_a), .finish(fin_a), .tok(tok_a));
  token_ctrl #(.DEPTH(1), .PASSES(8)) u_b (.clk(clk), .rst_n(rst_n), .new_valid(nv_b),
                                           .accept(acc_b), .finish(fin_b), .tok(tok_b));

  task automatic expect_bit(logic got, logic exp, string who, int c);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s at cycle %0d: got %b exp %b", who, c, got, exp);
    end
  endtask

  // Checks one instance at cycle c; hist holds its past accepts.
  task automatic check_inst(ref bit hist [NC], input int c, input int depth, input int passes,
                            input logic nv, input logic acc, input logic fin,
                            input token_t entry, input string who);
    bit occupied, finishing;
    int pass_at_tail;
    occupied = 0; finishing = 0; pass_at_tail = 0;
    for (int k = 1; k <= passes; k++) begin
      if (c - k*depth >= 0 && hist[c - k*depth]) begin
        if (k == passes) finishing = 1;
        else begin occupied = 1; pass_at_tail = k - 1; end
      end
    end
    expect_bit(fin, finishing, {who, " finish"}, c);
    expect_bit(acc, nv && !occupied, {who, " accept"}, c);
    if (nv && occupied) refusals++;
    if (occupied) begin
      checks++;
      if (!(entry.valid && int'(entry.pass) == pass_at_tail + 1)) begin
        failures++;
        if (failures < 10) $display("MISMATCH %s entry token at cycle %0d", who, c);
      end
    end
    hist[c] = acc;
  endtask

  initial begin : watchdog
    repeat (NC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; nv_a = 1'b0; nv_b = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NC; c++) begin
      nv_a = ($urandom_range(0, 3) != 0);
      nv_b = ($urandom_range(0, 9) == 0) || (c > NC/2);
      #1;
      check_inst(hist_a, c, 3, 4, nv_a, acc_a, fin_a, tok_a[0], "A");
      check_inst(hist_b, c, 1, 8, nv_b, acc_b, fin_b, tok_b[0], "B");
      @(negedge clk);
    end
    if (refusals == 0) begin
      failures++;
      $display("no back-pressure seen");
    end
    $display("refusals=%0d", refusals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
