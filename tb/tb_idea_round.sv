// tb_idea_round: self-checking testbench for idea_round. Three instances
// get the same stream of random blocks, one per cycle:
//   u_d  default operators (latency 13), subkeys held constant;
//   u_a  carry-save multiplier, beta = 0, gamma = 1, KEY_ALIGN = 1, with
//        a fresh set of six subkeys every cycle (latency 14);
//   u_c  fully combinational Low-High round (latency 0).
// Each output is compared, exactly at the round latency, with the textbook
// round of the reference model.
module tb_idea_round;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  localparam int NV = 3000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  block_t x, y_d, y_a, y_c;
  word_t [5:0] kc, kv;
  block_t hx [NV];
  word_t [5:0] hk [NV];

  idea_round u_d (.clk(clk), .x(x), .k(kc), .y(y_d));
  idea_round #(.ALGO(ALGO_CSA), .BETA(0), .GAMMA(1), .KEY_ALIGN(1'b1))
    u_a (.clk(clk), .x(x), .k(kv), .y(y_a));
  idea_round #(.ALGO(ALGO_LOW_HIGH), .M1(0), .M2(0), .M3(0), .BETA(0), .GAMMA(0))
    u_c (.clk(clk), .x(x), .k(kc), .y(y_c));

  task automatic check(block_t got, block_t exp, string who);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s: got %h exp %h", who, got, exp);
    end
  endtask

  function automatic block_t rr(block_t b, word_t [5:0] k);
    return ref_round(b, k[0], k[1], k[2], k[3], k[4], k[5]);
  endfunction

  initial begin : watchdog
    repeat (NV + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) kc[i] = word_t'($urandom);
    kc[0] = '0;                               // exercise the 2^16 operand
    for (int i = 0; i < NV; i++) begin
      @(negedge clk);
      x = rand_block();
      if (i % 5 == 0) x[0] = '0;
      if (i % 9 == 0) x[3] = '0;
      for (int j = 0; j < 6; j++) kv[j] = word_t'($urandom);
      if (i % 4 == 1) kv[4] = '0;
      if (i % 6 == 2) kv[5] = '0;
      hx[i] = x; hk[i] = kv;
      #1;
      if (i >= 13) check(y_d, rr(hx[i-13], kc), "default");
      if (i >= 14) check(y_a, rr(hx[i-14], hk[i-14]), "key-aligned");
      check(y_c, rr(hx[i], kc), "combinational");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
