// tb_idea_unrolled: end-to-end testbench for idea_unrolled at its default
// parameters (the 8+1 processor with the (n+1)x(n+1) operator, latency 109)
// and at a second setting (Low-High operator, one multiplier register,
// beta = 0, boundary registers between rounds, no I/O registers: latency
// 8*5 + 7 + 1 = 48), plus the Low-High operator at the default pipeline
// settings (latency 109, the same as the default). tb_proc_agent drives each one through the published
// test vector, a stream of random blocks with idle cycles, CBC chaining and
// decryption, checking data and latency.
module tb_idea_unrolled;
  import idea_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, start;
  int checks, failures;

  logic       we_a, we_b, iv_a, iv_b, ov_a, ov_b, done_a, done_b;
  logic [5:0] ka_a, ka_b;
  word_t      kd_a, kd_b;
  block_t     ib_a, ib_b, ob_a, ob_b;
  logic       we_c, iv_c, ov_c, done_c;
  logic [5:0] ka_c;
  word_t      kd_c;
  block_t     ib_c, ob_c;
  int c_c, f_c, r_c, m_c, cb_c, d_c;
  int c_a, f_a, r_a, m_a, cb_a, d_a, c_b, f_b, r_b, m_b, cb_b, d_b;

  idea_unrolled u_a (.clk(clk), .rst_n(rst_n), .key_we(we_a), .key_addr(ka_a), .key_data(kd_a),
                     .in_valid(iv_a), .in_block(ib_a), .out_valid(ov_a), .out_block(ob_a));
  idea_unrolled #(.ALGO(ALGO_LOW_HIGH), .M1(1), .M2(0), .M3(0), .BETA(0), .GAMMA(1),
                  .BOUNDARY(1), .IO_REGS(1'b0))
    u_b (.clk(clk), .rst_n(rst_n), .key_we(we_b), .key_addr(ka_b), .key_data(kd_b),
         .in_valid(iv_b), .in_block(ib_b), .out_valid(ov_b), .out_block(ob_b));

  idea_unrolled #(.ALGO(ALGO_LOW_HIGH))
    u_c (.clk(clk), .rst_n(rst_n), .key_we(we_c), .key_addr(ka_c), .key_data(kd_c),
         .in_valid(iv_c), .in_block(ib_c), .out_valid(ov_c), .out_block(ob_c));
  tb_proc_agent #(.ITER(1'b0), .LAT(109)) g_c (
    .clk(clk), .start(start), .done(done_c), .key_we(we_c), .key_addr(ka_c), .key_data(kd_c),
    .in_valid(iv_c), .in_ready(1'b1), .in_block(ib_c), .out_valid(ov_c), .out_block(ob_c),
    .checks(c_c), .failures(f_c), .refusals(r_c), .multipass(m_c), .cbc_blocks(cb_c), .decrypted(d_c));

  tb_proc_agent #(.ITER(1'b0), .LAT(109)) g_a (
    .clk(clk), .start(start), .done(done_a), .key_we(we_a), .key_addr(ka_a), .key_data(kd_a),
    .in_valid(iv_a), .in_ready(1'b1), .in_block(ib_a), .out_valid(ov_a), .out_block(ob_a),
    .checks(c_a), .failures(f_a), .refusals(r_a), .multipass(m_a), .cbc_blocks(cb_a), .decrypted(d_a));
  tb_proc_agent #(.ITER(1'b0), .LAT(48)) g_b (
    .clk(clk), .start(start), .done(done_b), .key_we(we_b), .key_addr(ka_b), .key_data(kd_b),
    .in_valid(iv_b), .in_ready(1'b1), .in_block(ib_b), .out_valid(ov_b), .out_block(ob_b),
    .checks(c_b), .failures(f_b), .refusals(r_b), .multipass(m_b), .cbc_blocks(cb_b), .decrypted(d_b));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c_a + c_b + c_c, f_a + f_b + f_c + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1; start = 1'b1;
    wait (done_a && done_b && done_c);
    checks = c_a + c_b + c_c;
    failures = f_a + f_b + f_c;
    if (cb_a == 0 || d_a == 0 || cb_b == 0 || d_b == 0 || cb_c == 0 || d_c == 0) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    $display("cbc=%0d/%0d decrypted=%0d/%0d", cb_a, cb_b, d_a, d_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
