// tb_idea_iterative: end-to-end testbench for idea_iterative in three
// configurations, each driven by tb_proc_agent (test vector, stream, CBC
// chaining, decryption):
//   u_a  defaults: 1+1 rounds, combinational Low-High round, I/O registers.
//        A stream is accepted every 8 cycles; a single block needs 10
//        cycles from handshake to result (input register, 8 passes, output
//        register), i.e. 9 from loop entry.
//   u_b  4+1 rounds, alpha = 4 (Low-High on the adder-tree multiplier),
//        beta = gamma = 1: 64-slot loop, 2 passes; latency 1+128+4+1 = 134.
//        The stream overfills the loop, so blocks are refused for a while.
//   u_c  2+1 rounds, (n+1)x(n+1) operator with one register, boundary
//        register, loop register, no I/O registers: 8-slot loop, 4 passes,
//        latency 32 + 1 = 33.
//   u_d  2+1 rounds, combinational Low-High rounds (alpha = beta = gamma =
//        0) with I/O registers: a stream is accepted every 4 cycles, a
//        single block takes 1 + 4 + 1 = 6 cycles.
// The test fails if no block was refused by u_b or no block went round the
// loop more than once.
module tb_idea_iterative;
  import idea_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, start;
  int checks, failures;

  logic       we [4], iv [4], ir [4], ov [4], dn [4];
  logic [5:0] ka [4];
  word_t      kd [4];
  block_t     ib [4], ob [4];
  int c [4], f [4], r [4], m [4], cb [4], d [4];

  idea_iterative u_a (.clk(clk), .rst_n(rst_n), .key_we(we[0]), .key_addr(ka[0]), .key_data(kd[0]),
                      .in_valid(iv[0]), .in_ready(ir[0]), .in_block(ib[0]),
                      .out_valid(ov[0]), .out_block(ob[0]));
  idea_iterative #(.R(4), .ALGO(ALGO_LOW_HIGH), .M1(2), .M2(1), .M3(1), .TREE_MULT(1'b1),
                   .BETA(1), .GAMMA(1))
    u_b (.clk(clk), .rst_n(rst_n), .key_we(we[1]), .key_addr(ka[1]), .key_data(kd[1]),
         .in_valid(iv[1]), .in_ready(ir[1]), .in_block(ib[1]),
         .out_valid(ov[1]), .out_block(ob[1]));
  idea_iterative #(.R(2), .ALGO(ALGO_NP1), .M1(1), .M2(0), .M3(0), .BETA(0), .GAMMA(0),
                   .BOUNDARY(1), .IO_REGS(1'b0))
    u_c (.clk(clk), .rst_n(rst_n), .key_we(we[2]), .key_addr(ka[2]), .key_data(kd[2]),
         .in_valid(iv[2]), .in_ready(ir[2]), .in_block(ib[2]),
         .out_valid(ov[2]), .out_block(ob[2]));

  idea_iterative #(.R(2))
    u_d (.clk(clk), .rst_n(rst_n), .key_we(we[3]), .key_addr(ka[3]), .key_data(kd[3]),
         .in_valid(iv[3]), .in_ready(ir[3]), .in_block(ib[3]),
         .out_valid(ov[3]), .out_block(ob[3]));

  tb_proc_agent #(.ITER(1'b1), .LAT(6), .SPACING(4), .NB(60)) g_d (
    .clk(clk), .start(start), .done(dn[3]), .key_we(we[3]), .key_addr(ka[3]), .key_data(kd[3]),
    .in_valid(iv[3]), .in_ready(ir[3]), .in_block(ib[3]), .out_valid(ov[3]), .out_block(ob[3]),
    .checks(c[3]), .failures(f[3]), .refusals(r[3]), .multipass(m[3]), .cbc_blocks(cb[3]),
    .decrypted(d[3]));
  tb_proc_agent #(.ITER(1'b1), .LAT(10), .SPACING(8), .NB(60)) g_a (
    .clk(clk), .start(start), .done(dn[0]), .key_we(we[0]), .key_addr(ka[0]), .key_data(kd[0]),
    .in_valid(iv[0]), .in_ready(ir[0]), .in_block(ib[0]), .out_valid(ov[0]), .out_block(ob[0]),
    .checks(c[0]), .failures(f[0]), .refusals(r[0]), .multipass(m[0]), .cbc_blocks(cb[0]),
    .decrypted(d[0]));
  tb_proc_agent #(.ITER(1'b1), .LAT(134), .NB(200)) g_b (
    .clk(clk), .start(start), .done(dn[1]), .key_we(we[1]), .key_addr(ka[1]), .key_data(kd[1]),
    .in_valid(iv[1]), .in_ready(ir[1]), .in_block(ib[1]), .out_valid(ov[1]), .out_block(ob[1]),
    .checks(c[1]), .failures(f[1]), .refusals(r[1]), .multipass(m[1]), .cbc_blocks(cb[1]),
    .decrypted(d[1]));
  tb_proc_agent #(.ITER(1'b1), .LAT(33), .NB(100)) g_c (
    .clk(clk), .start(start), .done(dn[2]), .key_we(we[2]), .key_addr(ka[2]), .key_data(kd[2]),
    .in_valid(iv[2]), .in_ready(ir[2]), .in_block(ib[2]), .out_valid(ov[2]), .out_block(ob[2]),
    .checks(c[2]), .failures(f[2]), .refusals(r[2]), .multipass(m[2]), .cbc_blocks(cb[2]),
    .decrypted(d[2]));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1; start = 1'b1;
    wait (dn[0] && dn[1] && dn[2] && dn[3]);
    checks = c[0] + c[1] + c[2] + c[3];
    failures = f[0] + f[1] + f[2] + f[3];
    if (r[1] == 0) begin failures++; $display("loop never full"); end
    for (int i = 0; i < 4; i++)
      if (m[i] == 0 || cb[i] == 0 || d[i] == 0) begin
        failures++;
        $display("instance %0d: a mechanism was not exercised", i);
      end
    $display("refusals=%0d/%0d/%0d cbc=%0d/%0d/%0d decrypted=%0d/%0d/%0d",
             r[0], r[1], r[2], cb[0], cb[1], cb[2], d[0], d[1], d[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
