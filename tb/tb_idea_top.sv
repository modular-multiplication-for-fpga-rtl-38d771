// tb_idea_top: end-to-end testbench of idea_top with all parameters at
// their defaults. Each of the five processors is driven by its own
// tb_proc_agent: subkey load, the published test vector 0000 0001 0002
// 0003 -> 11FB ED2B 0198 6DE5 under key 0001..0008, a stream of random
// blocks, CBC chaining and decryption with the inverse subkeys, checking
// every result and the latencies:
//   fast  8+1 unrolled, (n+1)x(n+1) operator   latency 109, 1 block/cycle
//   csa   8+1 unrolled, carry-save operator     latency 134, 1 block/cycle
//   ve    8+1 unrolled, Low-High, adder tree    latency 134, 1 block/cycle
//   fb    1+1 iterative, combinational round    latency 10, 1 block/8 cycles
//   it4   4+1 iterative, pipelined, 52 slots    latency 1+104+3+1 = 109
// Mechanisms counted (each must occur): back-pressure on the iterative
// processors, blocks recirculating through the rounds, CBC chaining and
// decryption on every processor.
module tb_idea_top;
  import idea_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, start;
  int checks, failures;

  logic       we [5], iv [5], ir [5], ov [5], dn [5];
  logic [5:0] ka [5];
  word_t      kd [5];
  block_t     ib [5], ob [5];
  int c [5], f [5], r [5], m [5], cb [5], d [5];

  idea_top u_top (
    .clk(clk), .rst_n(rst_n),
    .fast_key_we(we[0]), .fast_key_addr(ka[0]), .fast_key_data(kd[0]),
    .fast_in_valid(iv[0]), .fast_in_block(ib[0]), .fast_out_valid(ov[0]), .fast_out_block(ob[0]),
    .csa_key_we(we[1]), .csa_key_addr(ka[1]), .csa_key_data(kd[1]),
    .csa_in_valid(iv[1]), .csa_in_block(ib[1]), .csa_out_valid(ov[1]), .csa_out_block(ob[1]),
    .ve_key_we(we[4]), .ve_key_addr(ka[4]), .ve_key_data(kd[4]),
    .ve_in_valid(iv[4]), .ve_in_block(ib[4]), .ve_out_valid(ov[4]), .ve_out_block(ob[4]),
    .fb_key_we(we[2]), .fb_key_addr(ka[2]), .fb_key_data(kd[2]),
    .fb_in_valid(iv[2]), .fb_in_ready(ir[2]), .fb_in_block(ib[2]),
    .fb_out_valid(ov[2]), .fb_out_block(ob[2]),
    .it4_key_we(we[3]), .it4_key_addr(ka[3]), .it4_key_data(kd[3]),
    .it4_in_valid(iv[3]), .it4_in_ready(ir[3]), .it4_in_block(ib[3]),
    .it4_out_valid(ov[3]), .it4_out_block(ob[3]));

  assign ir[0] = 1'b1;
  assign ir[1] = 1'b1;
  assign ir[4] = 1'b1;

  tb_proc_agent #(.ITER(1'b0), .LAT(109), .NB(300)) g_fast (
    .clk(clk), .start(start), .done(dn[0]), .key_we(we[0]), .key_addr(ka[0]), .key_data(kd[0]),
    .in_valid(iv[0]), .in_ready(ir[0]), .in_block(ib[0]), .out_valid(ov[0]), .out_block(ob[0]),
    .checks(c[0]), .failures(f[0]), .refusals(r[0]), .multipass(m[0]), .cbc_blocks(cb[0]),
    .decrypted(d[0]));
  tb_proc_agent #(.ITER(1'b0), .LAT(134), .NB(300)) g_csa (
    .clk(clk), .start(start), .done(dn[1]), .key_we(we[1]), .key_addr(ka[1]), .key_data(kd[1]),
    .in_valid(iv[1]), .in_ready(ir[1]), .in_block(ib[1]), .out_valid(ov[1]), .out_block(ob[1]),
    .checks(c[1]), .failures(f[1]), .refusals(r[1]), .multipass(m[1]), .cbc_blocks(cb[1]),
    .decrypted(d[1]));
  tb_proc_agent #(.ITER(1'b1), .LAT(10), .SPACING(8), .NB(60)) g_fb (
    .clk(clk), .start(start), .done(dn[2]), .key_we(we[2]), .key_addr(ka[2]), .key_data(kd[2]),
    .in_valid(iv[2]), .in_ready(ir[2]), .in_block(ib[2]), .out_valid(ov[2]), .out_block(ob[2]),
    .checks(c[2]), .failures(f[2]), .refusals(r[2]), .multipass(m[2]), .cbc_blocks(cb[2]),
    .decrypted(d[2]));
  tb_proc_agent #(.ITER(1'b0), .LAT(134), .NB(300)) g_ve (
    .clk(clk), .start(start), .done(dn[4]), .key_we(we[4]), .key_addr(ka[4]), .key_data(kd[4]),
    .in_valid(iv[4]), .in_ready(ir[4]), .in_block(ib[4]), .out_valid(ov[4]), .out_block(ob[4]),
    .checks(c[4]), .failures(f[4]), .refusals(r[4]), .multipass(m[4]), .cbc_blocks(cb[4]),
    .decrypted(d[4]));
  tb_proc_agent #(.ITER(1'b1), .LAT(109), .NB(200)) g_it4 (
    .clk(clk), .start(start), .done(dn[3]), .key_we(we[3]), .key_addr(ka[3]), .key_data(kd[3]),
    .in_valid(iv[3]), .in_ready(ir[3]), .in_block(ib[3]), .out_valid(ov[3]), .out_block(ob[3]),
    .checks(c[3]), .failures(f[3]), .refusals(r[3]), .multipass(m[3]), .cbc_blocks(cb[3]),
    .decrypted(d[3]));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3] + c[4],
             f[0] + f[1] + f[2] + f[3] + f[4] + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1; start = 1'b1;
    wait (dn[0] && dn[1] && dn[2] && dn[3] && dn[4]);
    checks = 0; failures = 0;
    for (int i = 0; i < 5; i++) begin
      checks += c[i];
      failures += f[i];
      if (cb[i] == 0 || d[i] == 0) begin
        failures++;
        $display("processor %0d: CBC or decryption not exercised", i);
      end
    end
    if (r[2] == 0 || r[3] == 0) begin failures++; $display("no back-pressure seen"); end
    if (m[2] == 0 || m[3] == 0) begin failures++; $display("no recirculation seen"); end
    $display("back-pressure cycles fb=%0d it4=%0d; recirculated fb=%0d it4=%0d",
             r[2], r[3], m[2], m[3]);
    $display("cbc=%0d/%0d/%0d/%0d/%0d decrypted=%0d/%0d/%0d/%0d/%0d",
             cb[0], cb[1], cb[2], cb[3], cb[4], d[0], d[1], d[2], d[3], d[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
