// tb_idea_out: self-checking testbench for idea_out. A default instance
// (latency 3) and a combinational one (latency 0) get the same random
// blocks, one per cycle, with fixed subkeys; outputs are compared with the
// reference output transformation exactly at the expected latency.
module tb_idea_out;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  localparam int NV = 3000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  block_t z, c_d, c_c;
  word_t [3:0] k;
  block_t hz [NV];

  idea_out u_d (.clk(clk), .z(z), .k(k), .c(c_d));
  idea_out #(.ALGO(ALGO_LOW_HIGH), .M1(0), .M2(0), .M3(0), .BETA(0))
    u_c (.clk(clk), .z(z), .k(k), .c(c_c));

  task automatic check(block_t got, block_t exp, string who);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s: got %h exp %h", who, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (NV + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) k[i] = word_t'($urandom);
    for (int i = 0; i < NV; i++) begin
      @(negedge clk);
      z = rand_block();
      if (i % 3 == 0) z[0] = '0;
      hz[i] = z;
      #1;
      if (i >= 3) check(c_d, ref_outt(hz[i-3], k[0], k[1], k[2], k[3]), "default");
      check(c_c, ref_outt(hz[i], k[0], k[1], k[2], k[3]), "combinational");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
