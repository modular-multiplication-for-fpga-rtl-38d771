// tb_subkey_mem: self-checking testbench for subkey_mem. Writes all 52
// subkeys, checks that every word reads back in parallel, checks that a
// write above address 51 changes nothing, then overwrites random addresses
// and checks the whole memory against a shadow copy after each write.
module tb_subkey_mem;
  import idea_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       we;
  logic [5:0] addr;
  word_t      wdata;
  word_t [NSUBKEYS-1:0] keys;
  word_t shadow [NSUBKEYS];

  subkey_mem u_dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .keys(keys));

  task automatic compare_all();
    for (int i = 0; i < NSUBKEYS; i++) begin
      checks++;
      if (keys[i] !== shadow[i]) begin
        failures++;
        if (failures < 10) $display("MISMATCH key %0d: got %h exp %h", i, keys[i], shadow[i]);
      end
    end
  endtask

  task automatic write(int a, word_t d);
    @(negedge clk);
    we = 1'b1; addr = 6'(a); wdata = d;
    if (a < NSUBKEYS) shadow[a] = d;
    @(negedge clk);
    we = 1'b0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    for (int i = 0; i < NSUBKEYS; i++) write(i, word_t'($urandom));
    compare_all();
    for (int a = NSUBKEYS; a < 64; a++) write(a, word_t'($urandom));
    compare_all();
    for (int n = 0; n < 200; n++) begin
      write(int'($urandom_range(0, NSUBKEYS-1)), word_t'($urandom));
      compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
