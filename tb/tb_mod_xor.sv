// tb_mod_xor: self-checking testbench for mod_xor. Reference: x XOR y.
// Several instances with different pipeline settings are fed the same
// operand stream, one pair per cycle; each output is compared, exactly
// LAT cycles later, with a value computed by the behavioural model, so a
// wrong result or a wrong latency is a failure. Corner operands come first,
// then random ones.
module tb_mod_xor;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  localparam int NV = 5000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [16-1:0] x, y;
  logic [16-1:0] hx [NV], hy [NV];
  word_t s_d;
  mod_xor u_d (.clk(clk), .a(x), .b(y), .s(s_d));
  word_t s_c;
  mod_xor #(.GAMMA(0)) u_c (.clk(clk), .a(x), .b(y), .s(s_c));

  initial begin : watchdog
    repeat (NV + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16-1:0] cx [$], cy [$];
    cx = '{16'd0,16'd0,16'd1,16'd1,16'd10,16'd16384,16'd0,16'd65535,16'd65535,16'd2,16'd32768,16'd0,16'd1,16'd65535}; cy = '{16'd0,16'd1,16'd0,16'd1,16'd9,16'd8,16'd65535,16'd0,16'd65535,16'd32768,16'd2,16'd2,16'd65535,16'd1};
    for (int i = 0; i < NV; i++) begin
      @(negedge clk);
      if (i < cx.size()) begin x = cx[i]; y = cy[i]; end
      else begin x = 16'($urandom); y = 16'($urandom); end
      if (i % 7 == 3) y = 16'($urandom_range(0, 3));   // frequent small/zero operands
      if (i % 11 == 5) x = '0;
      hx[i] = x; hy[i] = y;
      #1;
      if (i >= 1) begin
        checks++;
        if (s_d !== (hx[i-1] ^ hy[i-1])) begin
          failures++;
          if (failures < 10) $display("MISMATCH s_d: x=%h y=%h got %h", hx[i-1], hy[i-1], s_d);
        end
      end
      if (i >= 0) begin
        checks++;
        if (s_c !== (hx[i-0] ^ hy[i-0])) begin
          failures++;
          if (failures < 10) $display("MISMATCH s_c: x=%h y=%h got %h", hx[i-0], hy[i-0], s_c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
