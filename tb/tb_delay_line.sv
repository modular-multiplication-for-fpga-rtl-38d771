// tb_delay_line: self-checking testbench for delay_line. Reference: the input stream delayed by DEPTH cycles.
// Several instances with different pipeline settings are fed the same
// operand stream, one pair per cycle; each output is compared, exactly
// LAT cycles later, with a value computed by the behavioural model, so a
// wrong result or a wrong latency is a failure. Corner operands come first,
// then random ones.
module tb_delay_line;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  localparam int NV = 2000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [16-1:0] x, y;
  logic [16-1:0] hx [NV], hy [NV];
  logic [15:0] q_d;
  delay_line u_d (.clk(clk), .d(x), .q(q_d));
  logic [31:0] q_5;
  delay_line #(.WIDTH(32), .DEPTH(5)) u_5 (.clk(clk), .d({x, y}), .q(q_5));
  logic [15:0] q_0;
  delay_line #(.DEPTH(0)) u_0 (.clk(clk), .d(y), .q(q_0));

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
        if (q_d !== (hx[i-1])) begin
          failures++;
          if (failures < 10) $display("MISMATCH q_d: x=%h y=%h got %h", hx[i-1], hy[i-1], q_d);
        end
      end
      if (i >= 5) begin
        checks++;
        if (q_5 !== ({hx[i-5], hy[i-5]})) begin
          failures++;
          if (failures < 10) $display("MISMATCH q_5: x=%h y=%h got %h", hx[i-5], hy[i-5], q_5);
        end
      end
      if (i >= 0) begin
        checks++;
        if (q_0 !== (hy[i-0])) begin
          failures++;
          if (failures < 10) $display("MISMATCH q_0: x=%h y=%h got %h", hx[i-0], hy[i-0], q_0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
