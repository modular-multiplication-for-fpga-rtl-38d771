// tb_umul_tree: self-checking testbench for umul_tree. Reference: the integer product x*y.
// Several instances with different pipeline settings are fed the same
// operand stream, one pair per cycle; each output is compared, exactly
// LAT cycles later, with a value computed by the behavioural model, so a
// wrong result or a wrong latency is a failure. Corner operands come first,
// then random ones.
module tb_umul_tree;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  localparam int NV = 40000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [16-1:0] x, y;
  logic [16-1:0] hx [NV], hy [NV];
  logic [31:0] p_d;
  umul_tree u_d (.clk(clk), .x(x), .y(y), .p(p_d));
  logic [31:0] p_3;
  umul_tree #(.STAGES(3)) u_3 (.clk(clk), .x(x), .y(y), .p(p_3));
  logic [31:0] p_1;
  umul_tree #(.STAGES(1)) u_1 (.clk(clk), .x(x), .y(y), .p(p_1));
  logic [15:0] p_8;
  umul_tree #(.N(8), .STAGES(2)) u_8 (.clk(clk), .x(x[7:0]), .y(y[7:0]), .p(p_8));

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
      if (i >= 0) begin
        checks++;
        if (p_d !== (32'(hx[i-0]) * 32'(hy[i-0]))) begin
          failures++;
          if (failures < 10) $display("MISMATCH p_d: x=%h y=%h got %h", hx[i-0], hy[i-0], p_d);
        end
      end
      if (i >= 3) begin
        checks++;
        if (p_3 !== (32'(hx[i-3]) * 32'(hy[i-3]))) begin
          failures++;
          if (failures < 10) $display("MISMATCH p_3: x=%h y=%h got %h", hx[i-3], hy[i-3], p_3);
        end
      end
      if (i >= 1) begin
        checks++;
        if (p_1 !== (32'(hx[i-1]) * 32'(hy[i-1]))) begin
          failures++;
          if (failures < 10) $display("MISMATCH p_1: x=%h y=%h got %h", hx[i-1], hy[i-1], p_1);
        end
      end
      if (i >= 2) begin
        checks++;
        if (p_8 !== (16'(hx[i-2][7:0]) * 16'(hy[i-2][7:0]))) begin
          failures++;
          if (failures < 10) $display("MISMATCH p_8: x=%h y=%h got %h", hx[i-2], hy[i-2], p_8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
