// tb_mul_lowhigh: self-checking testbench for mul_lowhigh. Reference: multiplication modulo 65537 with 0 standing for 65536.
// Several instances with different pipeline settings are fed the same
// operand stream, one pair per cycle; each output is compared, exactly
// LAT cycles later, with a value computed by the behavioural model, so a
// wrong result or a wrong latency is a failure. Corner operands come first,
// then random ones.
module tb_mul_lowhigh;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  localparam int NV = 40000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [16-1:0] x, y;
  logic [16-1:0] hx [NV], hy [NV];
  word_t p_d;
  mul_lowhigh u_d (.clk(clk), .x(x), .y(y), .p(p_d));      // m1=m2=m3=1, latency 3
  word_t p_c;
  mul_lowhigh #(.M1(0), .M2(0), .M3(0)) u_c (.clk(clk), .x(x), .y(y), .p(p_c));
  word_t p_t;
  mul_lowhigh #(.M1(2), .M2(1), .M3(1), .TREE_MULT(1'b1)) u_t (.clk(clk), .x(x), .y(y), .p(p_t));
  word_t p_u;
  mul_lowhigh #(.M1(3), .M2(0), .M3(1), .TREE_MULT(1'b1)) u_u (.clk(clk), .x(x), .y(y), .p(p_u));

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
      if (i >= 3) begin
        checks++;
        if (p_d !== (ref_mul(hx[i-3], hy[i-3]))) begin
          failures++;
          if (failures < 10) $display("MISMATCH p_d: x=%h y=%h got %h", hx[i-3], hy[i-3], p_d);
        end
      end
      if (i >= 0) begin
        checks++;
        if (p_c !== (ref_mul(hx[i-0], hy[i-0]))) begin
          failures++;
          if (failures < 10) $display("MISMATCH p_c: x=%h y=%h got %h", hx[i-0], hy[i-0], p_c);
        end
      end
      if (i >= 4) begin
        checks++;
        if (p_t !== (ref_mul(hx[i-4], hy[i-4]))) begin
          failures++;
          if (failures < 10) $display("MISMATCH p_t: x=%h y=%h got %h", hx[i-4], hy[i-4], p_t);
        end
      end
      if (i >= 4) begin
        checks++;
        if (p_u !== (ref_mul(hx[i-4], hy[i-4]))) begin
          failures++;
          if (failures < 10) $display("MISMATCH p_u: x=%h y=%h got %h", hx[i-4], hy[i-4], p_u);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
