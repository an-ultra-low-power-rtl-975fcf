// tb_rt_dual_reg: checks the dual-input radiation-tolerant register.
//
// Random rail values: bits on which both rails agree must take the rail
// value, bits on which they differ must keep their previous state. Also
// checks the reset value.
`timescale 1ns/1ps
module tb_rt_dual_reg;

  localparam int W = 8;
  logic clk = 0, rstn = 1;
  logic [W-1:0] d_a = 0, d_b = 0, q;
  int checks = 0, failures = 0;

  rt_dual_reg #(.W(W), .RST(8'hA5)) dut (.*);

  always #5 clk = ~clk;

  logic [W-1:0] m;
  int n_hold = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rstn = 0;
    #1;
    checks++;
    if (q !== 8'hA5) begin failures++; $display("FAIL reset value %h", q); end
    m = 8'hA5;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      d_a = W'($urandom);
      d_b = ($urandom_range(1) == 0) ? d_a : W'($urandom);
      rstn = 1;
      @(posedge clk);
      for (int b = 0; b < W; b++) begin
        if (d_a[b] == d_b[b]) m[b] = d_a[b];
        else n_hold++;
      end
      #1;
      checks++;
      if (q !== m) begin failures++; if (failures < 10) $display("FAIL q=%h expected %h", q, m); end
    end
    checks++;
    if (n_hold == 0) begin failures++; $display("FAIL no disagreement tested"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
