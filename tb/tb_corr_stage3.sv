// tb_corr_stage3: checks the 2 MHz stage (accumulator and buffer).
//
// CORRIN is toggled at random, holding each level for at least one clock.
// An independent reference counts falling edges of CORRIN seen while RUN is
// high (found two clocks later, as the two-register detector does), adds them
// up and, at each load, compares the expected value with the buffer. Covers
// a count arriving in the load cycle, RUN low clearing the accumulator and
// saturation at the all-ones value (with a small ACC_W).
`timescale 1ns/1ps
module tb_corr_stage3;

  localparam int W = 6;
  logic ck2 = 0, rstn = 1, run = 0, corrin = 0, load = 0;
  logic [W-1:0] buf_q, cnt_q;
  int checks = 0, failures = 0;

  corr_stage3 #(.ACC_W(W)) dut (.*);

  always #256 ck2 = ~ck2;

  // reference: history of corrin and run sampled at clock edges
  logic h1 = 0, h2 = 0;   // corrin one and two edges ago (h2 gated by run)
  int acc = 0;
  int expected_buf = 0;
  int n_loads = 0, n_sat = 0, n_inc_at_load = 0;

  always @(posedge ck2) if (rstn) begin
    automatic bit inc = h2 && !h1;
    automatic int nxt = (inc && acc < (1 << W) - 1) ? acc + 1 : acc;
    if (inc && acc == (1 << W) - 1) n_sat++;
    if (!run) acc = 0;
    else if (load) begin
      expected_buf = nxt;
      if (inc) n_inc_at_load++;
      acc = 0;
      n_loads++;
    end else acc = nxt;
    h2 = h1 & run;
    h1 = corrin;
  end

  always @(negedge ck2) if (rstn) begin
    checks++;
    if (buf_q != W'(expected_buf) || cnt_q != W'(acc)) begin
      failures++;
      if (failures < 10) $display("FAIL buf=%0d exp=%0d cnt=%0d exp=%0d at %t", buf_q, expected_buf, cnt_q, acc, $time);
    end
  end

  // drive an asynchronous reset edge at time zero
  initial #0.5 rstn = 1'b0;

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge ck2);
    #1 rstn = 1; run = 1;
    for (int i = 0; i < 6000; i++) begin
      @(posedge ck2);
      #1;
      if ($urandom_range(1) == 0) corrin = ~corrin;
      load = (i < 4000) ? (i % 50 == 49) : (i % 400 == 399);
      if (i == 2000) run = 0;
      if (i == 2100) run = 1;
    end
    checks++;
    if (n_loads < 20 || n_sat == 0 || n_inc_at_load == 0) begin
      failures++;
      $display("FAIL coverage loads=%0d sat=%0d inc_at_load=%0d", n_loads, n_sat, n_inc_at_load);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
