// tb_corr_stage2: checks the 63 MHz stage of a correlation slice.
//
// CORRIN is driven as a square-ish wave whose level is held for random runs
// of at least one clock. The reference counts falling edges of CORRIN seen
// while RUN was high and predicts the 4-bit counter's MSB two clocks later.
// It also checks that RUN low holds the counter (and so CORROUT) at zero.
`timescale 1ns/1ps
module tb_corr_stage2;

  logic ck63 = 1'b0, rstn = 1, run = 1'b0, corrin = 1'b0, corrout;
  int checks = 0, failures = 0;

  corr_stage2 dut (.*);

  always #8 ck63 = ~ck63;

  // reference pipeline
  logic r_old = 0, r_older = 0;
  logic [3:0] r_cnt = 0;
  int n_counts = 0, n_msb_falls = 0;
  logic prev_msb = 0;

  always @(posedge ck63) begin
    if (rstn) begin
      if (!run) r_cnt <= 0;
      else if (r_older && !r_old) begin r_cnt <= r_cnt + 1; n_counts++; end
      r_older <= r_old & run;
      r_old <= corrin;
    end
  end

  always @(negedge ck63) if (rstn) begin
    checks++;
    if (corrout !== r_cnt[3]) begin
      failures++;
      if (failures < 10) $display("FAIL corrout=%0d model cnt=%0d at %t", corrout, r_cnt, $time);
    end
    if (prev_msb && !corrout) n_msb_falls++;
    prev_msb = corrout;
  end

  // drive an asynchronous reset edge at time zero
  initial #0.5 rstn = 1'b0;

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge ck63);
    #1 rstn = 1'b1;
    run = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(posedge ck63);
      #1;
      if ($urandom_range(2) == 0) corrin = ~corrin;
      if (i == 1500) run = 1'b0;
      if (i == 1600) run = 1'b1;
    end
    repeat (4) @(posedge ck63);
    checks++;
    if (n_counts < 300 || n_msb_falls < 15) begin
      failures++;
      $display("FAIL too little activity: counts=%0d msb falls=%0d", n_counts, n_msb_falls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
