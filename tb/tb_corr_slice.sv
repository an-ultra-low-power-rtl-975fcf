// tb_corr_slice: checks one correlation slice with all three stages.
//
// The three stage clocks are made here from CK500 (CK63 = CK500/8 and
// CK2 = CK500/256, edges at CK500 falling edges). Gate inputs are random
// with the product term true in about a third of the cycles; the test issues
// load every 40 CK2 cycles, then stops the input and drains. Each buffer must
// be within 2 of its window's event count / 256, and the sum of all buffers
// must equal floor((events + 7) / 256) exactly.
`timescale 1ns/1ps
module tb_corr_slice;

  logic ck500 = 0, ck63 = 0, ck2 = 0, rstn = 0;
  logic ax = 0, bx = 0, ay = 0, by = 0, run = 0, load = 0;
  logic [15:0] buf_q;
  int checks = 0, failures = 0;

  corr_slice dut (.*);

  always #1 ck500 = ~ck500;

  int div = 0;
  always @(negedge ck500) begin
    div = (div + 1) % 256;
    ck63 = div[2];
    ck2  = div[7];
  end

  bit gen = 0;
  longint events = 0, snap = 0, prev_snap = 0, total = 0;
  always @(negedge ck500) begin
    if (gen) begin
      ax = $urandom_range(2) == 0; bx = $urandom_range(1) == 0;
      ay = $urandom_range(2) == 0; by = $urandom_range(1) == 0;
    end else begin
      ax = 0; bx = 0; ay = 0; by = 0;
    end
    if ((ax & bx) | (ay & by)) events++;
  end

  // drive an asynchronous reset edge at time zero
  initial #0.5 rstn = 1'b0;

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge ck500);
    rstn = 1;
    @(posedge ck2);
    #3 run = 1; gen = 1;
    for (int w = 0; w < 10; w++) begin
      repeat (39) @(posedge ck2);
      #3 load = 1;
      @(posedge ck2);
      prev_snap = snap; snap = events;
      #3 load = 0;
      if (w == 7) gen = 0;
      #1;
      total += buf_q;
      checks++;
      if (longint'(buf_q) < (snap - prev_snap) / 256 - 2 || longint'(buf_q) > (snap - prev_snap) / 256 + 2) begin
        failures++;
        $display("FAIL window %0d buffer %0d events %0d", w, buf_q, snap - prev_snap);
      end
    end
    checks++;
    if (total != (events + 7) / 256) begin
      failures++;
      $display("FAIL total %0d events %0d expected %0d", total, events, (events + 7) / 256);
    end
    checks++;
    if (buf_q != 0) begin failures++; $display("FAIL drained window not empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
