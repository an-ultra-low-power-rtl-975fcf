// tb_clock_counter: checks the integration timer.
//
// For several integration times, including 1 and the wrap value 0 (with a
// small counter width), measures the number of clocks between load pulses
// and checks that load is exactly one clock wide and absent while RUN is low.
`timescale 1ns/1ps
module tb_clock_counter;

  localparam int W = 5;
  logic ck2 = 0, rstn = 1, run = 0, load;
  logic [W-1:0] itime, cnt_q;
  int checks = 0, failures = 0;

  clock_counter #(.CNT_W(W)) dut (.*);

  always #5 ck2 = ~ck2;

  task automatic measure(input int it);
    int start, n;
    run = 0; itime = W'(it);
    repeat (3) @(posedge ck2);
    #1;
    checks++;
    if (load) begin failures++; $display("FAIL load while RUN low"); end
    run = 1;
    n = 0;
    // first integration starts with this enable
    for (int k = 0; k < 3; k++) begin
      start = n;
      do begin @(posedge ck2); #1; n++; end while (!(dut.cnt_q == 0 && n > start));
      // the clock that restarted the counter had load high
      checks++;
      if (n - start != ((it == 0) ? (1 << W) : it)) begin
        failures++;
        $display("FAIL itime=%0d period %0d", it, n - start);
      end
    end
  endtask

  // load must be high exactly in the cycle before the counter restarts
  always @(negedge ck2) begin
    if (rstn && run) begin
      checks++;
      if (load != (cnt_q == W'(itime - 1))) begin failures++; $display("FAIL load=%0d cnt=%0d", load, cnt_q); end
    end
  end

  // drive an asynchronous reset edge at time zero
  initial #0.5 rstn = 1'b0;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    itime = 0;
    repeat (2) @(posedge ck2);
    rstn = 1;
    measure(3);
    measure(1);
    measure(17);
    measure(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
