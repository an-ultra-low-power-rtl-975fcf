// tb_hscc_top: end-to-end test of the cross-correlator at its default sizes.
//
// Random three-level samples with a chosen correlation between streams A and
// B are applied at the full CK500 rate. An independent model counts, per
// slice, the cycles in which the slice's product term is true, working from
// the integer sample values (a*b = +1 for the direct, -1 for the inverse
// slices, and the pin levels for the pin counters). The host side is driven
// through the asynchronous bus exactly as a processor would.
//
// Phase 1: program the integration time, start RUN, run four integrations
//   with data and two without, reading every buffer. Each buffer must match
//   its window's event count divided by 256 within the pipeline tolerance,
//   the period between interrupts must be itime*256 CK500 cycles, and the
//   sum over all integrations must equal floor((events + 7) / 256) exactly
//   (the ripple prescaler's first output edge comes after the 9th event).
//   The last, empty integration must read zero in every slice.
// Phase 2: leave one integration unread and check that ERR rises at the
//   next end of integration, that the status word shows it and that a
//   status write clears it.
// Phase 3: stop RUN, check that no interrupt comes, change the integration
//   time, restart and check the new period.
//   During phase 3 one rail of the dual-rail control logic is upset for one
//   clock; the control state must ignore it.
// Every mechanism (interrupt, acknowledge, overrun, ERR clear, RUN stop,
// integration-time change, rejected rail upset) is counted and must have
// happened.
`timescale 1ns/1ps
module tb_hscc_top;

  localparam int NS = 16;

  logic ck500 = 1'b0;
  logic rstn;
  logic aip, aim, aqp, aqm, bip, bim, bqp, bqm;
  logic cs, rdn, wrn;
  logic [4:0]  addr;
  logic [15:0] data_in;
  logic [15:0] data_out;
  logic        data_oe;
  logic        intr, err;

  int checks = 0;
  int failures = 0;

  hscc_top dut (.*);

  always #1 ck500 = ~ck500;

  // ---------------- stimulus and reference model ----------------
  bit  gen_on = 1'b0;
  int  a_i, a_q, b_i, b_q;          // integer sample values, -1..+1
  longint events [NS];              // reference event counts since reset
  longint cycle = 0;

  function automatic int rand3();   // P(+1) = P(-1) = 1/4
    int unsigned r = $urandom_range(3);
    return (r == 0) ? 1 : (r == 1) ? -1 : 0;
  endfunction

  function automatic logic pbit(int v); return v > 0; endfunction
  function automatic logic mbit(int v); return v < 0; endfunction

  // Slice s < 8: pair s/2 = II, IQ, QI, QQ; even s direct, odd s inverse.
  function automatic bit slice_event(int s, int ai, int aq, int bi, int bq);
    int a, b, prod;
    int pin;
    logic [7:0] pins;
    if (s < 8) begin
      a = (s / 4 == 0) ? ai : aq;
      b = ((s / 2) % 2 == 0) ? bi : bq;
      prod = a * b;
      return (s % 2 == 0) ? (prod == 1) : (prod == -1);
    end
    pins = {mbit(bq), pbit(bq), mbit(bi), pbit(bi), mbit(aq), pbit(aq), mbit(ai), pbit(ai)};
    pin = s - 8;
    return pins[pin];
  endfunction

  // New samples after each falling edge; the model counts what is applied.
  always @(negedge ck500) begin
    if (gen_on) begin
      a_i = rand3();
      a_q = rand3();
      b_i = ($urandom_range(1) == 0) ? a_i : rand3();    // B correlated with A
      b_q = ($urandom_range(3) == 0) ? -a_i : rand3();   // B_Q anti-correlated with A_I
    end else begin
      a_i = 0; a_q = 0; b_i = 0; b_q = 0;
    end
    {aip, aim, aqp, aqm} = {pbit(a_i), mbit(a_i), pbit(a_q), mbit(a_q)};
    {bip, bim, bqp, bqm} = {pbit(b_i), mbit(b_i), pbit(b_q), mbit(b_q)};
    for (int s = 0; s < NS; s++) events[s] += slice_event(s, a_i, a_q, b_i, b_q);
  end

  always @(posedge ck500) cycle <= cycle + 1;

  // ---------------- host bus ----------------
  localparam int TICK = 256;   // CK500 cycles per CK2 cycle

  task automatic bus_write(input logic [4:0] a, input logic [15:0] d);
    cs = 1'b1; addr = a; data_in = d;
    wrn = 1'b0;
    repeat (4 * TICK) @(posedge ck500);
    wrn = 1'b1;
    repeat (4 * TICK) @(posedge ck500);
    cs = 1'b0;
  endtask

  task automatic bus_read(input logic [4:0] a, output logic [15:0] d);
    cs = 1'b1; addr = a;
    rdn = 1'b0;
    repeat (2 * TICK) @(posedge ck500);
    checks++;
    if (!data_oe) begin failures++; $display("FAIL data_oe low during read"); end
    d = data_out;
    repeat (2 * TICK) @(posedge ck500);
    rdn = 1'b1;
    repeat (4 * TICK) @(posedge ck500);
    cs = 1'b0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- interrupt timing ----------------
  longint last_intr_cycle = -1;
  longint intr_period = 0;
  logic   intr_d = 1'b0, err_d = 1'b0;
  longint snap [NS];          // events at the latest end of integration
  longint prev_snap [NS];     // events at the one before
  int     n_intr = 0, n_err = 0;

  always @(posedge ck500) begin
    intr_d <= intr;
    err_d  <= err;
    if ((intr && !intr_d) || (err && !err_d)) begin
      n_intr <= n_intr + 1;
      if (last_intr_cycle >= 0) intr_period <= cycle - last_intr_cycle;
      last_intr_cycle <= cycle;
      prev_snap <= snap;
      snap <= events;
    end
    if (err && !err_d) n_err <= n_err + 1;
  end

  // ---------------- counters of mechanisms ----------------
  int n_ack = 0, n_err_clr = 0, n_run_stop = 0, n_itime_change = 0, n_rail_upset = 0;

  longint sum_buf [NS];
  logic [15:0] rd;
  logic [15:0] bufs [NS];
  int itime;

  task automatic wait_intr_rise();
    int seen = n_intr;
    while (n_intr == seen) @(posedge ck500);
  endtask

  task automatic read_all_and_check(input string tag, input bit exact_zero);
    longint win, exp;
    for (int s = 0; s < NS; s++) begin
      bus_read(5'(s), bufs[s]);
      win = snap[s] - prev_snap[s];
      exp = win / 256;
      if (exact_zero)
        check(bufs[s] == 0, $sformatf("%s slice %0d expected 0 got %0d", tag, s, bufs[s]));
      else
        check(longint'(bufs[s]) >= exp - 2 && longint'(bufs[s]) <= exp + 2,
              $sformatf("%s slice %0d got %0d window events %0d (~%0d)", tag, s, bufs[s], win, exp));
      sum_buf[s] += bufs[s];
    end
    @(posedge ck500);
    repeat (2 * TICK) @(posedge ck500);
    check(!intr, {tag, " INTR not cleared by reading the last buffer"});
    if (!intr) n_ack++;
  endtask

  initial begin
    #(2 * 6_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (events[s]) begin events[s] = 0; snap[s] = 0; prev_snap[s] = 0; sum_buf[s] = 0; end
    cs = 0; rdn = 1; wrn = 1; addr = '0; data_in = '0;
    rstn = 1'b1;
    #0.5 rstn = 1'b0;                       // asynchronous reset edge
    repeat (20) @(posedge ck500);
    rstn = 1'b1;
    repeat (4 * TICK) @(posedge ck500);

    check(!intr && !err, "INTR/ERR after reset");

    // ---- Phase 1 ----
    itime = 200;
    bus_write(5'h11, 16'(itime));
    bus_read(5'h11, rd);
    check(rd == 16'(itime), $sformatf("itime readback %0d", rd));
    bus_write(5'h10, 16'h0001);
    bus_read(5'h10, rd);
    check(rd == 16'h0001, "config readback");
    foreach (events[s]) events[s] = 0;   // nothing has happened yet: inputs were zero
    gen_on = 1'b1;

    for (int k = 0; k < 6; k++) begin
      wait_intr_rise();
      if (k >= 1) check(intr_period == longint'(itime) * 256,
                        $sformatf("integration period %0d cycles, expected %0d", intr_period, itime * 256));
      if (k == 3) gen_on = 1'b0;          // drain during integrations 5 and 6
      read_all_and_check($sformatf("phase1 int%0d", k), k == 5);
    end
    for (int s = 0; s < NS; s++)
      check(sum_buf[s] == (events[s] + 7) / 256,
            $sformatf("slice %0d total %0d, events %0d -> expected %0d", s, sum_buf[s], events[s], (events[s] + 7) / 256));

    // ---- Phase 2: overrun ----
    gen_on = 1'b1;
    wait_intr_rise();                       // leave this one unread
    check(intr && !err, "INTR set, no ERR yet");
    while (!err) @(posedge ck500);
    check(intr_period == longint'(itime) * 256, "ERR raised at the next end of integration");
    bus_read(5'h12, rd);
    check(rd[1:0] == 2'b11, $sformatf("status %b, expected INTR and ERR", rd[1:0]));
    bus_write(5'h12, 16'h0000);
    bus_read(5'h12, rd);
    check(rd[1:0] == 2'b01, $sformatf("status %b after ERR clear", rd[1:0]));
    if (rd[1] == 1'b0) n_err_clr++;
    read_all_and_check("phase2", 1'b0);

    // ---- Phase 3: stop, change the integration time, restart ----
    bus_write(5'h10, 16'h0000);
    n_run_stop++;
    begin
      int n_before;
      n_before = n_intr;
      repeat (300 * TICK) @(posedge ck500);
      check(n_intr == n_before, "no interrupt while RUN is low");
    end
    itime = 150;
    bus_write(5'h11, 16'(itime));
    n_itime_change++;
    bus_write(5'h10, 16'h0001);
    snap = events;                          // the slices restart from zero
    wait_intr_rise();
    read_all_and_check("phase3 first", 1'b0);

    // Transient in one rail of the dual-rail control: rail A's next state is
    // inverted for one CK2 edge. The control state must not move, and the
    // integration must go on undisturbed.
    begin
      hscc_pkg::io_state_t saved;
      @(negedge dut.ck2);
      saved = dut.u_io.cur;
      force dut.u_io.nxt_a = ~dut.u_io.nxt_b;
      @(posedge dut.ck2);
      #1 check(dut.u_io.cur == saved, "control state moved on a one-rail upset");
      if (dut.u_io.cur == saved) n_rail_upset++;
      release dut.u_io.nxt_a;
    end
    bus_read(5'h11, rd);
    check(rd == 16'(itime), "integration time survives the upset");
    wait_intr_rise();
    check(intr_period == longint'(itime) * 256,
          $sformatf("new period %0d cycles, expected %0d", intr_period, itime * 256));
    read_all_and_check("phase3 second", 1'b0);

    // ---- mechanisms ----
    $display("mechanisms: intr=%0d ack=%0d err=%0d err_clr=%0d run_stop=%0d itime_change=%0d rail_upset=%0d",
             n_intr, n_ack, n_err, n_err_clr, n_run_stop, n_itime_change, n_rail_upset);
    check(n_rail_upset > 0, "no dual-rail upset rejected");
    check(n_intr > 0, "no end of integration");
    check(n_ack > 0, "no interrupt acknowledge");
    check(n_err > 0, "no overrun");
    check(n_err_clr > 0, "no ERR clear");
    check(n_run_stop > 0, "no RUN stop");
    check(n_itime_change > 0, "no integration-time change");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
