// tb_hscc_max_integration: the longest integration the correlator offers.
//
// Programs integration time 0, which selects 65536 CK2 ticks, i.e. 2^24
// CK500 cycles, runs one full integration with random three-level data at
// the full sample rate and checks that INTR rises exactly 2^24 CK500 cycles
// after RUN took effect inside the chip (the integration starts there), and
// that every slice's 16-bit buffer holds the event count divided by 256
// (within 2) without overflow. All sizes are the defaults.
`timescale 1ns/1ps
module tb_hscc_max_integration;

  localparam int NS = 16;
  localparam int TICK = 256;

  logic ck500 = 1'b0;
  logic rstn = 1'b1;
  logic aip, aim, aqp, aqm, bip, bim, bqp, bqm;
  logic cs = 0, rdn = 1, wrn = 1;
  logic [4:0]  addr = 0;
  logic [15:0] data_in = 0;
  logic [15:0] data_out;
  logic        data_oe, intr, err;
  int checks = 0, failures = 0;

  hscc_top dut (.*);

  always #1 ck500 = ~ck500;

  bit  gen_on = 1'b0;
  longint events [NS];
  longint cycle = 0;

  function automatic int rand3();
    int unsigned r = $urandom_range(3);
    return (r == 0) ? 1 : (r == 1) ? -1 : 0;
  endfunction

  // Same product definitions as the end-to-end test: pairs II, IQ, QI, QQ,
  // direct on even, inverse on odd slices; then the eight pin levels.
  always @(negedge ck500) begin
    int ai, aq, bi, bq, a, b;
    logic [7:0] p;
    if (gen_on) begin
      ai = rand3(); aq = rand3();
      bi = ($urandom_range(1) == 0) ? ai : rand3();
      bq = rand3();
    end else begin
      ai = 0; aq = 0; bi = 0; bq = 0;
    end
    p = {bq < 0, bq > 0, bi < 0, bi > 0, aq < 0, aq > 0, ai < 0, ai > 0};
    {bqm, bqp, bim, bip, aqm, aqp, aim, aip} = p;
    for (int s = 0; s < 8; s++) begin
      a = (s / 4 == 0) ? ai : aq;
      b = ((s / 2) % 2 == 0) ? bi : bq;
      if ((s % 2 == 0) ? (a * b == 1) : (a * b == -1)) events[s]++;
    end
    for (int s = 8; s < NS; s++) if (p[s - 8]) events[s]++;
  end

  always @(posedge ck500) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bus_write(input logic [4:0] a, input logic [15:0] d);
    cs = 1'b1; addr = a; data_in = d; wrn = 1'b0;
    repeat (4 * TICK) @(posedge ck500);
    wrn = 1'b1;
    repeat (4 * TICK) @(posedge ck500);
    cs = 1'b0;
  endtask

  task automatic bus_read(input logic [4:0] a, output logic [15:0] d);
    cs = 1'b1; addr = a; rdn = 1'b0;
    repeat (2 * TICK) @(posedge ck500);
    d = data_out;
    repeat (2 * TICK) @(posedge ck500);
    rdn = 1'b1;
    repeat (4 * TICK) @(posedge ck500);
    cs = 1'b0;
  endtask

  initial begin
    #(2 * 20_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t_intr [2];
  longint snap [2][NS];
  logic [15:0] v;

  initial begin
    foreach (events[s]) events[s] = 0;
    #0.5 rstn = 1'b0;
    repeat (20) @(posedge ck500);
    rstn = 1'b1;
    bus_write(5'h11, 16'd0);
    fork
      bus_write(5'h10, 16'd1);
      begin
        @(posedge dut.run);
        t_intr[0] = cycle;
        snap[0] = events;
      end
    join
    gen_on = 1'b1;
    @(posedge intr);
    t_intr[1] = cycle;
    snap[1] = events;
    check(t_intr[1] - t_intr[0] == 64'd1 << 24,
          $sformatf("integration lasted %0d cycles", t_intr[1] - t_intr[0]));
    for (int s = 0; s < NS; s++) begin
      longint e;
      bus_read(5'(s), v);
      e = (snap[1][s] - snap[0][s]) / 256;
      check(longint'(v) >= e - 2 && longint'(v) <= e + 2,
            $sformatf("slice %0d buffer %0d expected about %0d", s, v, e));
    end
    check(!intr, "INTR cleared by reading the buffers");
    check(!err, "no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
