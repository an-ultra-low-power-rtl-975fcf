// tb_io_control: checks the host interface.
//
// Acts as the host: writes and reads back the configuration and
// integration-time registers, reads all sixteen buffer words (given random
// contents) and the status word, and checks that only a completed read of
// word 15 pulses ack, that a status write pulses err_clr, that a write with
// CS low changes nothing, and that data_oe follows CS and RDN. Also flips
// every bit of one rail of the duplicated next-state logic for one clock
// and checks that the control state ignores it.
`timescale 1ns/1ps
module tb_io_control;
  import hscc_pkg::*;

  logic clk = 0, rstn = 1, cs = 0, rdn = 1, wrn = 1;
  logic [ADDR_W-1:0] addr = 0;
  logic [DATA_W-1:0] data_in = 0, data_out;
  logic data_oe;
  logic [ACC_W-1:0] slice_buf [N_SLICES];
  logic intr = 0, err = 0;
  logic run, ack, err_clr;
  logic [DATA_W-1:0] itime;
  int checks = 0, failures = 0;

  io_control dut (.*);

  always #5 clk = ~clk;

  int n_ack = 0, n_eclr = 0;
  always @(posedge clk) begin
    if (ack) n_ack++;
    if (err_clr) n_eclr++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [4:0] a, input logic [15:0] d, input logic sel = 1);
    cs = sel; addr = a; data_in = d; wrn = 0;
    repeat (4) @(posedge clk);
    #1 wrn = 1;
    repeat (4) @(posedge clk);
    #1 cs = 0; data_in = 16'hdead;
  endtask

  task automatic rd(input logic [4:0] a, output logic [15:0] d);
    cs = 1; addr = a; rdn = 0;
    #1;
    check(data_oe, "data_oe during read");
    repeat (4) @(posedge clk);
    d = data_out;
    #1 rdn = 1;
    #1 check(!data_oe, "data_oe after read");
    repeat (4) @(posedge clk);
    #1 cs = 0;
  endtask

  logic [15:0] v;
  int acks_before;

  // drive an asynchronous reset edge at time zero
  initial #0.5 rstn = 1'b0;

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (slice_buf[s]) slice_buf[s] = 16'($urandom);
    repeat (2) @(posedge clk);
    #1 rstn = 1;
    check(!run && itime == 0 && !ack && !err_clr, "reset state");
    wr(ADDR_ITIME, 16'd1234);
    check(itime == 16'd1234, "itime written");
    rd(ADDR_ITIME, v);
    check(v == 16'd1234, "itime readback");
    wr(ADDR_CONFIG, 16'h0001);
    check(run, "RUN set");
    rd(ADDR_CONFIG, v);
    check(v == 16'h0001, "config readback");
    wr(ADDR_ITIME, 16'd999, 1'b0);
    check(itime == 16'd1234, "write with CS low ignored");
    for (int s = 0; s < 15; s++) begin
      rd(5'(s), v);
      check(v == slice_buf[s], $sformatf("buffer %0d read %h expected %h", s, v, slice_buf[s]));
    end
    check(n_ack == 0, "no ack before word 15");
    rd(5'd15, v);
    check(v == slice_buf[15], "buffer 15");
    check(n_ack == 1, $sformatf("one ack after word 15, got %0d", n_ack));
    intr = 1; err = 1;
    rd(ADDR_STATUS, v);
    check(v == 16'h0003, $sformatf("status %h", v));
    intr = 1; err = 0;
    rd(ADDR_STATUS, v);
    check(v == 16'h0001, $sformatf("status %h", v));
    wr(ADDR_STATUS, 16'h0000);
    check(n_eclr == 1, "err_clr pulse");
    rd(5'h1F, v);
    check(v == 16'h0000, "unused word reads zero");
    // A transient in one rail of the dual-rail next-state logic: rail A
    // computes garbage for one clock edge while a write to the integration
    // time is completing. The state must keep its value in that cycle and
    // the write must still land once the rails agree again.
    cs = 1; addr = ADDR_ITIME; data_in = 16'h4321; wrn = 0;
    repeat (4) @(posedge clk);
    #1 wrn = 1;
    @(negedge clk);
    force dut.nxt_a = ~dut.nxt_b;
    @(posedge clk);
    #1 check(itime == 16'd1234, "state held while rails disagree");
    release dut.nxt_a;
    repeat (4) @(posedge clk);
    #1 cs = 0;
    check(itime == 16'h4321, $sformatf("write completes after the transient, itime=%h", itime));
    wr(ADDR_CONFIG, 16'h0000);
    check(!run, "RUN cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
