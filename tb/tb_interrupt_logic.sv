// tb_interrupt_logic: checks INTR and ERR.
//
// Drives random load, ack and err_clr pulses and compares INTR and ERR with
// a reference written from the rules: a load sets INTR, an ack clears it; a
// load while INTR is set and no ack arrives sets ERR, which stays until
// err_clr. Counts that every case (set, clear, overrun, error clear) occurred.
`timescale 1ns/1ps
module tb_interrupt_logic;

  logic clk = 0, rstn = 1, load = 0, ack = 0, err_clr = 0, intr, err;
  int checks = 0, failures = 0;

  interrupt_logic dut (.*);

  always #5 clk = ~clk;

  bit m_intr = 0, m_err = 0;
  int n_set = 0, n_ack = 0, n_ovr = 0, n_eclr = 0;

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
    repeat (2) @(posedge clk);
    #1 rstn = 1;
    for (int i = 0; i < 2000; i++) begin
      load    = ($urandom_range(9) == 0);
      ack     = ($urandom_range(7) == 0);
      err_clr = ($urandom_range(29) == 0);
      @(posedge clk);
      // reference update
      if (load && m_intr && !ack) begin m_err = 1; n_ovr++; end
      else if (err_clr && m_err) begin m_err = 0; n_eclr++; end
      if (load) begin m_intr = 1; n_set++; end
      else if (ack && m_intr) begin m_intr = 0; n_ack++; end
      #1;
      checks++;
      if (intr !== m_intr || err !== m_err) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d intr=%0d/%0d err=%0d/%0d", i, intr, m_intr, err, m_err);
      end
    end
    checks++;
    if (n_set == 0 || n_ack == 0 || n_ovr == 0 || n_eclr == 0) begin
      failures++;
      $display("FAIL coverage %0d %0d %0d %0d", n_set, n_ack, n_ovr, n_eclr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
