// tb_clock_divider: checks the CK63 and CK2 derived clocks.
//
// Counts CK500 cycles between rising edges of each derived clock (8 and 256)
// and checks that CK2 rises only when CK63 falls.
`timescale 1ns/1ps
module tb_clock_divider;

  logic ck500 = 0, rstn = 1, ck63, ck2;
  int checks = 0, failures = 0;

  clock_divider dut (.*);

  always #1 ck500 = ~ck500;

  longint cyc = 0;
  always @(posedge ck500) cyc++;

  longint last63 = -1, last2 = -1;
  int n63 = 0, n2 = 0;
  logic ck63_prev = 0;

  always @(posedge ck63) if (rstn) begin
    if (last63 >= 0) begin
      checks++;
      if (cyc - last63 != 8) begin failures++; $display("FAIL CK63 period %0d", cyc - last63); end
      n63++;
    end
    last63 = cyc;
  end

  always @(posedge ck2) if (rstn) begin
    if (last2 >= 0) begin
      checks++;
      if (cyc - last2 != 256) begin failures++; $display("FAIL CK2 period %0d", cyc - last2); end
      n2++;
    end
    last2 = cyc;
    checks++;
    if (ck63 !== 1'b0) begin failures++; $display("FAIL CK2 rose while CK63 high"); end
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
    repeat (3) @(posedge ck500);
    rstn = 1;
    repeat (256 * 20) @(posedge ck500);
    checks++;
    if (n2 < 18 || n63 < 600) begin failures++; $display("FAIL too few edges"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
