// tb_clock_pad: checks the clock pad model.
//
// Drives a 500 MHz clock and checks, shortly after each input edge, that
// CKP/CKPN are complementary, that CKPN is the inverse of CKP at all check
// points, and that CKI follows CKP only after the internal delay: just after
// CKP has changed, CKI still holds the old level, and it has changed by the
// time the internal delay has passed.
`timescale 1ns/1ps
module tb_clock_pad;

  logic ck_pad = 0, ckp, ckpn, cki, ckin;
  int checks = 0, failures = 0;

  clock_pad dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %t", what, $time); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int i = 0; i < 200; i++) begin
      ck_pad = ~ck_pad;
      #0.05;   // after the driver delay, before the internal delay
      check(ckp == ck_pad && ckpn == ~ck_pad, "CKP/CKPN follow the pad");
      check(cki == ~ck_pad && ckin == ck_pad, "CKI/CKIN not yet changed");
      #0.15;   // after the internal delay
      check(cki == ck_pad && ckin == ~ck_pad, "CKI/CKIN follow after the delay");
      #0.8;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
