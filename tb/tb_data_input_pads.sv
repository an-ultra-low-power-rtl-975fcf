// tb_data_input_pads: checks that each pad flip-flop delivers its input one
// CK500 cycle later.
`timescale 1ns/1ps
module tb_data_input_pads;

  logic ck500 = 0;
  logic [7:0] din = 0, dout;
  int checks = 0, failures = 0;

  data_input_pads dut (.*);

  always #1 ck500 = ~ck500;

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      @(negedge ck500);
      din = 8'($urandom);
      @(posedge ck500);
      #0.5;
      checks++;
      if (dout !== din) begin failures++; if (failures < 10) $display("FAIL dout=%h din=%h", dout, din); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
