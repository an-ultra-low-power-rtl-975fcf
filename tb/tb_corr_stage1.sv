// tb_corr_stage1: checks the 500 MHz stage of a correlation slice.
//
// Random gate inputs drive the stage; CK63 is made here as CK500/8 with its
// edges at CK500 falling edges. A reference model counts the cycles in which
// (AX&BX)|(AY&BY) holds and keeps a 4-bit down counter of them; at every CK63
// rising edge CORROUT must equal bit 3 of the model as it was at that time.
// Also checks that the number of CORROUT falling edges equals
// floor((events + 7) / 16).
`timescale 1ns/1ps
module tb_corr_stage1;

  logic ck500 = 1'b0, ck63 = 1'b0, rstn = 1'b1;
  logic ax, bx, ay, by, corrout;
  int checks = 0, failures = 0;

  corr_stage1 dut (.*);

  always #1 ck500 = ~ck500;

  int div = 0;
  always @(negedge ck500) begin
    div = (div + 1) % 8;
    ck63 = (div >= 4);
  end

  logic [3:0] model = 4'd0;
  logic [3:0] model_at_edge;
  int events = 0, falls = 0;
  logic prev_out = 1'b0;
  int density = 50;   // percent of cycles with z high

  always @(negedge ck500) begin
    ax = ($urandom_range(99) < density);
    bx = ($urandom_range(99) < ((density == 100) ? 100 : 70));
    ay = ($urandom_range(99) < density);
    by = ($urandom_range(99) < 30);
  end

  always @(posedge ck500) begin
    if (rstn && ((ax & bx) | (ay & by))) begin
      model <= model - 1'b1;
      events <= events + 1;
    end
  end

  always @(posedge ck63) begin
    model_at_edge = model;
    #0.1;
    if (rstn) begin
      checks++;
      if (corrout !== model_at_edge[3]) begin
        failures++;
        if (failures < 10) $display("FAIL corrout=%0d model=%0d at %t", corrout, model_at_edge, $time);
      end
      if (prev_out && !corrout) falls++;
      prev_out = corrout;
    end
  end

  // drive an asynchronous reset edge at time zero
  initial #0.5 rstn = 1'b0;

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ax = 0; bx = 0; ay = 0; by = 0;
    repeat (5) @(posedge ck500);
    @(negedge ck500) rstn = 1'b1;
    repeat (5000) @(posedge ck500);
    density = 100;                 // the fastest input: z high every cycle
    repeat (3000) @(posedge ck500);
    density = 10;
    repeat (3000) @(posedge ck500);
    density = 0;
    repeat (100) @(posedge ck500);
    checks++;
    if (falls != (events + 7) / 16) begin
      failures++;
      $display("FAIL falls=%0d events=%0d", falls, events);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
