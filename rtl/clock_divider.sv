// clock_divider: derives the stage clocks of the correlator from CK500.
//
// A free-running DIV_W-bit counter divides the 500 MHz clock. Bit 2 toggles
// every 4 cycles and gives CK63 (CK500/8, 62.5 MHz) for the second slice
// stage; the top bit gives CK2 (CK500/256, about 1.95 MHz) for the third
// stage, the clock counter and the control logic. The division ratios follow
// the published clock plan (a divide-by-256 producing 63 MHz and 2 MHz).
// This design counts on the falling edge of CK500, so the derived clock
// edges fall half a CK500 period after the edges that update stage 1: the
// resynchronising flip-flop then samples a settled ripple counter, and the
// rising edges of CK2 coincide with falling edges of CK63, never with their
// rising edges.
//
// Interface: ck500, rstn (asynchronous, active low, clears the counter);
// ck63, ck2 outputs.
module clock_divider #(
  parameter int unsigned DIV_W = 8
) (
  input  logic ck500,
  input  logic rstn,
  output logic ck63,
  output logic ck2
);

  logic [DIV_W-1:0] div_q;

  always_ff @(negedge ck500 or negedge rstn) begin
    if (!rstn) div_q <= '0;
    else       div_q <= div_q + 1'b1;
  end

  assign ck63 = div_q[2];
  assign ck2  = div_q[DIV_W-1];

endmodule
