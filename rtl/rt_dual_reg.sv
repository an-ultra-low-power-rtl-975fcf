// rt_dual_reg: a register of radiation-tolerant dual-input flip-flops.
//
// Each bit has two data inputs, one from each copy of the duplicated
// next-state logic of a dual-rail block. A bit takes the new value only when
// both inputs agree; when they differ (a transient in one copy) it keeps its
// state. The two-input flip-flop and this rule are the published ones; the
// circuit that realises it is not modelled, only its logic behaviour, and
// the reset value parameter is this design's addition.
//
// Interface: clk, rstn (asynchronous, active low, loads RST), d_a and d_b
// (the two rails), q.
module rt_dual_reg #(
  parameter int unsigned W = 1,
  parameter logic [W-1:0] RST = '0
) (
  input  logic         clk,
  input  logic         rstn,
  input  logic [W-1:0] d_a,
  input  logic [W-1:0] d_b,
  output logic [W-1:0] q
);

  logic [W-1:0] agree;

  assign agree = ~(d_a ^ d_b);

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) q <= RST;
    else       q <= (agree & d_a) | (~agree & q);
  end

endmodule
