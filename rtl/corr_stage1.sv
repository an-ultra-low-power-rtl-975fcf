// corr_stage1: the 500 MHz first stage of a correlation slice.
//
// An AND-OR-2-2 gate forms the product of the two three-level samples:
// z = (AX & BX) | (AY & BY). A toggle flip-flop (BIT0) clocked by CK500
// changes state in every cycle in which z is high. Three further toggle
// flip-flops form a ripple counter, each clocked by the output of the one
// before, so BIT3 completes one period for every 16 cycles with z high.
// A last flip-flop resynchronises BIT3 to CK63 and drives CORROUT.
// This structure is the published one. The asynchronous reset (rstn) of
// all five flip-flops is this design's addition, so that simulation starts
// from a known count.
//
// Because each ripple flip-flop is clocked by the rising edge of the one
// before, the four bits count down: from reset, BIT3 rises at the first
// event and falls at the 9th, then every 16th event.
//
// Timing: CORROUT changes at most once per 8 CK500 cycles, so a CK63 sample
// sees every level. CK63 should be edge-offset from CK500 (see
// clock_divider).
module corr_stage1 (
  input  logic ck500,
  input  logic ck63,
  input  logic rstn,
  input  logic ax,
  input  logic bx,
  input  logic ay,
  input  logic by,
  output logic corrout
);

  logic z;
  logic [3:0] bits;

  assign z = (ax & bx) | (ay & by);

  always_ff @(posedge ck500 or negedge rstn) begin
    if (!rstn) bits[0] <= 1'b0;
    else       bits[0] <= bits[0] ^ z;
  end

  for (genvar i = 1; i < 4; i++) begin : g_ripple
    always_ff @(posedge bits[i-1] or negedge rstn) begin
      if (!rstn) bits[i] <= 1'b0;
      else       bits[i] <= ~bits[i];
    end
  end

  always_ff @(posedge ck63 or negedge rstn) begin
    if (!rstn) corrout <= 1'b0;
    else       corrout <= bits[3];
  end

endmodule
