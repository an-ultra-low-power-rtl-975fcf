// corr_slice: one correlation slice of the cross-correlator.
//
// The slice counts the CK500 cycles in which (AX & BX) | (AY & BY) is high
// and reports that count divided by 256 for each integration period. The
// division is split over three stages running at falling clock rates:
//   stage 1 (CK500): product gate and divide-by-16 ripple prescaler;
//   stage 2 (CK63):  edge detector and divide-by-16 counter, gated by RUN;
//   stage 3 (CK2):   ACC_W-bit accumulator and buffer, loaded and cleared at
//                    the end of each integration.
// This three-stage partition is the published design. Prescaler residue is
// not cleared between integrations, so no event is lost: it is carried into
// the next integration.
//
// Interface: the three stage clocks, rstn, the gate inputs, run, load (one
// CK2 cycle); buf_q is the last completed integration's count.
// Latency from an event to the accumulator is at most about 16 CK63 plus
// 2 CK2 cycles.
module corr_slice #(
  parameter int unsigned ACC_W = 16
) (
  input  logic             ck500,
  input  logic             ck63,
  input  logic             ck2,
  input  logic             rstn,
  input  logic             ax,
  input  logic             bx,
  input  logic             ay,
  input  logic             by,
  input  logic             run,
  input  logic             load,
  output logic [ACC_W-1:0] buf_q
);

  logic s1_out;
  logic s2_out;
  logic [ACC_W-1:0] acc_unused;

  corr_stage1 u_stage1 (
    .ck500, .ck63, .rstn, .ax, .bx, .ay, .by, .corrout(s1_out)
  );

  corr_stage2 u_stage2 (
    .ck63, .rstn, .run, .corrin(s1_out), .corrout(s2_out)
  );

  corr_stage3 #(.ACC_W(ACC_W)) u_stage3 (
    .ck2, .rstn, .run, .corrin(s2_out), .load, .buf_q, .cnt_q(acc_unused)
  );

endmodule
