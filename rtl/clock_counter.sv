// clock_counter: integration timer of the correlator.
//
// A CNT_W-bit counter clocked by CK2 (one tick per 256 CK500 cycles) runs
// while RUN is high and is held at zero while RUN is low. It is compared with
// the integration-time register; when it reaches itime-1 the comparator
// raises load for one CK2 cycle and the counter restarts from zero. One
// integration therefore lasts itime ticks, i.e. itime*256 CK500 cycles, and
// itime = 0 gives the longest one, 2^CNT_W ticks (2^24 CK500 cycles with the
// default width). The counter, RUN, the comparator and the 2^8-cycle step
// follow the published design; the encoding of itime (count-1 compare, zero
// meaning the maximum) is this design's choice.
//
// Interface: ck2, rstn (asynchronous, active low), run, itime; load is
// combinational from the counter and itime and is sampled by the slices and
// the interrupt logic on the same CK2 edge that restarts the counter.
module clock_counter #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             ck2,
  input  logic             rstn,
  input  logic             run,
  input  logic [CNT_W-1:0] itime,
  output logic             load,
  output logic [CNT_W-1:0] cnt_q
);

  logic [CNT_W-1:0] last;

  assign last = itime - 1'b1;
  assign load = run && (cnt_q == last);

  always_ff @(posedge ck2 or negedge rstn) begin
    if (!rstn)      cnt_q <= '0;
    else if (!run)  cnt_q <= '0;
    else if (load)  cnt_q <= '0;
    else            cnt_q <= cnt_q + 1'b1;
  end

endmodule
