// corr_stage3: the 2 MHz third stage of a correlation slice.
//
// The stage-2 output is sampled by CK2 with the same two-register edge
// detector as stage 2, and the ACC_W-bit accumulator counts one for each of
// its falling edges, i.e. once for every 256 CK500 cycles in which the
// slice's gate was high. At the end of an integration (load, one CK2 cycle
// wide) the accumulator, including a count arriving in that cycle, is
// copied into the buffer and cleared so that the next integration starts
// at once; the buffer holds its value for the host until the next load.
// The counter, the buffer and the load/clear behaviour are the published
// design. The edge detector, clearing while RUN is low and saturation at
// the all-ones value are this design's choices.
//
// Rate limit: the stage-2 MSB stays low or high for 128 gate events. To be
// seen by every CK2 sample it must last one CK2 period (256 CK500 cycles),
// so counts are exact while the gate is high in at most half the CK500
// cycles on average over any 128 events. Three-level samples of noise-like
// signals stay well below that.
//
// Interface: ck2 clock, rstn asynchronous active-low reset, run, corrin,
// load; buf_q (buffer), cnt_q (live accumulator, for observation).
module corr_stage3 #(
  parameter int unsigned ACC_W = 16
) (
  input  logic             ck2,
  input  logic             rstn,
  input  logic             run,
  input  logic             corrin,
  input  logic             load,
  output logic [ACC_W-1:0] buf_q,
  output logic [ACC_W-1:0] cnt_q
);

  logic             old_corrin;
  logic             older_corrin;
  logic             inc;
  logic [ACC_W-1:0] cnt_next;

  assign inc      = older_corrin & ~old_corrin;
  assign cnt_next = (inc && cnt_q != '1) ? cnt_q + 1'b1 : cnt_q;

  always_ff @(posedge ck2 or negedge rstn) begin
    if (!rstn) begin
      old_corrin   <= 1'b0;
      older_corrin <= 1'b0;
      cnt_q        <= '0;
      buf_q        <= '0;
    end else begin
      old_corrin   <= corrin;
      older_corrin <= old_corrin & run;
      if (!run) begin
        cnt_q <= '0;
      end else if (load) begin
        buf_q <= cnt_next;
        cnt_q <= '0;
      end else begin
        cnt_q <= cnt_next;
      end
    end
  end

endmodule
