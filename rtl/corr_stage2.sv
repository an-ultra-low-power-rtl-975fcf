// corr_stage2: the 63 MHz second stage of a correlation slice.
//
// CORRIN (stage-1 output) is registered into OLD_CORRIN; OLD_CORRIN ANDed
// with RUN is registered into OLDER_CORRIN. The counter is enabled when
// OLDER_CORRIN is high and OLD_CORRIN is low, i.e. once for each falling
// edge of CORRIN, and so once per 16 stage-1 events. A 4-bit counter makes
// the second divide-by-16, and its MSB is the stage output CORROUT, which
// falls once per 256 gate events. The register and gate structure follows
// the published stage-2 diagram. That RUN low holds the 4-bit counter
// cleared, and the asynchronous reset, are this design's reading.
//
// Interface: ck63 clock, rstn asynchronous active-low reset, run, corrin;
// corrout. Detection latency is two CK63 cycles.
module corr_stage2 (
  input  logic ck63,
  input  logic rstn,
  input  logic run,
  input  logic corrin,
  output logic corrout
);

  logic       old_corrin;
  logic       older_corrin;
  logic       count;
  logic [3:0] cnt_q;

  assign count = older_corrin & ~old_corrin;

  always_ff @(posedge ck63 or negedge rstn) begin
    if (!rstn) begin
      old_corrin   <= 1'b0;
      older_corrin <= 1'b0;
      cnt_q        <= '0;
    end else begin
      old_corrin   <= corrin;
      older_corrin <= old_corrin & run;
      if (!run)       cnt_q <= '0;
      else if (count) cnt_q <= cnt_q + 1'b1;
    end
  end

  assign corrout = cnt_q[3];

endmodule
