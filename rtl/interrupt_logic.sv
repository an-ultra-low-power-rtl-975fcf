// interrupt_logic: INTR and ERR of the correlator.
//
// INTR is set at every end of integration (load) to tell the host that new
// buffer contents are ready, and is cleared when the host has read them
// (ack). If an integration ends while INTR is still set, the unread data is
// overwritten and ERR is set. These rules are the published ones. What
// counts as "read" (ack, produced by the host interface), that ERR stays set
// until the host clears it (err_clr) and that an ack in the same cycle as a
// load counts as a read in time are this design's choices.
//
// Interface: clk (CK2), rstn (asynchronous, active low), load, ack and
// err_clr (one-cycle pulses); intr, err registered outputs.
module interrupt_logic (
  input  logic clk,
  input  logic rstn,
  input  logic load,
  input  logic ack,
  input  logic err_clr,
  output logic intr,
  output logic err
);

  logic overrun;

  assign overrun = load && intr && !ack;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      intr <= 1'b0;
      err  <= 1'b0;
    end else begin
      if (load)     intr <= 1'b1;
      else if (ack) intr <= 1'b0;
      if (overrun)      err <= 1'b1;
      else if (err_clr) err <= 1'b0;
    end
  end

endmodule
