// data_input_pads: the flip-flops of the custom data input pads.
//
// Each three-level data input bit passes through a flip-flop in its pad,
// clocked by the 500 MHz pad clock, so that all samples enter the
// correlation slices aligned to the internal clock. The pad flip-flop is the
// published design; the analog drivers and the delay matching between the
// pad clock and the internal clock are not modelled. No reset: the first
// sample is valid one CK500 cycle after the clock starts.
//
// Interface: ck500 (pad clock CKP), din[N] (pad inputs), dout[N] (internal
// data). Latency one CK500 cycle.
module data_input_pads #(
  parameter int unsigned N = 8
) (
  input  logic         ck500,
  input  logic [N-1:0] din,
  output logic [N-1:0] dout
);

  always_ff @(posedge ck500) begin
    dout <= din;
  end

endmodule
