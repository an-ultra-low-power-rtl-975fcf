// clock_pad: behavioural model of the custom 500 MHz clock input pad.
//
// This is a behavioural model, not synthesizable logic: the real pad is a
// full-custom analog circuit. From the pad input it drives two clock pairs.
// CKP/CKPN go along the pad ring to the data input pads; a buffer drives CKP
// and an inverter CKPN, their delays matched so the pair has no skew.
// CKI/CKIN is the internal pair for the first stage of every correlation
// slice; it passes through an extra delay that compensates the clock-to-output
// delay of the data pad flip-flop, so the slice samples pad data that has
// already settled and the whole cycle is left to the correlation gate.
// The structure is the published one; the delay values are this model's
// (the driver delays are equal by construction, T_DRV, and the extra internal
// delay is T_INT). Under synthesis the delays vanish and the pad reduces to
// buffers and inverters.
//
// Interface: ck_pad input; ckp, ckpn, cki, ckin outputs.
module clock_pad #(
  parameter realtime T_DRV = 0.02ns,
  parameter realtime T_INT = 0.10ns
) (
  input  logic ck_pad,
  output logic ckp,
  output logic ckpn,
  output logic cki,
  output logic ckin
);

  logic ck_delayed;

  assign #(T_DRV) ckp  = ck_pad;
  assign #(T_DRV) ckpn = ~ck_pad;
  assign #(T_INT) ck_delayed = ck_pad;
  assign #(T_DRV) cki  = ck_delayed;
  assign #(T_DRV) ckin = ~ck_delayed;

endmodule
