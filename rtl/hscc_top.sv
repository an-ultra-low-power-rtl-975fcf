// hscc_top: high-speed cross-correlator for a microwave polarimeter.
//
// Two dual-polarisation streams A and B, each with in-phase (I) and
// quadrature (Q) components quantised to three levels (-1, 0, +1) and coded
// as a plus bit P and a minus bit M, arrive at up to 500 Msample/s. Sixteen
// correlation slices count, over a programmable integration time, how often
// a product term is true: eight slices form the direct and inverse cross
// products II+, II-, IQ+, IQ-, QI+, QI-, QQ+, QQ- and eight count the '1'
// states of the eight input pins (wiring in hscc_pkg). Each count is
// reported divided by 256 in a 16-bit buffer.
//
// Blocks: the clock pad (a behavioural model: it delays the internal clock
// CKI behind the pad clock CKP), data input pad flip-flops (CKP), the clock
// divider making CK63 and CK2 from CKI, the slices, the integration timer (clock_counter) with its
// comparator, the interrupt logic (INTR, ERR) and the dual-rail host
// interface (io_control). The block structure, sizes and clock plan follow
// the published design; address map, register layout, reset behaviour and
// host timing are this design's choices (see the blocks' headers).
//
// Because the pad flip-flops have no clock-to-output delay in simulation,
// the slices, clocked by the later CKI, take a sample in the same CK500
// cycle in which the pad captured it; in silicon the pad delay matches the
// CKI delay and the sample arrives one cycle later. Counts are the same.
//
// Use: reset with rstn low, write the integration time (units of 256 CK500
// cycles) and then RUN = 1 in the configuration register. At the end of each
// integration all sixteen buffers are loaded at once and INTR rises; read
// words 0..15 (reading word 15 clears INTR). If INTR is still set at the next
// end of integration, ERR rises. The DATA bus is split into data_in,
// data_out and data_oe; a bidirectional pad combines them.
module hscc_top
  import hscc_pkg::*;
(
  input  logic              ck500,
  input  logic              rstn,
  input  logic              aip,
  input  logic              aim,
  input  logic              aqp,
  input  logic              aqm,
  input  logic              bip,
  input  logic              bim,
  input  logic              bqp,
  input  logic              bqm,
  input  logic              cs,
  input  logic              rdn,
  input  logic              wrn,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  output logic              data_oe,
  output logic              intr,
  output logic              err
);

  logic              ckp;
  logic              ckpn_unused;
  logic              cki;
  logic              ckin_unused;
  logic [N_PINS-1:0] pins;
  logic [N_PINS+1:0] pins_ext;
  logic              ck63;
  logic              ck2;
  logic              run;
  logic [DATA_W-1:0] itime;
  logic              load;
  logic              ack;
  logic              err_clr;
  logic [ACC_W-1:0]  slice_buf [N_SLICES];
  logic [DATA_W-1:0] tick_cnt_unused;

  // Clock pad: CKP for the data pads, the delayed CKI for the core. The
  // inverted clocks of the real pad are not needed by the positive-edge
  // flip-flops of this model.
  clock_pad u_ckpad (
    .ck_pad(ck500), .ckp, .ckpn(ckpn_unused), .cki, .ckin(ckin_unused)
  );

  // Pad flip-flops; bit order follows pin_e.
  data_input_pads #(.N(N_PINS)) u_pads (
    .ck500(ckp),
    .din ({bqm, bqp, bim, bip, aqm, aqp, aim, aip}),
    .dout(pins)
  );

  assign pins_ext = {1'b1, 1'b0, pins};  // PIN_ONE, PIN_ZERO, pins

  clock_divider #(.DIV_W(8)) u_clkdiv (.ck500(cki), .rstn, .ck63, .ck2);

  for (genvar s = 0; s < N_SLICES; s++) begin : g_slice
    corr_slice #(.ACC_W(ACC_W)) u_slice (
      .ck500(cki), .ck63, .ck2, .rstn,
      .ax   (pins_ext[SLICE_WIRING[s].ax]),
      .bx   (pins_ext[SLICE_WIRING[s].bx]),
      .ay   (pins_ext[SLICE_WIRING[s].ay]),
      .by   (pins_ext[SLICE_WIRING[s].by]),
      .run, .load,
      .buf_q(slice_buf[s])
    );
  end

  clock_counter #(.CNT_W(DATA_W)) u_clkcnt (
    .ck2, .rstn, .run, .itime, .load, .cnt_q(tick_cnt_unused)
  );

  interrupt_logic u_intr (
    .clk(ck2), .rstn, .load, .ack, .err_clr, .intr, .err
  );

  io_control u_io (
    .clk(ck2), .rstn, .cs, .rdn, .wrn, .addr, .data_in, .data_out, .data_oe,
    .slice_buf, .intr, .err, .run, .itime, .ack, .err_clr
  );

endmodule
