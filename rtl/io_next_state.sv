// io_next_state: next-state logic of the host interface control.
//
// Purely combinational. It shifts the host strobes RDN and WRN through
// three-stage synchronisers (the third stage only for edge detection) and
// CS through two, captures address, data and chip select in every
// cycle in which a synchronised strobe is low, and acts on the rising edge
// of a strobe using the captured values:
//   WRN rising, selected: write the configuration register (RUN), the
//     integration-time register, or (status address) pulse err_clr;
//   RDN rising, selected, address of the last slice buffer: pulse ack.
// io_control instantiates this block twice, one copy per rail. The
// edge-triggered register write protocol is this design's choice.
module io_next_state
  import hscc_pkg::*;
(
  input  io_state_t         cur,
  input  logic              cs,
  input  logic              rdn,
  input  logic              wrn,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data_in,
  output io_state_t         nxt
);

  logic strobe_low;
  logic wr_edge;
  logic rd_edge;

  assign strobe_low = !cur.wrn_s[1] || !cur.rdn_s[1];
  assign wr_edge    = cur.wrn_s[1] && !cur.wrn_s[2] && cur.sel_c;
  assign rd_edge    = cur.rdn_s[1] && !cur.rdn_s[2] && cur.sel_c;

  always_comb begin
    nxt         = cur;
    nxt.cs_s    = {cur.cs_s[0], cs};
    nxt.rdn_s   = {cur.rdn_s[1:0], rdn};
    nxt.wrn_s   = {cur.wrn_s[1:0], wrn};
    nxt.ack     = 1'b0;
    nxt.err_clr = 1'b0;

    if (strobe_low) begin
      nxt.sel_c  = cur.cs_s[1];
      nxt.addr_c = addr;
      nxt.data_c = data_in;
    end

    if (wr_edge) begin
      unique case (cur.addr_c)
        ADDR_CONFIG: nxt.run     = cur.data_c[CFG_RUN_BIT];
        ADDR_ITIME:  nxt.itime   = cur.data_c;
        ADDR_STATUS: nxt.err_clr = 1'b1;
        default: ;
      endcase
    end

    if (rd_edge && cur.addr_c == ADDR_BUF_LAST) begin
      nxt.ack = 1'b1;
    end
  end

endmodule
