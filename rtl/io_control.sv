// io_control: the asynchronous host interface of the correlator.
//
// To the host the chip looks like a RAM of 32 16-bit words (see hscc_pkg for
// the map): the sixteen slice buffers, a configuration register holding
// RUN, the integration-time register and a status word with INTR and ERR.
// Reads are combinational: while CS is high and RDN low, data_oe is high and
// data_out shows the addressed word. Writes take effect when WRN rises.
// Completing a read of the last slice buffer acknowledges the interrupt.
//
// The control state is dual-rail, as in the published design: the
// next-state logic (io_next_state) is built twice and each state bit is a
// radiation-tolerant flip-flop (rt_dual_reg) that changes only when both
// copies agree, so a transient in one copy cannot corrupt the state.
// Synthesis must keep both copies (they are separate instances).
//
// Timing (this design's choice): the control runs on CK2. Host strobes are
// synchronised by three registers, so a strobe must stay low for at least
// three CK2 periods and high again for three before the next one, and
// address and data must be stable while the strobe is low. The 32-word map
// and the 5-bit address are published; the rest is this design's.
module io_control
  import hscc_pkg::*;
(
  input  logic              clk,
  input  logic              rstn,
  input  logic              cs,
  input  logic              rdn,
  input  logic              wrn,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  output logic              data_oe,
  input  logic [ACC_W-1:0]  slice_buf [N_SLICES],
  input  logic              intr,
  input  logic              err,
  output logic              run,
  output logic [DATA_W-1:0] itime,
  output logic              ack,
  output logic              err_clr
);

  io_state_t cur;
  io_state_t nxt_a;
  io_state_t nxt_b;

  io_next_state u_rail_a (.cur, .cs, .rdn, .wrn, .addr, .data_in, .nxt(nxt_a));
  io_next_state u_rail_b (.cur, .cs, .rdn, .wrn, .addr, .data_in, .nxt(nxt_b));

  rt_dual_reg #(.W($bits(io_state_t)), .RST(IO_STATE_RESET)) u_state (
    .clk, .rstn, .d_a(nxt_a), .d_b(nxt_b), .q(cur)
  );

  assign run     = cur.run;
  assign itime   = cur.itime;
  assign ack     = cur.ack;
  assign err_clr = cur.err_clr;

  // Read multiplexer.
  assign data_oe = cs && !rdn;

  always_comb begin
    data_out = '0;
    if (addr <= ADDR_BUF_LAST) begin
      data_out = slice_buf[addr[3:0]];
    end else begin
      unique case (addr)
        ADDR_CONFIG: data_out[CFG_RUN_BIT] = cur.run;
        ADDR_ITIME:  data_out = cur.itime;
        ADDR_STATUS: data_out[1:0] = {err, intr};
        default: ;
      endcase
    end
  end

endmodule
