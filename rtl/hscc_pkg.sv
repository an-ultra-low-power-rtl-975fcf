// hscc_pkg: constants and types shared by the cross-correlator blocks.
//
// The chip looks to its host like a small RAM of 32 16-bit words. Words
// 0..15 are the buffers of the sixteen correlation slices, followed by the
// configuration register, the integration-time register and a status word.
// The slice order, the register addresses, the register bit layout and the
// read-acknowledge rule are this design's choices; the word count, word
// width, the 5-bit address and the sixteen slices follow the published
// design.
//
// The slice wiring table says which input pin feeds each of the four gate
// inputs (AX, BX, AY, BY) of every slice. Slices 0..7 form the direct (+)
// and inverse (-) cross products of A and B; slices 8..15 count the '1'
// states of the eight input pins.
package hscc_pkg;

  localparam int unsigned ACC_W    = 16;  // slice counter and buffer width
  localparam int unsigned ADDR_W   = 5;   // host address width
  localparam int unsigned DATA_W   = 16;  // host data width
  localparam int unsigned N_SLICES = 16;  // correlation slices
  localparam int unsigned N_PINS   = 8;   // three-level data input bits

  // Input pin index. Two pseudo-pins give the constant levels used to turn
  // the AND-OR gate of a slice into a plain pin counter.
  typedef enum logic [3:0] {
    PIN_AIP = 4'd0, PIN_AIM = 4'd1, PIN_AQP = 4'd2, PIN_AQM = 4'd3,
    PIN_BIP = 4'd4, PIN_BIM = 4'd5, PIN_BQP = 4'd6, PIN_BQM = 4'd7,
    PIN_ZERO = 4'd8, PIN_ONE = 4'd9
  } pin_e;

  typedef struct packed {
    pin_e ax;
    pin_e bx;
    pin_e ay;
    pin_e by;
  } slice_wiring_t;

  // Direct product XY+: AX=AXP, BX=BYP, AY=AXM, BY=BYM  (counts +1*+1 and -1*-1)
  // Inverse product XY-: AX=AXP, BX=BYM, AY=AXM, BY=BYP (counts +1*-1 and -1*+1)
  localparam slice_wiring_t SLICE_WIRING [N_SLICES] = '{
    '{PIN_AIP, PIN_BIP, PIN_AIM, PIN_BIM},   //  0 II+
    '{PIN_AIP, PIN_BIM, PIN_AIM, PIN_BIP},   //  1 II-
    '{PIN_AIP, PIN_BQP, PIN_AIM, PIN_BQM},   //  2 IQ+
    '{PIN_AIP, PIN_BQM, PIN_AIM, PIN_BQP},   //  3 IQ-
    '{PIN_AQP, PIN_BIP, PIN_AQM, PIN_BIM},   //  4 QI+
    '{PIN_AQP, PIN_BIM, PIN_AQM, PIN_BIP},   //  5 QI-
    '{PIN_AQP, PIN_BQP, PIN_AQM, PIN_BQM},   //  6 QQ+
    '{PIN_AQP, PIN_BQM, PIN_AQM, PIN_BQP},   //  7 QQ-
    '{PIN_AIP, PIN_ONE, PIN_ZERO, PIN_ZERO}, //  8 ones on AIP
    '{PIN_AIM, PIN_ONE, PIN_ZERO, PIN_ZERO}, //  9 ones on AIM
    '{PIN_AQP, PIN_ONE, PIN_ZERO, PIN_ZERO}, // 10 ones on AQP
    '{PIN_AQM, PIN_ONE, PIN_ZERO, PIN_ZERO}, // 11 ones on AQM
    '{PIN_BIP, PIN_ONE, PIN_ZERO, PIN_ZERO}, // 12 ones on BIP
    '{PIN_BIM, PIN_ONE, PIN_ZERO, PIN_ZERO}, // 13 ones on BIM
    '{PIN_BQP, PIN_ONE, PIN_ZERO, PIN_ZERO}, // 14 ones on BQP
    '{PIN_BQM, PIN_ONE, PIN_ZERO, PIN_ZERO}  // 15 ones on BQM
  };

  // Host address map.
  // Words 0..15 hold the buffers of slices 0..15.
  localparam logic [ADDR_W-1:0] ADDR_BUF_LAST  = 5'h0F;  // slice 15 buffer; reading it acknowledges INTR
  localparam logic [ADDR_W-1:0] ADDR_CONFIG    = 5'h10;  // bit 0: RUN
  localparam logic [ADDR_W-1:0] ADDR_ITIME     = 5'h11;  // integration time in units of 256 CK500 cycles, 0 = 65536
  localparam logic [ADDR_W-1:0] ADDR_STATUS    = 5'h12;  // read: bit 0 INTR, bit 1 ERR; write: clears ERR

  localparam int unsigned CFG_RUN_BIT = 0;

  // State of the host interface control, held in dual-rail registers.
  // The strobe synchronisers shift towards the higher index: [0] is the
  // newest sample. RDN and WRN have a third stage for edge detection; chip
  // select needs none.
  typedef struct packed {
    logic [1:0]        cs_s;
    logic [2:0]        rdn_s;
    logic [2:0]        wrn_s;
    logic              sel_c;    // chip select captured during the strobe
    logic [ADDR_W-1:0] addr_c;   // address captured during the strobe
    logic [DATA_W-1:0] data_c;   // write data captured during the strobe
    logic              run;      // configuration register, RUN bit
    logic [DATA_W-1:0] itime;    // integration-time register
    logic              ack;      // one-cycle pulse: last buffer word read
    logic              err_clr;  // one-cycle pulse: status word written
  } io_state_t;

  localparam io_state_t IO_STATE_RESET = '{
    cs_s: 2'b00, rdn_s: 3'b111, wrn_s: 3'b111, sel_c: 1'b0,
    addr_c: '0, data_c: '0, run: 1'b0, itime: '0, ack: 1'b0, err_clr: 1'b0
  };

endpackage
