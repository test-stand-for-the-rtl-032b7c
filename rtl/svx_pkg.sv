// svx_pkg: types and constants shared by the STAR, TFIB and TPC blocks of the
// SVX-II silicon detector test stand.
//
// The whole stand runs synchronously on one system clock that stands for the
// 53 MHz accelerator RF clock. The SVX readout clock runs at half that rate and
// every readout byte is one system-clock cycle long, which gives the 53 MB/s
// byte stream. A byte on an SVX data bus carries the level of the readout clock
// in `hi_half`: the chip ID and every channel address travel in the high half
// of a readout clock, the status byte and every data byte in the low half.
//
// Command codes, the end-of-readout (EOR) code and the serial framing of the
// low level commands are this design's own choices; the document names the
// commands but gives no encodings.
package svx_pkg;

  // Numbers taken from the description of the chip and the boards.
  localparam int unsigned SVX_CHANNELS   = 128; // channels per SVX chip
  localparam int unsigned SVX_PIPE_DEPTH = 32;  // analog pipeline cells per channel
  localparam int unsigned SVX_ADC_BITS   = 8;   // digitization resolution, up to 8 bits
  localparam int unsigned N_HDI          = 3;   // sets of SVX chips (HDI cables) per TPC
  localparam int unsigned RF_PER_SYNC    = 7;   // RF clocks between potential crossings

  // Own choice: end of readout code. It is only recognised in the high half
  // of a readout clock, where otherwise a chip ID or a 7-bit channel address
  // (0..127) would be, so it never collides with data.
  localparam logic [7:0] EOR_CODE = 8'hFF;

  // One byte of an SVX data bus, as carried between TPC, TFIB and STAR.
  typedef struct packed {
    logic       valid;   // a byte is on the bus this cycle
    logic       hi_half; // level of the 26.5 MHz readout clock
    logic [7:0] data;
  } svx_byte_t;

  // High level commands from the STAR (or the TFIB emulation FIFO) to the TFIB.
  typedef enum logic [3:0] {
    HL_NOP          = 4'h0,
    HL_ACQUIRE      = 4'h1, // put the SVX chips into acquisition mode
    HL_DIG_READOUT  = 4'h2, // digitize and read out one event
    HL_READOUT      = 4'h3, // read out without digitizing
    HL_CAL_INJECT   = 4'h4, // calibration charge injection
    HL_PREAMP_RESET = 4'h5, // reset the SVX preamplifiers
    HL_RESET        = 4'h6, // reset TFIB sequencer, TPC and SVX chips
    HL_TEST         = 4'h7  // diagnostic: answer with a test pulse, nothing else
  } hl_cmd_e;

  // Command bus from the STAR to the TFIB (J3 backplane or front panel).
  typedef struct packed {
    logic    strobe;  // one-cycle command strobe
    hl_cmd_e cmd;
  } cmd_bus_t;

  // Low level commands sent serially from the TFIB to the TPC controller:
  // the seven functions of the TPC controller.
  typedef enum logic [2:0] {
    LL_INIT         = 3'd0, // set SVX chips to configuration mode
    LL_READOUT      = 3'd1,
    LL_ACQUIRE      = 3'd2,
    LL_PREAMP_RESET = 3'd3,
    LL_CAL_INJECT   = 3'd4,
    LL_DIG_READOUT  = 3'd5,
    LL_READBACK     = 3'd6,
    LL_CONFIG_TPC   = 3'd7  // load the TPC controller configuration byte
  } ll_cmd_e;
  localparam int unsigned LL_BITS = 3;
  // Bits of the TPC controller configuration, sent one per sclk edge after
  // LL_CONFIG_TPC; bits [N_HDI-1:0] enable the SVX clock to each HDI.
  localparam int unsigned TPC_CFG_BITS = 8;
  // Bits the TPC controller returns on its serial data line for LL_READBACK:
  // its configuration byte, then a status byte.
  localparam int unsigned READBACK_BITS = 16;

  // Number of serial command clock rising edges each low level command needs
  // after its code, before the TPC controller takes a new command.
  function automatic int unsigned ll_edges(ll_cmd_e c);
    case (c)
      LL_DIG_READOUT, LL_PREAMP_RESET, LL_CAL_INJECT: return 2;
      LL_READBACK:                                    return READBACK_BITS;
      LL_CONFIG_TPC:                                  return TPC_CFG_BITS;
      default:                                        return 1;
    endcase
  endfunction

  // Operating mode of the SVX chips, as set by the TPC controller.
  typedef enum logic [1:0] {
    SVX_CONFIG   = 2'd0,
    SVX_ACQUIRE  = 2'd1,
    SVX_DIGITIZE = 2'd2,
    SVX_READOUT  = 2'd3
  } svx_mode_e;

  // Control lines from the TPC to one HDI (a chain of SVX chips).
  typedef struct packed {
    svx_mode_e  mode;
    logic       preamp_reset;
    logic       cal_inject;
    logic       clk;       // buffered SVX chip clock
    logic       serial_in; // configuration bit stream in configuration mode
  } hdi_ctrl_t;

  // Immediate commands, issued by the VME CPU through the TFIB control
  // register.
  typedef enum logic [2:0] {
    IMM_HL         = 3'd0, // execute the high level command given with it
    IMM_EMULATE    = 3'd1, // execute the command list in the Cmd/Conf FIFO
    IMM_CONFIG_SVX = 3'd2, // download SVX configuration bytes from the FIFO
    IMM_READBACK   = 3'd3, // read back the TPC controller configuration and state
    IMM_RESET      = 3'd4, // reset TPC and SVX control lines
    IMM_CONFIG_TPC = 3'd5  // download the TPC controller configuration byte from the FIFO
  } imm_cmd_e;

  // Timing and readout settings of the TFIB controller (TFIB registers).
  // All times are in system clocks; a *_hi/*_lo pair gives the high and low
  // time of the SVX chip clock.
  typedef struct packed {
    logic [7:0]       sclk_half;  // half period of the serial command clock
    logic [7:0]       acq_hi;     // SVX clock in acquisition mode
    logic [7:0]       acq_lo;
    logic [7:0]       dig_hi;     // SVX clock while digitizing
    logic [7:0]       dig_lo;
    logic [15:0]      n_dig;      // SVX clocks for one digitization
    logic [7:0]       ro_hi;      // SVX clock while reading out
    logic [7:0]       ro_lo;
    logic [15:0]      ro_max;     // readout clocks before giving up on EOR
    logic [15:0]      hold;       // time between the two edges of 2-edge commands
    logic [7:0]       cfg_bytes;  // configuration bytes per SVX download
    logic [N_HDI-1:0] hdi_en;     // HDIs whose EOR ends a readout
  } tfib_cfg_t;

  // Readout State Machine trigger modes (STAR control register).
  typedef enum logic [1:0] {
    TRG_EXTERNAL = 2'd0, // beam or cosmic trigger input
    TRG_LASER    = 2'd1, // internal, laser pulser fired at a programmed crossing
    TRG_CHARGE   = 2'd2, // internal, charge injection then readout
    TRG_OFF      = 2'd3
  } trig_mode_e;

endpackage
