// tpc_controller: the TPC Controller (an FPGA on the port card).
//
// It receives low level commands from the TFIB on a serial command line
// `scmd`, sampled on rising edges of the serial command clock `sclk`, and
// drives the control lines of the SVX chips on the HDI cables. A command is
// a start bit (1) followed by the LL_BITS-bit command code, MSB first. After
// the code the controller steps through the command's control sequence, one
// state per further rising edge of `sclk`; it needs ll_edges(cmd) edges
// before it accepts a new command (`ready`). The TFIB sets how long each
// state lasts by how far apart it places these edges.
//
// Control sequences (state reached at each edge after the code):
//   LL_INIT         : 1: mode = CONFIG (scmd is routed to the chips' serial
//                     input; configuration bits are clocked by the SVX clock)
//   LL_READOUT      : 1: mode = READOUT
//   LL_ACQUIRE      : 1: mode = ACQUIRE, reset and inject lines low
//   LL_PREAMP_RESET : 1: preamp_reset high   2: low
//   LL_CAL_INJECT   : 1: cal_inject high     2: low
//   LL_DIG_READOUT  : 1: mode = DIGITIZE     2: mode = READOUT
//   LL_READBACK     : edges 1..16 each put one bit on `sdo`, MSB first: the
//                     configuration byte, then the status byte
//                     {1, SVX mode, previous command, 2'b10}
//   LL_CONFIG_TPC   : edges 1..8 each take one configuration bit from
//                     `scmd`, MSB first; the byte takes effect at the 8th
//                     edge. Bits [2:0] enable the SVX clock to HDI A, B, C
//                     (`hdi_en`); the other bits are only stored and read
//                     back. Reset value 8'h07, all HDIs clocked.
// The seven functions, the serial line and clock, the fixed number of edges
// per command and the one-state-per-edge stepping follow the document. The
// framing, the codes and the exact states are this design's own. The
// original controller is an FPGA loaded by the TFIB, with a readback of that
// FPGA configuration; an FPGA bitstream cannot be expressed in RTL, so here
// the TFIB loads and reads back a configuration byte of the controller
// through the same serial line (LL_CONFIG_TPC, LL_READBACK).
//
// The SVX chip clock `svx_clk` from the TFIB is buffered (registered once)
// onto `ctrl.clk`. `tpc_rst` is a synchronous reset from the TFIB; after it
// the chips are left in acquisition mode.
module tpc_controller
  import svx_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      tpc_rst,
  input  logic      sclk,
  input  logic      scmd,
  input  logic      svx_clk,
  output logic      sdo,
  output hdi_ctrl_t ctrl,
  output logic      ready,
  output logic      readout_mode,
  output logic [N_HDI-1:0] hdi_en   // SVX clock enable per HDI (configuration)
);
  typedef enum logic [1:0] {S_IDLE, S_CODE, S_EXEC} state_e;
  state_e state;
  logic          sclk_q, rise;
  logic [LL_BITS-1:0] code;
  logic [1:0]    bitcnt;
  logic [3:0]    step;
  ll_cmd_e       cmd;
  svx_mode_e     mode;
  logic          preamp_reset, cal_inject;
  logic [READBACK_BITS-1:0] rb_word;
  logic [TPC_CFG_BITS-1:0]  tpc_cfg, cfg_sr;

  assign rise         = sclk && !sclk_q;
  assign ready        = (state == S_IDLE);
  assign readout_mode = (mode == SVX_READOUT);
  assign hdi_en       = tpc_cfg[N_HDI-1:0];

  always_ff @(posedge clk) begin
    if (rst || tpc_rst) begin
      sclk_q       <= 1'b0;
      state        <= S_IDLE;
      code         <= '0;
      bitcnt       <= '0;
      step         <= '0;
      cmd          <= LL_ACQUIRE;
      mode         <= SVX_ACQUIRE;
      preamp_reset <= 1'b0;
      cal_inject   <= 1'b0;
      rb_word      <= '0;
      tpc_cfg      <= TPC_CFG_BITS'(8'h07);
      cfg_sr       <= '0;
      sdo          <= 1'b0;
      ctrl         <= '{mode: SVX_ACQUIRE, default: 1'b0};
    end else begin
      sclk_q <= sclk;
      ctrl   <= '{mode: mode, preamp_reset: preamp_reset, cal_inject: cal_inject,
                  clk: svx_clk, serial_in: (mode == SVX_CONFIG) ? scmd : 1'b0};
      case (state)
        S_IDLE: if (rise && scmd) begin
          bitcnt <= '0;
          state  <= S_CODE;
        end
        S_CODE: if (rise) begin
          code   <= {code[LL_BITS-2:0], scmd};
          bitcnt <= bitcnt + 1'b1;
          if (bitcnt == 2'(LL_BITS - 1)) begin
            cmd     <= ll_cmd_e'({code[LL_BITS-2:0], scmd});
            rb_word <= {tpc_cfg, 1'b1, mode, cmd, 1'b1, 1'b0};
            step    <= '0;
            state   <= S_EXEC;
          end
        end
        S_EXEC: if (rise) begin
          step <= step + 1'b1;
          if (32'(step) + 1 == ll_edges(cmd)) state <= S_IDLE;
          case (cmd)
            LL_INIT:    mode <= SVX_CONFIG;
            LL_READOUT: mode <= SVX_READOUT;
            LL_ACQUIRE: begin
              mode         <= SVX_ACQUIRE;
              preamp_reset <= 1'b0;
              cal_inject   <= 1'b0;
            end
            LL_PREAMP_RESET: preamp_reset <= (step == 0);
            LL_CAL_INJECT:   cal_inject   <= (step == 0);
            LL_DIG_READOUT:  mode <= (step == 0) ? SVX_DIGITIZE : SVX_READOUT;
            LL_READBACK: begin
              sdo     <= rb_word[READBACK_BITS-1];
              rb_word <= {rb_word[READBACK_BITS-2:0], 1'b0};
            end
            LL_CONFIG_TPC: begin
              cfg_sr <= {cfg_sr[TPC_CFG_BITS-2:0], scmd};
              if (32'(step) + 1 == TPC_CFG_BITS) tpc_cfg <= {cfg_sr[TPC_CFG_BITS-2:0], scmd};
            end
            default: ;
          endcase
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
