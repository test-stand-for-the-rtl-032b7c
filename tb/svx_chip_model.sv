// svx_chip_model: behavioural model of a chain of SVX chips on one HDI cable,
// for testbenches only. It is not synthesizable and is not part of the
// design: the SVX chip is a mixed-signal device of its own.
//
// What it models is the digital interface the test stand drives:
//   CONFIG   each rising edge of the chip clock shifts `serial_in` into the
//            chain's configuration register, one byte (a readout threshold)
//            per chip, the first byte shifted ending in chip 0
//   ACQUIRE  rising clock edges advance the 32-cell pipeline pointer; a
//            rising `cal_inject` marks the next event as a calibration event;
//            a rising `preamp_reset` is counted
//   DIGITIZE entering it starts a new event; the ADC needs 256 chip clocks
//            (8 bits) to finish
//   READOUT  for each chip in turn: chip ID in the high half of a clock,
//            status in the low half, then for every channel whose value is
//            above the chip's threshold its address (high half) and value
//            (low half). After the last chip `done` rises.
// Channel value of channel c of chip k in event e (all 8-bit):
//   calibration event and c % 16 == 0 : 200
//   otherwise                          : (7c + 13k + 5e) % 64
// Status byte: {ADC finished, calibration event, event number[5:0]}.
// Each byte appears for one clock, one clock after the clock edge it answers.
module svx_chip_model
  import svx_pkg::*;
#(
  parameter int N_CHIPS = 2,
  parameter int ID_BASE = 1
) (
  input  logic      clk,
  input  logic      rst,
  input  hdi_ctrl_t ctrl,
  output svx_byte_t dout,
  output logic      done,
  output int        n_preamp_resets,
  output int        n_acq_edges,
  output int        event_num
);
  logic [8*N_CHIPS-1:0] cfg_sr;
  logic clk_q, cal_q, prst_q, cal_flag, cal_event;
  svx_mode_e mode_q;
  int dig_clocks;
  int rd_chip, rd_ch;
  bit hdr_sent, have_lo;
  logic [7:0] lo_byte;

  function automatic logic [7:0] thr(int k);
    return cfg_sr[8*(N_CHIPS-1-k) +: 8];
  endfunction

  function automatic logic [7:0] chan_val(int k, int c, int e, bit cal);
    if (cal && (c % 16 == 0)) return 8'd200;
    return 8'((7*c + 13*k + 5*e) % 64);
  endfunction

  // next channel at or after c of chip k above threshold, or SVX_CHANNELS
  function automatic int next_hit(int k, int c);
    for (int i = c; i < int'(SVX_CHANNELS); i++)
      if (chan_val(k, i, event_num, cal_event) > thr(k)) return i;
    return SVX_CHANNELS;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg_sr <= '0; clk_q <= 1'b0; cal_q <= 1'b0; prst_q <= 1'b0;
      cal_flag <= 1'b0; cal_event <= 1'b0; mode_q <= SVX_ACQUIRE;
      dig_clocks <= 0; rd_chip <= 0; rd_ch <= 0; hdr_sent <= 0; have_lo <= 0;
      lo_byte <= '0; dout <= '0; done <= 1'b0;
      n_preamp_resets <= 0; n_acq_edges <= 0; event_num <= 0;
    end else begin
      automatic bit rise = ctrl.clk && !clk_q;
      automatic bit fall = !ctrl.clk && clk_q;
      clk_q  <= ctrl.clk;
      cal_q  <= ctrl.cal_inject;
      prst_q <= ctrl.preamp_reset;
      mode_q <= ctrl.mode;
      dout   <= '0;
      if (ctrl.preamp_reset && !prst_q) n_preamp_resets <= n_preamp_resets + 1;
      if (ctrl.cal_inject && !cal_q) cal_flag <= 1'b1;
      case (ctrl.mode)
        SVX_CONFIG: if (rise) cfg_sr <= {cfg_sr[8*N_CHIPS-2:0], ctrl.serial_in};
        SVX_ACQUIRE: if (rise) n_acq_edges <= n_acq_edges + 1;
        SVX_DIGITIZE: begin
          if (mode_q != SVX_DIGITIZE) begin
            event_num  <= event_num + 1;
            cal_event  <= cal_flag;
            cal_flag   <= 1'b0;
            dig_clocks <= 0;
          end else if (rise) dig_clocks <= dig_clocks + 1;
        end
        SVX_READOUT: begin
          if (mode_q != SVX_READOUT) begin
            rd_chip <= 0; rd_ch <= 0; hdr_sent <= 0; have_lo <= 0; done <= 1'b0;
          end else if (rise && !done) begin
            if (!hdr_sent) begin
              dout     <= '{valid: 1'b1, hi_half: 1'b1, data: 8'(ID_BASE + rd_chip)};
              lo_byte  <= {dig_clocks >= 256, cal_event, 6'(event_num)};
              have_lo  <= 1;
              hdr_sent <= 1;
            end else begin
              automatic int c = next_hit(rd_chip, rd_ch);
              if (c < int'(SVX_CHANNELS)) begin
                dout    <= '{valid: 1'b1, hi_half: 1'b1, data: 8'(c)};
                lo_byte <= chan_val(rd_chip, c, event_num, cal_event);
                have_lo <= 1;
                rd_ch   <= c + 1;
              end else if (rd_chip + 1 < N_CHIPS) begin
                dout     <= '{valid: 1'b1, hi_half: 1'b1, data: 8'(ID_BASE + rd_chip + 1)};
                lo_byte  <= {dig_clocks >= 256, cal_event, 6'(event_num)};
                have_lo  <= 1;
                rd_chip  <= rd_chip + 1;
                rd_ch    <= 0;
              end else begin
                done <= 1'b1;
              end
            end
          end else if (fall && have_lo) begin
            dout    <= '{valid: 1'b1, hi_half: 1'b0, data: lo_byte};
            have_lo <= 0;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
