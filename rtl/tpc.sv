// tpc: the Test Port Card, which sits next to the detector and drives up to
// three HDI cables of SVX chips.
//
// The TPC controller receives the serial command line, the serial command
// clock and the SVX chip clock from the TFIB and drives one set of SVX
// control lines, which is fanned out to all three HDIs (the chips of all
// HDIs are run together). The readout bytes of each HDI pass through an
// EOR inserter, which appends the end-of-readout code when that HDI's chips
// are read out, and leave on the SVX data bus A, B or C to the TFIB and the
// STAR. `sdo` returns readback bits to the TFIB. The controller's
// configuration byte (loaded by the TFIB) enables the SVX clock of each HDI,
// so an HDI without chips, or one under test on its own, can be left idle.
//
// The DACs and the power regulation of the board are analog and not part of
// this RTL; the TFIB's DAC lines go straight to the DAC chips.
module tpc
  import svx_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  // from the TFIB
  input  logic      sclk,
  input  logic      scmd,
  input  logic      svx_clk,
  input  logic      tpc_rst,
  output logic      sdo,
  // HDI cables
  output hdi_ctrl_t hdi_ctrl [N_HDI],
  input  svx_byte_t hdi_din  [N_HDI],
  input  logic      hdi_done [N_HDI],
  // SVX data buses to TFIB and STAR
  output svx_byte_t svx_data [N_HDI],
  output logic      eor_sent [N_HDI],
  output logic      ready
);
  hdi_ctrl_t        ctrl;
  logic             readout_mode;
  logic [N_HDI-1:0] hdi_en;

  tpc_controller u_ctrl (
    .clk, .rst, .tpc_rst, .sclk, .scmd, .svx_clk,
    .sdo, .ctrl, .ready, .readout_mode, .hdi_en
  );

  for (genvar h = 0; h < N_HDI; h++) begin : g_hdi
    assign hdi_ctrl[h] = '{mode: ctrl.mode, preamp_reset: ctrl.preamp_reset,
                           cal_inject: ctrl.cal_inject, clk: ctrl.clk && hdi_en[h],
                           serial_in: ctrl.serial_in};
    eor_inserter u_eor (
      .clk, .rst,
      .readout_mode,
      .svx_clk    (hdi_ctrl[h].clk),
      .chips_done (hdi_done[h]),
      .din        (hdi_din[h]),
      .dout       (svx_data[h]),
      .eor_sent   (eor_sent[h])
    );
  end
endmodule
