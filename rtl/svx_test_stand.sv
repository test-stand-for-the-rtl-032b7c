// svx_test_stand: the SVX-II test stand, STAR + TFIB + TPC.
//
// The STAR turns triggers into high level commands and buffers the data; the
// TFIB turns those commands into serial low level commands, serial command
// clocks and SVX chip clocks; the TPC applies them to the control lines of
// up to three HDI cables of SVX chips and returns their data, with an
// end-of-readout byte appended, to both the TFIB and the STAR.
//
// All three boards run on one clock, the 53 MHz RF clock from the STAR's
// time base (the document lets the TFIB also use its own clock; this design
// uses the STAR's). The STAR's J3 and front panel command buses both go to
// the TFIB, whose control register picks one. Both boards sit on one VME
// bus: each answers its own address range (STAR at 0x10xxxx, TFIB at
// 0x20xxxx) and the top merges their read data and DTACK* as the backplane's
// open-collector lines would.
//
// Brought out as ports: the VME bus (CPU side), the trigger inputs and the
// laser trigger, the beam structure (SYNC, beam crossing), the HDI cables
// (control lines out, data bytes and the chains' done lines in), the STAR's
// test data cable, the TPC DAC serial lines, the G-Link read ports and the
// TPC's ready and EOR-sent status.
module svx_test_stand
  import svx_pkg::*;
#(
  parameter int unsigned BUF_DEPTH       = 65536,
  parameter int unsigned TEST_DEPTH      = 32768,
  parameter int unsigned CMD_FIFO_DEPTH  = 1024,
  parameter int unsigned DATA_FIFO_DEPTH = 4096
) (
  input  logic        clk,
  input  logic        rst,
  // VME
  input  logic        vme_as_n,
  input  logic        vme_ds_n,
  input  logic        vme_write_n,
  input  logic [23:1] vme_addr,
  input  logic [15:0] vme_wdata,
  output logic [15:0] vme_rdata,
  output logic        vme_dtack_n,
  // triggers and beam structure
  input  logic        ext_trigger,
  output logic        laser_trigger,
  output logic        sync,
  output logic        beam_xing,
  output logic        test_pulse,
  // HDI cables
  output hdi_ctrl_t   hdi_ctrl [N_HDI],
  input  svx_byte_t   hdi_din  [N_HDI],
  input  logic        hdi_done [N_HDI],
  // STAR test data cable
  output svx_byte_t   test_data,
  // TPC DACs
  output logic        dac_sclk,
  output logic        dac_sdi,
  output logic        dac_ld,
  // G-Links
  input  logic        glink_ab_rd,
  output logic [17:0] glink_ab_data,
  output logic        glink_ab_ready,
  input  logic        glink_c_rd,
  output logic [8:0]  glink_c_data,
  output logic        glink_c_ready,
  // TPC status
  output logic        tpc_ready,
  output logic        eor_sent [N_HDI]
);
  logic [15:0] star_rdata, tfib_rdata;
  logic        star_oe, tfib_oe, star_dtack_n, tfib_dtack_n;
  cmd_bus_t    j3_cmd, fp_cmd;
  svx_byte_t   svx_data [N_HDI];
  logic        sclk, scmd, svx_clk, tpc_rst, tpc_sdo;

  star #(.VME_BASE(8'h10), .BUF_DEPTH(BUF_DEPTH), .TEST_DEPTH(TEST_DEPTH)) u_star (
    .clk, .rst,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_addr, .vme_wdata,
    .vme_rdata(star_rdata), .vme_rdata_oe(star_oe), .vme_dtack_n(star_dtack_n),
    .ext_trigger, .laser_trigger, .sync, .beam_xing,
    .j3_cmd, .fp_cmd,
    .svx_data, .test_data
  );

  tfib #(.VME_BASE(8'h20), .CMD_FIFO_DEPTH(CMD_FIFO_DEPTH),
         .DATA_FIFO_DEPTH(DATA_FIFO_DEPTH)) u_tfib (
    .clk, .rst,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_addr, .vme_wdata,
    .vme_rdata(tfib_rdata), .vme_rdata_oe(tfib_oe), .vme_dtack_n(tfib_dtack_n),
    .j3_cmd, .fp_cmd,
    .sclk, .scmd, .svx_clk, .tpc_rst, .tpc_sdo, .test_pulse,
    .dac_sclk, .dac_sdi, .dac_ld,
    .svx_data,
    .glink_ab_rd, .glink_ab_data, .glink_ab_ready,
    .glink_c_rd, .glink_c_data, .glink_c_ready
  );

  tpc u_tpc (
    .clk, .rst,
    .sclk, .scmd, .svx_clk, .tpc_rst, .sdo(tpc_sdo),
    .hdi_ctrl, .hdi_din, .hdi_done,
    .svx_data, .eor_sent, .ready(tpc_ready)
  );

  // VME backplane: wired-OR of the two slaves
  assign vme_rdata   = (star_oe ? star_rdata : '0) | (tfib_oe ? tfib_rdata : '0);
  assign vme_dtack_n = star_dtack_n & tfib_dtack_n;
endmodule
