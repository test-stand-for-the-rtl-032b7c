// tfib: the TFIB board (Test Fiber Interface Board).
//
// The TFIB runs the SVX chips through the TPC. It contains
//   cmd_mux          front panel or J3 command bus from the STAR
//   Cmd/Conf FIFO    emulation command lists and SVX configuration bytes,
//                    written over VME (sync_fifo, 1024 x 16)
//   tfib_controller  command execution, serial commands and clocks to the TPC
//   dac_controller   serial download of the TPC DACs
//   data FIFOs A/B/C capture of the readout streams from the TPC
//                    (sync_fifo, 4096 x 9: {readout clock half, byte})
//   vme_slave        VME access
// The data FIFOs can be read over VME or by the G-Link transmitters. G-Link
// A&B takes one byte from FIFO A and one from FIFO B together, so the two
// HDIs' streams leave aligned; G-Link C takes FIFO C. The G-Link chips are
// outside this RTL; their read ports are brought out.
//
// Register map (word offsets from the board base; "w1" marks strobes):
//   0x00 CTRL      [0] listen to front panel (else J3), [1] capture data,
//                  [2] w1 clear data FIFOs, [3] w1 clear Cmd/Conf FIFO
//   0x01 IMM       w1: immediate command [6:4] (imm_cmd_e), argument [3:0]
//   0x02 STATUS    [0] busy, [1] emulating, [2] acquiring, [3] readout
//                  timeout, [4] configuration underrun, [5] Cmd/Conf FIFO
//                  empty, [6] DAC busy, [7] Cmd/Conf FIFO full,
//                  [10:8] data FIFO A/B/C full
//   0x03 FIFO_WR   w1: push word into the Cmd/Conf FIFO
//   0x04..0x0F     timing (tfib_cfg_t): SCLK_HALF, ACQ_HI, ACQ_LO, DIG_HI,
//                  DIG_LO, N_DIG, RO_HI, RO_LO, RO_MAX, HOLD, CFG_BYTES, HDI_EN
//   0x10 READBACK  0x11 CMD_DONE  0x12 DROPPED  0x13 RO_CLOCKS
//   0x14 DAC_WORD  w1: load one DAC word
//   0x18+k DFIFO k read: {6'b0, not empty, readout clock half, byte}, pop
//   0x1C+k DFIFO k word count        0x1F Cmd/Conf FIFO word count
// The blocks and their connections follow the board description; the
// register map, FIFO sizes and reset values are this design's own. Reset
// timing: serial clock half period 2, acquisition clock 4 high + 3 low
// (132 ns at 53 MHz), 256 digitization clocks of 1+1, readout clock 1+1
// (26.5 MHz), 16 configuration bytes, all HDIs enabled.
module tfib
  import svx_pkg::*;
#(
  parameter logic [7:0]  VME_BASE        = 8'h20,
  parameter int unsigned CMD_FIFO_DEPTH  = 1024,
  parameter int unsigned DATA_FIFO_DEPTH = 4096,
  localparam int unsigned DAW = $clog2(DATA_FIFO_DEPTH)
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
  output logic        vme_rdata_oe,
  output logic        vme_dtack_n,
  // command buses from the STAR
  input  cmd_bus_t    j3_cmd,
  input  cmd_bus_t    fp_cmd,
  // TPC clocks and commands
  output logic        sclk,
  output logic        scmd,
  output logic        svx_clk,
  output logic        tpc_rst,
  input  logic        tpc_sdo,
  output logic        test_pulse,
  // TPC DACs
  output logic        dac_sclk,
  output logic        dac_sdi,
  output logic        dac_ld,
  // SVX data from the TPC
  input  svx_byte_t   svx_data [N_HDI],
  // G-Link read ports
  input  logic        glink_ab_rd,
  output logic [17:0] glink_ab_data,  // {A: half, byte, B: half, byte}
  output logic        glink_ab_ready,
  input  logic        glink_c_rd,
  output logic [8:0]  glink_c_data,
  output logic        glink_c_ready
);
  logic        reg_wr, reg_rd;
  logic [7:0]  reg_addr;
  logic [15:0] reg_wdata, reg_rdata;

  vme_slave #(.BASE(VME_BASE), .REG_AW(8)) u_vme (
    .clk, .rst,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_addr, .vme_wdata,
    .vme_rdata, .vme_rdata_oe, .vme_dtack_n,
    .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata
  );

  // ---------------- control registers ----------------
  logic       sel_fp, capture, dfifo_clr, cfifo_clr;
  logic       imm_strobe, cfifo_wr, dac_load;
  imm_cmd_e   imm_code;
  hl_cmd_e    imm_arg;
  tfib_cfg_t  cfg;
  logic [15:0] dac_word;

  always_ff @(posedge clk) begin
    if (rst) begin
      sel_fp     <= 1'b0;
      capture    <= 1'b0;
      dfifo_clr  <= 1'b0;
      cfifo_clr  <= 1'b0;
      imm_strobe <= 1'b0;
      imm_code   <= IMM_HL;
      imm_arg    <= HL_NOP;
      cfifo_wr   <= 1'b0;
      dac_load   <= 1'b0;
      dac_word   <= '0;
      cfg <= '{sclk_half: 8'd2, acq_hi: 8'd4, acq_lo: 8'd3, dig_hi: 8'd1,
               dig_lo: 8'd1, n_dig: 16'd256, ro_hi: 8'd1, ro_lo: 8'd1,
               ro_max: 16'd4096, hold: 16'd14, cfg_bytes: 8'd16,
               hdi_en: '1};
    end else begin
      dfifo_clr  <= 1'b0;
      cfifo_clr  <= 1'b0;
      imm_strobe <= 1'b0;
      cfifo_wr   <= 1'b0;
      dac_load   <= 1'b0;
      if (reg_wr) begin
        case (reg_addr)
          8'h00: begin
            sel_fp    <= reg_wdata[0];
            capture   <= reg_wdata[1];
            dfifo_clr <= reg_wdata[2];
            cfifo_clr <= reg_wdata[3];
          end
          8'h01: begin
            imm_strobe <= 1'b1;
            imm_code   <= imm_cmd_e'(reg_wdata[6:4]);
            imm_arg    <= hl_cmd_e'(reg_wdata[3:0]);
          end
          8'h03: cfifo_wr      <= 1'b1;
          8'h04: cfg.sclk_half <= reg_wdata[7:0];
          8'h05: cfg.acq_hi    <= reg_wdata[7:0];
          8'h06: cfg.acq_lo    <= reg_wdata[7:0];
          8'h07: cfg.dig_hi    <= reg_wdata[7:0];
          8'h08: cfg.dig_lo    <= reg_wdata[7:0];
          8'h09: cfg.n_dig     <= reg_wdata;
          8'h0A: cfg.ro_hi     <= reg_wdata[7:0];
          8'h0B: cfg.ro_lo     <= reg_wdata[7:0];
          8'h0C: cfg.ro_max    <= reg_wdata;
          8'h0D: cfg.hold      <= reg_wdata;
          8'h0E: cfg.cfg_bytes <= reg_wdata[7:0];
          8'h0F: cfg.hdi_en    <= reg_wdata[N_HDI-1:0];
          8'h14: begin dac_load <= 1'b1; dac_word <= reg_wdata; end
          default: ;
        endcase
      end
    end
  end

  // ---------------- command path ----------------
  cmd_bus_t    hl_cmd;
  logic [15:0] cfifo_dout;
  logic        cfifo_empty, cfifo_full, cfifo_rd;
  logic [$clog2(CMD_FIFO_DEPTH):0] cfifo_count;

  cmd_mux u_mux (
    .clk, .rst, .sel_front_panel(sel_fp), .j3_cmd, .fp_cmd, .cmd_out(hl_cmd)
  );

  sync_fifo #(.DEPTH(CMD_FIFO_DEPTH), .WIDTH(16)) u_cfifo (
    .clk, .rst, .clr(cfifo_clr),
    .wr(cfifo_wr), .din(reg_wdata),
    .rd(cfifo_rd), .dout(cfifo_dout),
    .empty(cfifo_empty), .full(cfifo_full), .count(cfifo_count)
  );

  logic        busy, emulating, acq_run, ro_timeout, cfg_underrun;
  logic [READBACK_BITS-1:0] readback;
  logic [15:0] cmd_done, dropped, ro_clocks;

  tfib_controller u_ctrl (
    .clk, .rst, .cfg,
    .hl_cmd, .imm_strobe, .imm_code, .imm_arg,
    .fifo_dout(cfifo_dout), .fifo_empty(cfifo_empty), .fifo_rd(cfifo_rd),
    .hdi_data(svx_data), .tpc_sdo,
    .sclk, .scmd, .svx_clk, .tpc_rst, .test_pulse,
    .busy, .emulating, .acq_run, .readback, .cmd_done, .dropped,
    .ro_timeout, .cfg_underrun, .ro_clocks
  );

  logic dac_busy;
  dac_controller #(.WORD_BITS(16), .HALF(4)) u_dac (
    .clk, .rst, .load(dac_load), .word(dac_word),
    .dac_sclk, .dac_sdi, .dac_ld, .busy(dac_busy)
  );

  // ---------------- data FIFOs ----------------
  logic [8:0]   dq    [N_HDI];
  logic [N_HDI-1:0] d_empty, d_full, d_rd, vme_pop;
  logic [DAW:0] d_count [N_HDI];

  for (genvar k = 0; k < N_HDI; k++) begin : g_dfifo
    sync_fifo #(.DEPTH(DATA_FIFO_DEPTH), .WIDTH(9)) u_dfifo (
      .clk, .rst, .clr(dfifo_clr),
      .wr(capture && svx_data[k].valid),
      .din({svx_data[k].hi_half, svx_data[k].data}),
      .rd(d_rd[k]), .dout(dq[k]),
      .empty(d_empty[k]), .full(d_full[k]), .count(d_count[k])
    );
  end

  assign glink_ab_ready = !d_empty[0] && !d_empty[1];
  assign glink_ab_data  = {dq[0], dq[1]};
  assign glink_c_ready  = !d_empty[2];
  assign glink_c_data   = dq[2];

  always_comb begin
    for (int k = 0; k < N_HDI; k++)
      vme_pop[k] = reg_rd && (reg_addr == 8'(8'h18 + k));
    d_rd[0] = vme_pop[0] || (glink_ab_rd && glink_ab_ready);
    d_rd[1] = vme_pop[1] || (glink_ab_rd && glink_ab_ready);
    d_rd[2] = vme_pop[2] || (glink_c_rd && glink_c_ready);
  end

  // ---------------- register reads ----------------
  always_ff @(posedge clk) begin
    if (rst) reg_rdata <= '0;
    else if (reg_rd) begin
      case (reg_addr)
        8'h00: reg_rdata <= {14'b0, capture, sel_fp};
        8'h02: reg_rdata <= {5'b0, d_full, cfifo_full, dac_busy, cfifo_empty, cfg_underrun,
                             ro_timeout, acq_run, emulating, busy};
        8'h04: reg_rdata <= 16'(cfg.sclk_half);
        8'h05: reg_rdata <= 16'(cfg.acq_hi);
        8'h06: reg_rdata <= 16'(cfg.acq_lo);
        8'h07: reg_rdata <= 16'(cfg.dig_hi);
        8'h08: reg_rdata <= 16'(cfg.dig_lo);
        8'h09: reg_rdata <= cfg.n_dig;
        8'h0A: reg_rdata <= 16'(cfg.ro_hi);
        8'h0B: reg_rdata <= 16'(cfg.ro_lo);
        8'h0C: reg_rdata <= cfg.ro_max;
        8'h0D: reg_rdata <= cfg.hold;
        8'h0E: reg_rdata <= 16'(cfg.cfg_bytes);
        8'h0F: reg_rdata <= 16'(cfg.hdi_en);
        8'h10: reg_rdata <= 16'(readback);
        8'h11: reg_rdata <= cmd_done;
        8'h12: reg_rdata <= dropped;
        8'h13: reg_rdata <= ro_clocks;
        8'h1F: reg_rdata <= 16'(cfifo_count);
        default: reg_rdata <= '0;
      endcase
      for (int k = 0; k < N_HDI; k++) begin
        if (reg_addr == 8'(8'h18 + k)) reg_rdata <= {6'b0, !d_empty[k], dq[k]};
        if (reg_addr == 8'(8'h1C + k)) reg_rdata <= 16'(d_count[k]);
      end
    end
  end
endmodule
