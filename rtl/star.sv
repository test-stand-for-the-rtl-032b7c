// star: the STAR board (Silicon Test Acquisition and Readout).
//
// The STAR answers triggers with high level commands to the TFIB, emulates
// the accelerator's beam structure, and buffers the readout data:
//   master_clock  RF time base -> SYNC, beam crossing, triggers
//   readout_sm    triggers -> command sequences on the J3 and front panel
//                 command buses (both carry the same commands)
//   data_demux x3 SVX data bus A/B/C -> 16-bit words into a 64k x 16 buffer
//   test memory   32k x 16, played out by data_mux as an SVX-like stream on
//                 the test data cable
//   vme_slave     VME access to all of the above
// One event is over for the readout state machine when every enabled data
// buffer has stored the end-of-readout word.
//
// Register map (16-bit registers at word offsets from the board base; "w1"
// marks write-only strobes):
//   0x00 CTRL     [0] readout enable, [2:1] trigger mode (trig_mode_e),
//                 [5:3] buffer enable A/B/C, [6] w1 clear all buffers
//   0x01 STATUS   [2:0] overflow A/B/C, [5:3] EOR seen A/B/C, [6] busy,
//                 [7] readout timed out, [8] test playback busy
//   0x02 TURN_LEN crossings per turn      0x03 N_BUNCHES
//   0x04 SPACING  crossings between bunches (1: 132 ns, 3: 396 ns)
//   0x05 INT_XING crossing of internal triggers
//   0x06 INT_TURNS internal trigger every N turns
//   0x07 CAL_LAT  clocks from CAL_INJECT to DIG_READOUT
//   0x08 TIMEOUT  readout timeout in units of 256 clocks
//   0x09 SW_CMD   w1: send high level command [3:0] now
//   0x0A EVENTS   events read out            0x0B TRIG_LOST
//   0x0C XING     current crossing number
//   0x10 TM_ADDR  test memory write address  0x11 TM_DATA w1: write, address+1
//   0x12 TM_WORDS words per test block       0x13 TM_HDR {chip ID, status}
//   0x14 TM_START w1: play the test block; read: playback busy
//   0x15 TM_BLOCKS test blocks sent
//   0x20+4k BUF_ADDR k  read address of buffer k (k = 0,1,2 for A,B,C)
//   0x21+4k BUF_DATA k  read: word at BUF_ADDR, then BUF_ADDR+1
//   0x22+4k BUF_COUNT k words stored, bits 15:0; 0x23+4k bit 16
// The buffers, their sizes and the test facility follow the board
// description; the register map and reset values are this design's own.
// Reset values: turn of 159 crossings, all filled, spacing 1 (132 ns).
module star
  import svx_pkg::*;
#(
  parameter logic [7:0]  VME_BASE  = 8'h10,
  parameter int unsigned BUF_DEPTH  = 65536,
  parameter int unsigned TEST_DEPTH = 32768,
  localparam int unsigned BAW = $clog2(BUF_DEPTH),
  localparam int unsigned TAW = $clog2(TEST_DEPTH)
) (
  input  logic        clk,            // RF clock
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
  // triggers and beam structure
  input  logic        ext_trigger,
  output logic        laser_trigger,
  output logic        sync,
  output logic        beam_xing,
  // command buses to the TFIB
  output cmd_bus_t    j3_cmd,
  output cmd_bus_t    fp_cmd,
  // data
  input  svx_byte_t   svx_data [N_HDI],
  output svx_byte_t   test_data
);
  // ---------------- registers ----------------
  logic        reg_wr, reg_rd;
  logic [7:0]  reg_addr;
  logic [15:0] reg_wdata, reg_rdata;

  logic        rsm_enable;
  trig_mode_e  trig_mode;
  logic [N_HDI-1:0] buf_en;
  logic        buf_clear;
  logic [7:0]  turn_len, n_bunches, int_xing;
  logic [3:0]  spacing;
  logic [15:0] int_turns, cal_lat, timeout_reg;
  cmd_bus_t    sw_cmd;
  logic [TAW-1:0] tm_addr;
  logic        tm_we, tm_start;
  logic [15:0] tm_wdata;
  logic [TAW:0] tm_words;
  logic [15:0] tm_hdr;
  logic [BAW-1:0] buf_ptr [N_HDI];
  logic [N_HDI-1:0] buf_re;

  vme_slave #(.BASE(VME_BASE), .REG_AW(8)) u_vme (
    .clk, .rst,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_addr, .vme_wdata,
    .vme_rdata, .vme_rdata_oe, .vme_dtack_n,
    .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata
  );

  // ---------------- master clock and readout state machine ----------------
  logic       trigger, arm, busy, readout_start, timed_out, readout_done;
  trig_mode_e trigger_type;
  logic [7:0] xing_num;
  logic [15:0] trig_lost, event_count;
  cmd_bus_t   cmd;

  master_clock u_mclk (
    .clk, .rst,
    .turn_len, .n_bunches, .bunch_spacing(spacing),
    .trig_mode, .int_xing, .int_turns, .arm, .ext_trigger,
    .sync, .beam_xing, .xing_num, .trigger, .trigger_type,
    .laser_trigger, .trig_lost
  );

  readout_sm u_rsm (
    .clk, .rst,
    .enable(rsm_enable), .trigger, .trigger_type, .readout_done,
    .cal_latency(cal_lat), .timeout({timeout_reg, 8'h00}), .sw_cmd,
    .cmd, .arm, .busy, .readout_start, .event_count, .timed_out
  );

  assign j3_cmd = cmd;
  assign fp_cmd = cmd;

  // ---------------- data buffers ----------------
  logic [N_HDI-1:0] eor_seen, overflow;
  logic [BAW:0]     word_count [N_HDI];
  logic [15:0]      buf_rdata  [N_HDI];

  for (genvar k = 0; k < N_HDI; k++) begin : g_buf
    logic          we;
    logic [BAW-1:0] waddr;
    logic [15:0]   wdata;
    data_demux #(.DEPTH(BUF_DEPTH)) u_demux (
      .clk, .rst,
      .enable(buf_en[k]), .clear(buf_clear), .new_event(readout_start),
      .din(svx_data[k]),
      .we, .waddr, .wdata,
      .word_count(word_count[k]), .eor_seen(eor_seen[k]), .overflow(overflow[k])
    );
    buffer_ram #(.DEPTH(BUF_DEPTH), .WIDTH(16)) u_ram (
      .clk, .we, .waddr, .wdata,
      .re(buf_re[k]), .raddr(buf_ptr[k]), .rdata(buf_rdata[k])
    );
  end

  assign readout_done = (buf_en != '0) && ((eor_seen | ~buf_en) == '1);

  // ---------------- memory test facility ----------------
  logic           tm_re, tm_busy, tm_done;
  logic [TAW-1:0] tm_raddr;
  logic [15:0]    tm_rdata;
  logic [15:0]    tm_blocks;

  always_ff @(posedge clk) begin
    if (rst)          tm_blocks <= '0;
    else if (tm_done) tm_blocks <= tm_blocks + 1'b1;
  end

  buffer_ram #(.DEPTH(TEST_DEPTH), .WIDTH(16)) u_test_mem (
    .clk, .we(tm_we), .waddr(tm_addr), .wdata(tm_wdata),
    .re(tm_re), .raddr(tm_raddr), .rdata(tm_rdata)
  );

  data_mux #(.DEPTH(TEST_DEPTH)) u_dmux (
    .clk, .rst, .start(tm_start), .n_words(tm_words),
    .chip_id(tm_hdr[15:8]), .status(tm_hdr[7:0]),
    .re(tm_re), .raddr(tm_raddr), .rdata(tm_rdata),
    .dout(test_data), .busy(tm_busy), .done(tm_done)
  );

  // ---------------- register writes ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      rsm_enable  <= 1'b0;
      trig_mode   <= TRG_OFF;
      buf_en      <= '0;
      buf_clear   <= 1'b0;
      turn_len    <= 8'd159;
      n_bunches   <= 8'd159;
      spacing     <= 4'd1;
      int_xing    <= 8'd0;
      int_turns   <= 16'd1;
      cal_lat     <= 16'd0;
      timeout_reg <= 16'hFFFF;
      sw_cmd      <= '{strobe: 1'b0, cmd: HL_NOP};
      tm_addr     <= '0;
      tm_we       <= 1'b0;
      tm_wdata    <= '0;
      tm_words    <= '0;
      tm_hdr      <= '0;
      tm_start    <= 1'b0;
      for (int k = 0; k < N_HDI; k++) buf_ptr[k] <= '0;
    end else begin
      buf_clear <= 1'b0;
      sw_cmd    <= '{strobe: 1'b0, cmd: HL_NOP};
      tm_start  <= 1'b0;
      if (tm_we) tm_addr <= tm_addr + 1'b1;
      tm_we     <= 1'b0;
      for (int k = 0; k < N_HDI; k++)
        if (buf_re[k]) buf_ptr[k] <= buf_ptr[k] + 1'b1;
      if (reg_wr) begin
        case (reg_addr)
          8'h00: begin
            rsm_enable <= reg_wdata[0];
            trig_mode  <= trig_mode_e'(reg_wdata[2:1]);
            buf_en     <= reg_wdata[5:3];
            buf_clear  <= reg_wdata[6];
          end
          8'h02: turn_len    <= reg_wdata[7:0];
          8'h03: n_bunches   <= reg_wdata[7:0];
          8'h04: spacing     <= reg_wdata[3:0];
          8'h05: int_xing    <= reg_wdata[7:0];
          8'h06: int_turns   <= reg_wdata;
          8'h07: cal_lat     <= reg_wdata;
          8'h08: timeout_reg <= reg_wdata;
          8'h09: sw_cmd      <= '{strobe: 1'b1, cmd: hl_cmd_e'(reg_wdata[3:0])};
          8'h10: tm_addr     <= reg_wdata[TAW-1:0];
          8'h11: begin tm_we <= 1'b1; tm_wdata <= reg_wdata; end
          8'h12: tm_words    <= (TAW+1)'(reg_wdata);
          8'h13: tm_hdr      <= reg_wdata;
          8'h14: tm_start    <= 1'b1;
          default: ;
        endcase
        for (int k = 0; k < N_HDI; k++)
          if (reg_addr == 8'(8'h20 + 4*k)) buf_ptr[k] <= BAW'(reg_wdata);
      end
    end
  end

  // ---------------- register reads ----------------
  // Buffer words come from the memory read port one clock after the access;
  // all other registers are captured in that clock.
  logic [15:0] rd_val;
  logic [N_HDI-1:0] rd_buf;

  always_comb begin
    buf_re = '0;
    for (int k = 0; k < N_HDI; k++)
      buf_re[k] = reg_rd && (reg_addr == 8'(8'h21 + 4*k));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_val <= '0;
      rd_buf <= '0;
    end else if (reg_rd) begin
      rd_buf <= buf_re;
      case (reg_addr)
        8'h00: rd_val <= {9'b0, 1'b0, buf_en, trig_mode, rsm_enable};
        8'h01: rd_val <= {7'b0, tm_busy, timed_out, busy, eor_seen, overflow};
        8'h02: rd_val <= {8'b0, turn_len};
        8'h03: rd_val <= {8'b0, n_bunches};
        8'h04: rd_val <= {12'b0, spacing};
        8'h05: rd_val <= {8'b0, int_xing};
        8'h06: rd_val <= int_turns;
        8'h07: rd_val <= cal_lat;
        8'h08: rd_val <= timeout_reg;
        8'h0A: rd_val <= event_count;
        8'h0B: rd_val <= trig_lost;
        8'h0C: rd_val <= {8'b0, xing_num};
        8'h10: rd_val <= 16'(tm_addr);
        8'h12: rd_val <= 16'(tm_words);
        8'h13: rd_val <= tm_hdr;
        8'h14: rd_val <= {15'b0, tm_busy};
        8'h15: rd_val <= tm_blocks;
        default: rd_val <= '0;
      endcase
      for (int k = 0; k < N_HDI; k++) begin
        if (reg_addr == 8'(8'h20 + 4*k)) rd_val <= 16'(buf_ptr[k]);
        if (reg_addr == 8'(8'h22 + 4*k)) rd_val <= word_count[k][15:0];
        if (reg_addr == 8'(8'h23 + 4*k)) rd_val <= 16'(word_count[k] >> 16);
      end
    end
  end

  always_comb begin
    reg_rdata = rd_val;
    for (int k = 0; k < N_HDI; k++)
      if (rd_buf[k]) reg_rdata = buf_rdata[k];
  end
endmodule
