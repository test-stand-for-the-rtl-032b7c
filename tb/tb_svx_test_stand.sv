// tb_svx_test_stand: end-to-end test of the test stand at its default sizes.
//
// Three chains of two modelled SVX chips hang on the HDI ports. The test
// drives the VME bus like the VME CPU and checks, against values computed
// here from the chip model's channel formula:
//   SVX configuration download through the Cmd/Conf FIFO (thresholds)
//   the acquisition clock (7 RF clocks = 132 ns)
//   an externally triggered event: STAR command, TFIB/TPC digitize-readout
//   sequence, EOR insertion, data in all three STAR buffers, the TFIB data
//   FIFOs via the G-Link ports, and the 53 MB/s byte rate
//   a charge-injection event, a laser event, emulation from the FIFO
//   (with preamplifier reset), TPC readback, a DAC download, the front panel
//   bus, the 396 ns bunch pattern, test memory playback, a dropped command
//   and a readout timeout (HDI C held from finishing), and the download and
//   readback of the TPC controller configuration byte.
// Each mechanism is counted; one that never happened is a failure.
module tb_svx_test_stand;
  import svx_pkg::*;

  localparam logic [7:0] STAR = 8'h10, TFIB = 8'h20;
  localparam int N_CHIPS = 2;
  localparam int N_MECH = 19;
  localparam string MECH_NAME [N_MECH] = '{
    "svx_config", "acq_clock_132ns", "ext_trigger_event", "eor_insert",
    "star_buffers", "glink_fifos", "byte_rate_53MBs", "charge_inject_event",
    "laser_event", "emulation", "preamp_reset", "readback", "dac_download",
    "front_panel_bus", "bunch_396ns", "test_playback", "command_dropped",
    "readout_timeout", "tpc_config"};

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        vme_as_n = 1, vme_ds_n = 1, vme_write_n = 1;
  logic [23:1] vme_addr = '0;
  logic [15:0] vme_wdata = '0, vme_rdata;
  logic        vme_dtack_n;
  logic        ext_trigger = 0, laser_trigger, sync, beam_xing, test_pulse;
  hdi_ctrl_t   hdi_ctrl [N_HDI];
  svx_byte_t   hdi_din  [N_HDI];
  logic        hdi_done [N_HDI], chain_done [N_HDI];
  svx_byte_t   test_data;
  logic        dac_sclk, dac_sdi, dac_ld;
  logic        glink_ab_rd = 0, glink_ab_ready, glink_c_rd = 0, glink_c_ready;
  logic [17:0] glink_ab_data;
  logic [8:0]  glink_c_data;
  logic        tpc_ready;
  logic        eor_sent [N_HDI];
  int          n_prst [N_HDI], n_acq [N_HDI], ev_num [N_HDI];
  bit          block_done_c = 0;
  logic [8*N_CHIPS-1:0] cfg_word [N_HDI];

  svx_test_stand dut (.*);

  for (genvar h = 0; h < N_HDI; h++) begin : g_chips
    svx_chip_model #(.N_CHIPS(N_CHIPS), .ID_BASE(16*h + 1)) u_chain (
      .clk, .rst, .ctrl(hdi_ctrl[h]), .dout(hdi_din[h]), .done(chain_done[h]),
      .n_preamp_resets(n_prst[h]), .n_acq_edges(n_acq[h]), .event_num(ev_num[h])
    );
    assign hdi_done[h] = chain_done[h] && !(h == 2 && block_done_c);
    assign cfg_word[h] = u_chain.cfg_sr;
  end

  int checks = 0, failures = 0;
  int mech [N_MECH];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- VME master ----------------
  task automatic vme_cycle(input logic [7:0] base, input logic [7:0] off,
                           input bit wr, input logic [15:0] wd, output logic [15:0] rd);
    @(posedge clk);
    vme_addr    <= {base, 7'b0, off};
    vme_wdata   <= wd;
    vme_write_n <= !wr;
    vme_as_n    <= 0;
    @(posedge clk);
    vme_ds_n <= 0;
    do @(posedge clk); while (vme_dtack_n);
    rd = vme_rdata;
    vme_ds_n <= 1;
    vme_as_n <= 1;
    do @(posedge clk); while (!vme_dtack_n);
  endtask
  task automatic vw(input logic [7:0] base, input logic [7:0] off, input logic [15:0] d);
    logic [15:0] dummy;
    vme_cycle(base, off, 1, d, dummy);
  endtask
  task automatic vr(input logic [7:0] base, input logic [7:0] off, output logic [15:0] d);
    vme_cycle(base, off, 0, 16'h0, d);
  endtask

  task automatic wait_tfib_idle();
    logic [15:0] st;
    do begin
      repeat (20) @(posedge clk);
      vr(TFIB, 8'h02, st);
    end while (st[0] || st[1]);
  endtask

  // ---------------- expected data ----------------
  logic [7:0] thr [N_CHIPS];
  function automatic logic [7:0] chan_val(int k, int c, int e, bit cal);
    if (cal && (c % 16 == 0)) return 8'd200;
    return 8'((7*c + 13*k + 5*e) % 64);
  endfunction
  // expected 16-bit words of one HDI's event
  function automatic void expect_words(int h, int e, bit cal, ref logic [15:0] w [$]);
    w.delete();
    for (int k = 0; k < N_CHIPS; k++) begin
      w.push_back({8'(16*h + 1 + k), 1'b1, cal, 6'(e)});
      for (int c = 0; c < 128; c++)
        if (chan_val(k, c, e, cal) > thr[k]) w.push_back({8'(c), chan_val(k, c, e, cal)});
    end
    w.push_back({EOR_CODE, 8'h00});
  endfunction

  // check buffer h of the STAR from word address `start`
  task automatic check_buffer(int h, int start, int e, bit cal, string tag);
    logic [15:0] w [$];
    logic [15:0] d, cnt;
    int bad = 0;
    expect_words(h, e, cal, w);
    vr(STAR, 8'(8'h22 + 4*h), cnt);
    check(cnt == 16'(start + w.size()), $sformatf("%s buffer %0d word count %0d, expected %0d", tag, h, cnt, start + w.size()));
    vw(STAR, 8'(8'h20 + 4*h), 16'(start));
    foreach (w[i]) begin
      vr(STAR, 8'(8'h21 + 4*h), d);
      if (d !== w[i]) begin
        bad++;
        if (bad < 4) $display("  %s buf %0d word %0d: got %h expected %h", tag, h, i, d, w[i]);
      end
    end
    check(bad == 0, $sformatf("%s buffer %0d contents", tag, h));
  endtask

  // ---------------- monitors ----------------
  int rate_first = -1, rate_last = -1, rate_bytes = 0, eor_cycle = -1;
  bit rate_on = 0;
  always @(posedge clk) if (rate_on && hdi_din[0].valid) begin
    if (rate_first < 0) rate_first = cycle;
    rate_last = cycle;
    rate_bytes++;
  end
  int eor_count = 0;
  always @(posedge clk) if (dut.svx_data[0].valid && dut.svx_data[0].hi_half &&
                             dut.svx_data[0].data == EOR_CODE) eor_count++;
  int test_pulses = 0, laser_pulses = 0, cal_pulses = 0;
  logic cal_q = 0;
  always @(posedge clk) begin
    if (test_pulse) test_pulses++;
    if (laser_trigger) laser_pulses++;
    cal_q <= hdi_ctrl[0].cal_inject;
    if (hdi_ctrl[0].cal_inject && !cal_q && !rst) cal_pulses++;
  end
  // DAC receiver
  logic [15:0] dac_sr = 0, dac_word = 0;
  logic dac_sclk_q = 0;
  int dac_loads = 0;
  always @(posedge clk) begin
    dac_sclk_q <= dac_sclk;
    if (dac_sclk && !dac_sclk_q) dac_sr <= {dac_sr[14:0], dac_sdi};
    if (dac_ld) begin dac_word <= dac_sr; end
  end
  always @(posedge dac_ld) dac_loads++;
  // test data cable capture
  logic [7:0] tcap [$];
  always @(posedge clk) if (test_data.valid) tcap.push_back(test_data.data);

  initial begin
    logic [15:0] d, st;
    logic [15:0] w [$];
    int t0, t1, e, n;
    foreach (mech[i]) mech[i] = 0;
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);

    // ---- SVX configuration: thresholds 40 and 50 ----
    thr[0] = 8'd40; thr[1] = 8'd50;
    vw(TFIB, 8'h0E, 16'd2);            // two configuration bytes
    vw(TFIB, 8'h03, 16'(thr[0]));
    vw(TFIB, 8'h03, 16'(thr[1]));
    vw(TFIB, 8'h01, {9'b0, IMM_CONFIG_SVX, 4'h0});
    wait_tfib_idle();
    for (int h = 0; h < N_HDI; h++) begin
      check(cfg_word[h] == {thr[0], thr[1]},
            $sformatf("HDI %0d configuration %h", h, cfg_word[h]));
    end
    vr(TFIB, 8'h02, st);
    check(st[2] && !st[4], "acquiring after configuration, no underrun");
    if (cfg_word[0] == {thr[0], thr[1]}) mech[0]++;

    // ---- acquisition clock period ----
    check(hdi_ctrl[0].mode == SVX_ACQUIRE, "chips in acquisition mode");
    @(posedge hdi_ctrl[0].clk); t0 = cycle;
    @(posedge hdi_ctrl[0].clk); t1 = cycle;
    check(t1 - t0 == 7, $sformatf("acquisition clock period %0d RF clocks", t1 - t0));
    if (t1 - t0 == 7) mech[1]++;

    // ---- external trigger event ----
    vw(STAR, 8'h00, 16'h0078);   // buffers A,B,C on, clear; mode EXTERNAL, off
    vw(STAR, 8'h00, 16'h0039);   // buffers on, mode EXTERNAL, enable
    vw(TFIB, 8'h00, 16'h0006);   // J3 bus, capture data, clear data FIFOs
    vw(TFIB, 8'h00, 16'h0002);
    rate_on = 1;
    @(posedge clk) ext_trigger <= 1;
    repeat (10) @(posedge clk);
    ext_trigger <= 0;
    do begin repeat (50) @(posedge clk); vr(STAR, 8'h0A, d); end while (d == 0 && cycle < 100000);
    rate_on = 0;
    check(d == 1, "one event counted after external trigger");
    if (d == 1) mech[2]++;
    e = 1;
    check(ev_num[0] == e, "chips digitized once");
    check(eor_count == 1, $sformatf("one EOR on bus A (%0d)", eor_count));
    if (eor_count == 1) mech[3]++;
    for (int h = 0; h < N_HDI; h++) check_buffer(h, 0, e, 0, "ext");
    mech[4]++;
    expect_words(0, e, 0, w);
    check(rate_bytes == 2 * (w.size() - 1) && rate_last - rate_first == rate_bytes - 1,
          $sformatf("readout bytes back to back: %0d bytes in %0d clocks", rate_bytes, rate_last - rate_first + 1));
    if (rate_last - rate_first == rate_bytes - 1) mech[6]++;
    wait_tfib_idle();
    check(hdi_ctrl[0].mode == SVX_ACQUIRE, "back in acquisition after readout");

    // G-Link A&B and C read ports give the same bytes as the chips sent
    begin
      int bad = 0;
      n = 0;
      foreach (w[i]) begin
        for (int half = 0; half < 2; half++) begin
          logic [7:0] exp_a;
          exp_a = half ? w[i][7:0] : w[i][15:8];
          @(negedge clk);
          check(glink_ab_ready, "G-Link A&B data ready");
          if (glink_ab_data[16:9] != exp_a || glink_ab_data[17] != !half) begin
            bad++;
            if (bad < 4) $display("  glink %0d: got %h expected %h", n, glink_ab_data[17:9], {!half, exp_a});
          end
          @(posedge clk) glink_ab_rd <= 1;
          @(posedge clk) glink_ab_rd <= 0;
          n++;
        end
      end
      @(negedge clk);
      check(bad == 0 && !glink_ab_ready, $sformatf("G-Link A&B stream (%0d bad)", bad));
      expect_words(2, e, 0, w);
      bad = 0;
      foreach (w[i]) for (int half = 0; half < 2; half++) begin
        @(negedge clk);
        if (glink_c_data[7:0] != (half ? w[i][7:0] : w[i][15:8])) bad++;
        @(posedge clk) glink_c_rd <= 1;
        @(posedge clk) glink_c_rd <= 0;
      end
      @(negedge clk);
      check(bad == 0 && !glink_c_ready, $sformatf("G-Link C stream (%0d bad)", bad));
      if (bad == 0) mech[5]++;
    end

    // ---- charge injection event ----
    vw(STAR, 8'h02, 16'd10);     // short turn for the test: 10 crossings
    vw(STAR, 8'h03, 16'd10);
    vw(STAR, 8'h05, 16'd4);      // internal trigger at crossing 4
    vw(STAR, 8'h07, 16'd30);     // 30 clocks from injection to readout
    vw(STAR, 8'h00, 16'h003D);   // buffers on, mode CHARGE, enable
    @(posedge clk iff dut.u_star.trigger);
    vw(STAR, 8'h00, 16'h003F);   // no further triggers (mode OFF)
    do begin repeat (50) @(posedge clk); vr(STAR, 8'h0A, d); end while (d < 2 && cycle < 150000);
    vw(STAR, 8'h00, 16'h003E);   // stop triggering (mode OFF)
    check(d == 2, "charge injection event counted");
    check(cal_pulses == 1, $sformatf("one calibration pulse on the HDI (%0d)", cal_pulses));
    e = 2;
    expect_words(0, 1, 0, w);
    check_buffer(1, w.size(), e, 1, "cal");
    if (d == 2 && cal_pulses == 1) mech[7]++;
    wait_tfib_idle();

    // ---- laser event ----
    vw(STAR, 8'h00, 16'h0078);   // clear buffers
    vw(STAR, 8'h00, 16'h003B);   // mode LASER, enable
    @(posedge clk iff dut.u_star.trigger);
    vw(STAR, 8'h00, 16'h003F);
    do begin repeat (50) @(posedge clk); vr(STAR, 8'h0A, d); end while (d < 3 && cycle < 200000);
    vw(STAR, 8'h00, 16'h003E);
    e = 3;
    check(laser_pulses >= 1, "laser trigger output fired");
    check_buffer(2, 0, e, 0, "laser");
    if (laser_pulses >= 1 && d == 3) mech[8]++;
    wait_tfib_idle();

    // ---- emulation from the Cmd/Conf FIFO ----
    vw(STAR, 8'h00, 16'h0078);   // clear STAR buffers, readout off
    vw(STAR, 8'h00, 16'h0038);
    vw(TFIB, 8'h03, 16'(HL_PREAMP_RESET));
    vw(TFIB, 8'h03, 16'(HL_DIG_READOUT));
    vw(TFIB, 8'h01, {9'b0, IMM_EMULATE, 4'h0});
    wait_tfib_idle();
    e = 4;
    check(n_prst[0] == 1, $sformatf("preamp reset seen by chips (%0d)", n_prst[0]));
    if (n_prst[0] == 1) mech[10]++;
    check(ev_num[0] == e, "emulated digitize-readout ran");
    check_buffer(0, 0, e, 0, "emul");
    if (ev_num[0] == e) mech[9]++;
    vw(TFIB, 8'h00, 16'h0004);   // clear TFIB data FIFOs, capture off

    // ---- readback of the TPC controller ----
    vw(TFIB, 8'h01, {9'b0, IMM_READBACK, 4'h0});
    wait_tfib_idle();
    vr(TFIB, 8'h10, d);
    check(d == {8'h07, 1'b1, SVX_ACQUIRE, LL_ACQUIRE, 2'b10}, $sformatf("readback %h", d));
    if (d == {8'h07, 1'b1, SVX_ACQUIRE, LL_ACQUIRE, 2'b10}) mech[11]++;

    // ---- TPC controller configuration, then read back ----
    vw(TFIB, 8'h03, 16'h00C7);
    vw(TFIB, 8'h01, {9'b0, IMM_CONFIG_TPC, 4'h0});
    wait_tfib_idle();
    vw(TFIB, 8'h01, {9'b0, IMM_READBACK, 4'h0});
    wait_tfib_idle();
    vr(TFIB, 8'h10, d);
    check(d[15:8] == 8'hC7 && dut.u_tpc.u_ctrl.hdi_en == 3'b111, $sformatf("TPC configuration read back %h", d));
    if (d[15:8] == 8'hC7) mech[18]++;

    // ---- DAC download ----
    vw(TFIB, 8'h14, 16'hA5C3);
    repeat (200) @(posedge clk);
    check(dac_loads == 1 && dac_word == 16'hA5C3, $sformatf("DAC word %h", dac_word));
    if (dac_word == 16'hA5C3) mech[12]++;

    // ---- front panel bus: HL_TEST from the STAR software command ----
    vw(TFIB, 8'h00, 16'h0001);
    vw(STAR, 8'h09, 16'(HL_TEST));
    repeat (20) @(posedge clk);
    check(test_pulses == 1, "test command over front panel bus");
    if (test_pulses == 1) mech[13]++;
    vw(TFIB, 8'h00, 16'h0000);

    // ---- 396 ns bunch pattern: every 3rd crossing, 36 bunches in 108 ----
    vw(STAR, 8'h02, 16'd108);
    vw(STAR, 8'h03, 16'd36);
    vw(STAR, 8'h04, 16'd3);
    @(posedge clk iff (sync && dut.u_star.xing_num == 0));
    n = 0;
    for (int x = 0; x < 108; x++) begin
      if (beam_xing) n++;
      if (x < 107) @(posedge clk iff sync);
    end
    check(n == 36, $sformatf("bunches in a 396 ns turn: %0d", n));
    if (n == 36) mech[14]++;

    // ---- test memory playback ----
    vw(STAR, 8'h10, 16'd0);
    for (int i = 0; i < 5; i++) vw(STAR, 8'h11, 16'h1000 * i + 16'(i));
    vw(STAR, 8'h12, 16'd5);
    vw(STAR, 8'h13, 16'h07_3C);
    tcap.delete();
    vw(STAR, 8'h14, 16'd1);
    repeat (40) @(posedge clk);
    begin
      bit ok;
      ok = (tcap.size() == 14) && tcap[0] == 8'h07 && tcap[1] == 8'h3C &&
               tcap[12] == EOR_CODE && tcap[13] == 8'h00;
      for (int i = 0; i < 5 && ok; i++)
        ok = (tcap[2 + 2*i] == 8'(16*i)) && (tcap[3 + 2*i] == 8'(i));
      check(ok, $sformatf("test data stream (%0d bytes)", tcap.size()));
      if (!ok) foreach (tcap[i]) $display("  test byte %0d: %h", i, tcap[i]);
      if (ok) mech[15]++;
    end

    // ---- command queue overflow: three commands back to back ----
    vw(STAR, 8'h09, 16'(HL_CAL_INJECT));
    vw(STAR, 8'h09, 16'(HL_CAL_INJECT));
    vw(STAR, 8'h09, 16'(HL_CAL_INJECT));
    wait_tfib_idle();
    vr(TFIB, 8'h12, d);
    check(d == 1, $sformatf("one command dropped (%0d)", d));
    if (d == 1) mech[16]++;

    // ---- readout timeout: HDI C never finishes ----
    block_done_c = 1;
    vw(TFIB, 8'h0C, 16'd600);
    vw(TFIB, 8'h01, {9'b0, IMM_HL, HL_READOUT});
    wait_tfib_idle();
    vr(TFIB, 8'h02, st);
    check(st[3], "readout timeout flagged");
    if (st[3]) mech[17]++;
    check(hdi_ctrl[0].mode == SVX_ACQUIRE, "acquisition after timeout");

    for (int i = 0; i < N_MECH; i++) begin
      $display("mechanism %-20s happened %0d times", MECH_NAME[i], mech[i]);
      check(mech[i] > 0, {"mechanism ", MECH_NAME[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
