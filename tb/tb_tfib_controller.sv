// tb_tfib_controller: records what the controller puts on the TPC lines -
// the scmd bit at each rising edge of sclk and the number of SVX clock
// rising edges between sclk edges - and compares it with the sequences the
// commands must produce:
//   DIG_READOUT: code 1-101, edge, n_dig SVX clocks, edge, readout clocks
//                until EOR on the enabled HDIs, code 1-010 (ACQUIRE), edge,
//                then the 4+3 acquisition clock
//   emulation from the FIFO (CAL_INJECT, PREAMP_RESET), with the hold time
//   SVX configuration bytes shifted MSB first, one SVX clock per bit
//   readback, a dropped command, a readout timeout, HL_TEST, HL_RESET.
module tb_tfib_controller;
  import svx_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  tfib_cfg_t cfg;
  cmd_bus_t hl_cmd = '0;
  logic imm_strobe = 0;
  imm_cmd_e imm_code = IMM_HL;
  hl_cmd_e imm_arg = HL_NOP;
  logic [15:0] fifo_dout;
  logic fifo_empty, fifo_rd;
  svx_byte_t hdi_data [N_HDI];
  logic tpc_sdo = 0;
  logic sclk, scmd, svx_clk, tpc_rst, test_pulse, busy, emulating, acq_run;
  logic ro_timeout, cfg_underrun;
  logic [READBACK_BITS-1:0] readback;
  logic [15:0] cmd_done, dropped, ro_clocks;
  int checks = 0, failures = 0, cyc = 0;

  tfib_controller dut (.*);
  always @(posedge clk) cyc <= cyc + 1;

  // FIFO model
  logic [15:0] fq [$];
  assign fifo_empty = (fq.size() == 0);
  assign fifo_dout  = fifo_empty ? 16'h0 : fq[0];
  always @(posedge clk) if (fifo_rd && fq.size() > 0) void'(fq.pop_front());

  // line recorder
  int  seq [$];
  int  nrise = 0, last_sclk_cyc = 0, tpc_rst_cycles = 0, test_pulses = 0;
  int  sclk_gaps [$];
  logic [7:0] cfg_bits [$];
  logic sclk_q = 0, svx_q = 0;
  bit  inject_at_20 = 0, in_readout = 0;
  always @(posedge clk) if (!rst) begin
    sclk_q <= sclk;
    svx_q  <= svx_clk;
    if (tpc_rst) tpc_rst_cycles++;
    if (test_pulse) test_pulses++;
    if (svx_clk && !svx_q) begin
      nrise++;
      if (dut.uop.op == 4'(6)) ; // configuration bits are checked via scmd below
    end
    if (sclk && !sclk_q) begin
      if (nrise > 0) seq.push_back(100 + nrise);
      nrise = 0;
      seq.push_back(scmd);
      sclk_gaps.push_back(cyc - last_sclk_cyc);
      last_sclk_cyc = cyc;
    end
  end

  // configuration bits: scmd sampled at SVX clock rising edges
  logic [7:0] cfg_sr = 0;
  int cfg_n = 0;
  always @(posedge clk) if (!rst && svx_clk && !svx_q && !acq_run) begin
    cfg_sr = {cfg_sr[6:0], scmd};
    cfg_n++;
    if (cfg_n % 8 == 0) cfg_bits.push_back(cfg_sr);
  end

  // EOR injection after 20 readout clocks on HDIs A and B
  int ro_rises = 0;
  always @(posedge clk) begin
    hdi_data[0] <= '0; hdi_data[1] <= '0; hdi_data[2] <= '0;
    if (!rst && in_readout && svx_clk && !svx_q) begin
      ro_rises++;
      if (ro_rises == 20 && inject_at_20) begin
        hdi_data[0] <= '{1'b1, 1'b1, EOR_CODE};
        hdi_data[1] <= '{1'b1, 1'b1, EOR_CODE};
      end
    end
  end

  // readback source: a fixed pattern, one bit per sclk rising edge
  logic [READBACK_BITS-1:0] rb_pat = 16'b1011_0010_0110_1101;
  int rb_i = 0;
  always @(posedge clk) if (!rst && sclk && !sclk_q && dut.uop.op == 4'(7)) begin
    tpc_sdo <= rb_pat[READBACK_BITS - 1 - rb_i];
    rb_i <= rb_i + 1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  task automatic expect_seq(int e [$], string what);
    bit ok = (seq.size() == e.size());
    if (ok) foreach (e[i]) if (seq[i] != e[i]) ok = 0;
    check(ok, what);
    if (!ok) begin
      $write("  got:"); foreach (seq[i]) $write(" %0d", seq[i]); $write("\n");
      $write("  exp:"); foreach (e[i]) $write(" %0d", e[i]); $write("\n");
    end
  endtask

  task automatic wait_idle();
    do @(negedge clk); while (busy || emulating || imm_strobe);
    repeat (3) @(negedge clk);
  endtask

  task automatic imm(imm_cmd_e c, hl_cmd_e a);
    @(negedge clk); imm_strobe = 1; imm_code = c; imm_arg = a;
    @(negedge clk); imm_strobe = 0;
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, t2;
    cfg = '{sclk_half: 8'd2, acq_hi: 8'd4, acq_lo: 8'd3, dig_hi: 8'd1, dig_lo: 8'd1,
            n_dig: 16'd10, ro_hi: 8'd1, ro_lo: 8'd1, ro_max: 16'd100, hold: 16'd5,
            cfg_bytes: 8'd2, hdi_en: 3'b011};
    @(negedge clk);
    @(negedge clk) rst = 0;

    // acquire
    seq.delete();
    imm(IMM_HL, HL_ACQUIRE);
    wait_idle();
    expect_seq('{1, 0, 1, 0, 0}, "ACQUIRE sequence");
    check(acq_run, "acquisition clock running");
    @(posedge svx_clk); t0 = cyc;
    @(posedge svx_clk); t1 = cyc;
    @(negedge svx_clk); t2 = cyc;
    check(t1 - t0 == 7 && t2 - t1 == 4, $sformatf("acquisition clock %0d clocks, high %0d", t1 - t0, t2 - t1));

    // digitize and read out, STAR command
    seq.delete(); nrise = 0; ro_rises = 0; inject_at_20 = 1;
    @(negedge clk) hl_cmd = '{1'b1, HL_DIG_READOUT};
    @(negedge clk) hl_cmd = '0;
    // readout phase starts at the second edge after the code
    do @(negedge clk); while (seq.size() < 7);
    in_readout = 1;
    wait (!acq_run);
    wait (acq_run);
    in_readout = 0;
    wait_idle();
    repeat (2) @(negedge clk);
    while (seq.size() > 0 && seq[0] >= 100) void'(seq.pop_front());
    check(seq.size() >= 13, "DIG_READOUT sequence length");
    if (seq.size() >= 13) begin
      int r;
      r = seq[7] - 100;
      if (r < 0) begin $write("  seq:"); foreach (seq[i]) $write(" %0d", seq[i]); $write("\n"); end
      check(r >= 20 && r <= 21, $sformatf("readout stopped after %0d SVX clocks", r));
      seq[7] = 0;
      while (seq.size() > 13) void'(seq.pop_back());
      expect_seq('{1, 1, 0, 1, 0, 110, 0, 0, 1, 0, 1, 0, 0}, "DIG_READOUT sequence");
    end
    check(!ro_timeout, "no timeout");

    // emulation: CAL_INJECT, PREAMP_RESET from the FIFO
    seq.delete(); sclk_gaps.delete(); nrise = 0;
    fq.push_back(16'(HL_CAL_INJECT));
    fq.push_back(16'(HL_PREAMP_RESET));
    imm(IMM_EMULATE, HL_NOP);
    wait_idle();
    while (seq.size() > 0 && seq[$] >= 100) void'(seq.pop_back());
    begin
      int e [$] = '{1, 1, 0, 0, 0, 0, 1, 0, 1, 1, 0, 0};
      // acquisition clocks keep running: drop their counts
      int s2 [$];
      foreach (seq[i]) if (seq[i] < 100) s2.push_back(seq[i]);
      seq = s2;
      expect_seq(e, "emulated CAL_INJECT + PREAMP_RESET");
    end
    check(sclk_gaps.size() == 12 && sclk_gaps[5] >= 5 + 4 && sclk_gaps[11] >= 5 + 4,
          "hold time between the two edges");
    check(fq.size() == 0 && !emulating, "FIFO drained");

    // SVX configuration: two bytes
    seq.delete(); cfg_bits.delete(); cfg_n = 0; cfg_sr = 0; nrise = 0;
    fq.push_back(16'h00A5);
    fq.push_back(16'h003C);
    imm(IMM_CONFIG_SVX, HL_NOP);
    wait (!acq_run);
    @(negedge clk);
    cfg_n = 0; cfg_bits.delete();
    wait (acq_run);
    wait_idle();
    check(cfg_bits.size() >= 2 && cfg_bits[0] == 8'hA5 && cfg_bits[1] == 8'h3C,
          $sformatf("configuration bytes %p", cfg_bits));
    begin
      int s2 [$];
      foreach (seq[i]) if (i < 6) s2.push_back(seq[i]);
      seq = s2;
      expect_seq('{1, 0, 0, 0, 0, 116}, "configuration: INIT, edge, 16 bit clocks");
    end
    check(!cfg_underrun, "no underrun");

    // readback
    imm(IMM_READBACK, HL_NOP);
    wait_idle();
    check(readback == rb_pat, $sformatf("readback %h", readback));

    // three STAR commands back to back: one runs, one waits, one is dropped
    @(negedge clk) hl_cmd = '{1'b1, HL_TEST};
    @(negedge clk) hl_cmd = '{1'b1, HL_CAL_INJECT};
    @(negedge clk) hl_cmd = '{1'b1, HL_CAL_INJECT};
    @(negedge clk) hl_cmd = '0;
    wait_idle();
    check(dropped == 1 && test_pulses == 1, $sformatf("dropped %0d, test pulses %0d", dropped, test_pulses));

    // readout without EOR: timeout after ro_max clocks
    inject_at_20 = 0;
    imm(IMM_HL, HL_READOUT);
    wait_idle();
    check(ro_timeout && ro_clocks == 100, $sformatf("timeout after %0d clocks", ro_clocks));
    check(acq_run, "back to acquisition after timeout");

    // reset
    imm(IMM_HL, HL_RESET);
    wait_idle();
    check(tpc_rst_cycles == 4 && !acq_run, $sformatf("TPC reset pulse %0d clocks, acquisition clock stopped", tpc_rst_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
