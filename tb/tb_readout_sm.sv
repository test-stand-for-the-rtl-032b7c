// tb_readout_sm: feeds triggers of each mode and checks the command sequence
// on the bus: DIG_READOUT for external and laser triggers; CAL_INJECT, then
// DIG_READOUT cal_latency+1 clocks later for charge triggers. Also checks
// that `arm` stays low until `readout_done`, that a stale `readout_done` in
// the first clock is ignored, the event counter, the timeout, and that
// software commands pass only while idle. A random phase then runs 60
// events of random type, calibration latency and readout length against
// the same rules. The sequences are this design's reading of the document's
// "the exact sequences depend on the mode of operation".
module tb_readout_sm;
  import svx_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic enable = 0, trigger = 0, readout_done = 0;
  trig_mode_e trigger_type = TRG_EXTERNAL;
  logic [15:0] cal_latency = 12;
  logic [23:0] timeout = 24'd500;
  cmd_bus_t sw_cmd = '0, cmd;
  logic arm, busy, readout_start, timed_out;
  logic [15:0] event_count;
  int checks = 0, failures = 0, cyc = 0;

  readout_sm dut (.*);
  always @(posedge clk) cyc <= cyc + 1;

  // command log
  hl_cmd_e log_cmd [$];
  int      log_cyc [$];
  always @(posedge clk) if (cmd.strobe && !rst) begin log_cmd.push_back(cmd.cmd); log_cyc.push_back(cyc); end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fire(trig_mode_e m);
    @(negedge clk);
    trigger = 1; trigger_type = m;
    @(negedge clk);
    trigger = 0;
  endtask

  initial begin
    @(negedge clk);
    @(negedge clk) rst = 0;
    enable = 1;
    #1 check(arm, "armed when idle");
    // external trigger, done held high from before (stale)
    readout_done = 1;
    fire(TRG_EXTERNAL);
    @(negedge clk);
    check(busy && !arm, "busy after trigger, stale done ignored");
    readout_done = 0;
    repeat (20) @(negedge clk);
    check(busy && !arm, "not armed while reading out");
    fire(TRG_EXTERNAL);   // ignored, busy
    readout_done = 1;
    @(negedge clk) readout_done = 0;
    @(negedge clk);
    check(!busy && arm && event_count == 1, "event done");
    check(log_cmd.size() == 1 && log_cmd[0] == HL_DIG_READOUT, "external: one DIG_READOUT");

    // laser
    log_cmd.delete(); log_cyc.delete();
    fire(TRG_LASER);
    repeat (5) @(negedge clk);
    readout_done = 1;
    @(negedge clk) readout_done = 0;
    check(log_cmd.size() == 1 && log_cmd[0] == HL_DIG_READOUT, "laser: DIG_READOUT");

    // charge injection
    log_cmd.delete(); log_cyc.delete();
    fire(TRG_CHARGE);
    repeat (40) @(negedge clk);
    check(log_cmd.size() == 2 && log_cmd[0] == HL_CAL_INJECT && log_cmd[1] == HL_DIG_READOUT,
          "charge: CAL_INJECT then DIG_READOUT");
    if (log_cyc.size() == 2)
      check(log_cyc[1] - log_cyc[0] == int'(cal_latency) + 1,
            $sformatf("calibration delay %0d clocks", log_cyc[1] - log_cyc[0]));
    readout_done = 1;
    @(negedge clk) readout_done = 0;
    @(negedge clk);
    check(event_count == 3, "three events");

    // software command while idle, and while busy
    log_cmd.delete();
    sw_cmd = '{strobe: 1'b1, cmd: HL_ACQUIRE};
    @(negedge clk) sw_cmd = '0;
    @(negedge clk);
    check(log_cmd.size() == 1 && log_cmd[0] == HL_ACQUIRE, "software command passed");

    // timeout
    fire(TRG_EXTERNAL);
    repeat (520) @(negedge clk);
    check(timed_out && !busy && event_count == 3, "timeout without done");

    // random events: mode, calibration latency and readout time at random
    for (int ev = 0; ev < 60; ev++) begin
      trig_mode_e m;
      int lat, dly, n0;
      m   = trig_mode_e'($urandom_range(0, 2));
      lat = $urandom_range(0, 30);
      dly = $urandom_range(2, 60);
      cal_latency = 16'(lat);
      n0 = int'(event_count);
      log_cmd.delete(); log_cyc.delete();
      fire(m);
      repeat (lat + 4) @(negedge clk);
      if (m == TRG_CHARGE) begin
        check(log_cmd.size() == 2 && log_cmd[0] == HL_CAL_INJECT && log_cmd[1] == HL_DIG_READOUT,
              $sformatf("event %0d: charge sequence", ev));
        if (log_cyc.size() == 2)
          check(log_cyc[1] - log_cyc[0] == lat + 1, $sformatf("event %0d: calibration delay", ev));
      end else begin
        check(log_cmd.size() == 1 && log_cmd[0] == HL_DIG_READOUT, $sformatf("event %0d: DIG_READOUT", ev));
      end
      sw_cmd = '{strobe: 1'b1, cmd: HL_TEST};
      @(negedge clk) sw_cmd = '0;
      repeat (dly) @(negedge clk);
      check(busy && !arm && log_cmd.size() == ((m == TRG_CHARGE) ? 2 : 1),
            $sformatf("event %0d: busy, software command held back", ev));
      readout_done = 1;
      @(negedge clk) readout_done = 0;
      @(negedge clk);
      check(!busy && arm && int'(event_count) == n0 + 1, $sformatf("event %0d: counted", ev));
    end

    // disabled: triggers ignored
    enable = 0;
    log_cmd.delete();
    fire(TRG_EXTERNAL);
    repeat (5) @(negedge clk);
    check(log_cmd.size() == 0 && !arm, "disabled machine ignores triggers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
