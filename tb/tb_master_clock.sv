// tb_master_clock: checks the emulated beam structure and the triggers.
//   SYNC exactly every 7 RF clocks; crossing counter wrapping at turn_len;
//   beam crossings at every bunch_spacing-th crossing for n_bunches bunches
//   (132 ns and 396 ns patterns), against a formula computed here;
//   external trigger issued one clock after the next SYNC; internal laser
//   triggers at the programmed crossing every int_turns turns, with the laser
//   output; charge triggers; triggers lost while not armed.
module tb_master_clock;
  import svx_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] turn_len = 20, n_bunches = 20, int_xing = 0;
  logic [3:0] bunch_spacing = 1;
  trig_mode_e trig_mode = TRG_OFF;
  logic [15:0] int_turns = 1, trig_lost;
  logic arm = 1, ext_trigger = 0;
  logic sync, beam_xing, trigger, laser_trigger;
  logic [7:0] xing_num;
  trig_mode_e trigger_type;
  int checks = 0, failures = 0, cyc = 0;

  master_clock dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count crossings and bunches over whole turns
  task automatic check_pattern(int turns, int tl, int nb, int sp);
    int last = -1, x, nbeam = 0, exp_beam = 0;
    turn_len = 8'(tl); n_bunches = 8'(nb); bunch_spacing = 4'(sp);
    @(negedge clk iff (sync && xing_num == 0));
    for (int t = 0; t < turns * tl; t++) begin
      if (t > 0) @(negedge clk iff sync);
      x = t % tl;
      check(xing_num == 8'(x), $sformatf("crossing %0d expected %0d", xing_num, x));
      if (last >= 0) check(cyc - last == 7, $sformatf("SYNC interval %0d", cyc - last));
      last = cyc;
      check(beam_xing == ((x % sp == 0) && (x / sp < nb)),
            $sformatf("beam at crossing %0d (spacing %0d, %0d bunches)", x, sp, nb));
      if (beam_xing) nbeam++;
    end
    check(nbeam == turns * ((nb < (tl + sp - 1) / sp) ? nb : (tl + sp - 1) / sp),
          $sformatf("%0d bunches seen", nbeam));
  endtask

  initial begin
    int t_sync, ntrig, nlaser;
    @(negedge clk);
    @(negedge clk) rst = 0;
    check_pattern(3, 20, 20, 1);   // 132 ns, all crossings filled
    check_pattern(3, 21, 5, 3);    // 396 ns, 5 bunches
    check_pattern(2, 159, 159, 1); // full turn of 159 crossings

    // external trigger
    trig_mode = TRG_EXTERNAL;
    repeat (3) @(negedge clk);
    ext_trigger = 1;
    repeat (2) @(negedge clk);
    ext_trigger = 0;
    @(negedge clk iff sync);
    t_sync = cyc;
    @(negedge clk iff trigger);
    check(cyc - t_sync == 1, $sformatf("external trigger %0d clocks after SYNC", cyc - t_sync));
    check(trigger_type == TRG_EXTERNAL && !laser_trigger, "external trigger type");
    repeat (100) @(negedge clk);
    check(!trigger, "single external trigger");

    // internal laser trigger at crossing 7 every 2 turns of 20
    turn_len = 20; n_bunches = 20; bunch_spacing = 1;
    int_xing = 7; int_turns = 2;
    trig_mode = TRG_LASER;
    ntrig = 0; nlaser = 0;
    for (int i = 0; i < 8 * 20 * 7; i++) begin
      @(negedge clk);
      if (trigger) begin
        ntrig++;
        check(dut.xing_num == 8'd7, $sformatf("laser trigger at crossing %0d", xing_num));
        check(trigger_type == TRG_LASER, "laser trigger type");
      end
      if (laser_trigger) nlaser++;
    end
    check(ntrig == 4 && nlaser == 4, $sformatf("%0d laser triggers in 8 turns", ntrig));

    // charge triggers every turn, but not armed: all lost
    trig_mode = TRG_CHARGE; int_turns = 1; arm = 0;
    begin
      logic [15:0] lost0;
      lost0 = trig_lost;
      ntrig = 0;
      for (int i = 0; i < 3 * 20 * 7; i++) begin
        @(negedge clk);
        if (trigger) ntrig++;
      end
      check(ntrig == 0 && trig_lost - lost0 == 3, $sformatf("lost %0d triggers", trig_lost - lost0));
      arm = 1;
      @(negedge clk iff trigger);
      check(trigger_type == TRG_CHARGE && !laser_trigger, "charge trigger without laser");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
