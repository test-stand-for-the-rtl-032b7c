// tb_eor_inserter: a chip stream (one byte per SVX clock half, one clock
// after each clock edge) passes through; when `chips_done` rises the EOR
// code must take the next rising-edge slot and 8'h00 the falling-edge slot,
// once per readout; outside readout mode nothing is inserted. Three fixed
// and nine random event lengths are run.
// EOR insertion by the port card is from the board description; the code
// value (FF then 00) and the slot timing are this design's choices.
module tb_eor_inserter;
  import svx_pkg::*;
  logic clk = 0, rst = 1, readout_mode = 0, svx_clk = 0, chips_done = 0;
  always #5 clk = ~clk;
  svx_byte_t din = '0, dout;
  logic eor_sent;
  int checks = 0, failures = 0;

  eor_inserter dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  svx_byte_t got [$];
  always @(posedge clk) if (!rst && dout.valid) got.push_back(dout);

  // chip model: NB bytes, then done
  task automatic run(int nbytes, bit mode);
    int sent = 0;
    readout_mode = mode;
    got.delete();
    for (int i = 0; i < 2 * nbytes + 12; i++) begin
      @(negedge clk);
      svx_clk = !svx_clk;
      // the chip answers the edge one clock later
      @(negedge clk);
      svx_clk = svx_clk;
    end
  endtask

  // chip side driven from the clock edges the chip sees
  logic clk_q = 0;
  int chip_bytes = 0, chip_limit = 0;
  bit force_done = 0;   // done line held high with no readout (last test)
  always @(posedge clk) begin
    clk_q <= svx_clk;
    din <= '0;
    if (svx_clk != clk_q && readout_mode) begin
      if (chip_bytes < chip_limit) begin
        din <= '{valid: 1'b1, hi_half: svx_clk, data: 8'(chip_bytes)};
        chip_bytes <= chip_bytes + 1;
        if (chip_bytes + 1 == chip_limit) chips_done <= 1;
      end
    end
    if (!readout_mode) begin chips_done <= force_done; chip_bytes <= 0; end
  end

  initial begin
    @(negedge clk);
    @(negedge clk) rst = 0;
    for (int ev = 0; ev < 12; ev++) begin
      chip_limit = (ev < 3) ? 6 + 2 * ev : 2 * $urandom_range(1, 40);
      run(chip_limit, 1);
      check(got.size() == chip_limit + 2, $sformatf("event %0d: %0d bytes", ev, got.size()));
      for (int i = 0; i < chip_limit && i < got.size(); i++)
        check(got[i].data == 8'(i) && got[i].hi_half == (i % 2 == 0), $sformatf("byte %0d passed", i));
      if (got.size() >= chip_limit + 2) begin
        check(got[chip_limit] == '{1'b1, 1'b1, EOR_CODE}, "EOR in high half");
        check(got[chip_limit + 1] == '{1'b1, 1'b0, 8'h00}, "filler in low half");
      end
      check(eor_sent, "eor_sent set");
      readout_mode = 0;
      repeat (3) @(negedge clk);
      check(!eor_sent, "re-armed outside readout");
    end
    // outside readout, done alone inserts nothing
    got.delete();
    force_done = 1;
    run(4, 0);
    check(chips_done, "done line held high");
    check(got.size() == 0, "nothing inserted outside readout mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
