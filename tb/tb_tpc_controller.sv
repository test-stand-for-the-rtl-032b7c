// tb_tpc_controller: sends every low level command serially (start bit and
// 3-bit code on scmd, one sclk pulse per bit) and steps it with further sclk
// pulses, checking the SVX control lines after each edge, `ready` after the
// fixed number of edges, the readback bits, the loading of a random
// configuration byte (HDI clock enables change only at the 8th edge), the routing of scmd to the
// chips' serial input in configuration mode, the one-clock buffering of the
// SVX clock, and the TPC reset.
// The seven functions, the serial line with its clock and the fixed edge
// counts follow the description of the port card controller; codes,
// framing and states are this design's choices.
module tb_tpc_controller;
  import svx_pkg::*;
  logic clk = 0, rst = 1, tpc_rst = 0, sclk = 0, scmd = 0, svx_clk = 0;
  always #5 clk = ~clk;
  logic sdo, ready, readout_mode;
  logic [N_HDI-1:0] hdi_en;
  hdi_ctrl_t ctrl;
  int checks = 0, failures = 0;

  tpc_controller dut (.*);

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

  task automatic pulse(bit b);
    scmd = b;
    repeat (2) @(negedge clk);
    sclk = 1;
    repeat (2) @(negedge clk);
    sclk = 0;
  endtask

  task automatic send(ll_cmd_e c);
    pulse(1);
    for (int i = LL_BITS - 1; i >= 0; i--) pulse(c[i]);
    scmd = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    logic [15:0] rb;
    @(negedge clk);
    @(negedge clk) rst = 0;
    repeat (2) @(negedge clk);
    check(ctrl.mode == SVX_ACQUIRE && ready, "reset: acquire, ready");
    // sclk pulses with scmd low are not commands
    pulse(0); pulse(0);
    check(ready && ctrl.mode == SVX_ACQUIRE, "idle edges ignored");

    // initialization: configuration mode, serial data routed
    send(LL_INIT);
    check(!ready && ctrl.mode == SVX_ACQUIRE, "INIT: waits for its edge");
    pulse(0);
    check(ready && ctrl.mode == SVX_CONFIG, "INIT: configuration mode after 1 edge");
    scmd = 1; @(negedge clk); @(negedge clk);
    check(ctrl.serial_in == 1, "scmd routed to serial input");
    scmd = 0; @(negedge clk); @(negedge clk);
    check(ctrl.serial_in == 0, "serial input follows scmd");
    // SVX clock buffered with one clock of delay
    svx_clk = 1; @(negedge clk);
    check(ctrl.clk == 1, "SVX clock buffered");
    svx_clk = 0; @(negedge clk);
    check(ctrl.clk == 0, "SVX clock low");

    send(LL_ACQUIRE); pulse(0);
    check(ready && ctrl.mode == SVX_ACQUIRE && ctrl.serial_in == 0, "ACQUIRE");
    scmd = 1; @(negedge clk); @(negedge clk);
    check(ctrl.serial_in == 0, "serial input blocked outside configuration");
    scmd = 0;

    // digitize-readout: two edges
    send(LL_DIG_READOUT);
    pulse(0);
    check(!ready && ctrl.mode == SVX_DIGITIZE, "DIG_READOUT edge 1: digitize");
    pulse(0);
    check(ready && ctrl.mode == SVX_READOUT && readout_mode, "DIG_READOUT edge 2: readout");

    send(LL_ACQUIRE); pulse(0);
    send(LL_CAL_INJECT); pulse(0);
    check(ctrl.cal_inject && !ready, "CAL_INJECT edge 1");
    pulse(0);
    check(!ctrl.cal_inject && ready, "CAL_INJECT edge 2");
    send(LL_PREAMP_RESET); pulse(0);
    check(ctrl.preamp_reset && !ready, "PREAMP_RESET edge 1");
    pulse(0);
    check(!ctrl.preamp_reset && ready, "PREAMP_RESET edge 2");
    send(LL_READOUT); pulse(0);
    check(ctrl.mode == SVX_READOUT && ready, "READOUT");
    send(LL_ACQUIRE); pulse(0);

    // readback: 16 edges, configuration and status bits on sdo
    send(LL_READBACK);
    rb = 0;
    for (int i = 0; i < READBACK_BITS; i++) begin
      check(!ready, "readback in progress");
      pulse(0);
      rb = {rb[14:0], sdo};
    end
    check(ready, "ready after 16 readback edges");
    check(rb == {8'h07, 1'b1, SVX_ACQUIRE, LL_ACQUIRE, 2'b10}, $sformatf("readback %h", rb));

    // configuration byte: 8 edges with data on scmd, effective at the last
    begin
      logic [7:0] cb;
      cb = 8'($urandom) | 8'h80;
      send(LL_CONFIG_TPC);
      for (int i = 7; i >= 0; i--) begin
        check(hdi_en == 3'b111 && !ready, "configuration not yet in effect");
        pulse(cb[i]);
      end
      check(ready && hdi_en == cb[2:0], $sformatf("HDI enables %b from %h", hdi_en, cb));
      send(LL_READBACK);
      rb = 0;
      for (int i = 0; i < READBACK_BITS; i++) begin
        pulse(0);
        rb = {rb[14:0], sdo};
      end
      check(rb[15:8] == cb, $sformatf("configuration read back %h, expected %h", rb[15:8], cb));
      check(rb[7:0] == {1'b1, SVX_ACQUIRE, LL_CONFIG_TPC, 2'b10}, $sformatf("status after configuration %h", rb[7:0]));
    end

    // TPC reset in the middle of a command
    send(LL_DIG_READOUT); pulse(0);
    check(ctrl.mode == SVX_DIGITIZE, "digitizing before reset");
    @(negedge clk) tpc_rst = 1;
    @(negedge clk) tpc_rst = 0;
    @(negedge clk);
    check(ready && ctrl.mode == SVX_ACQUIRE && hdi_en == 3'b111, "TPC reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
