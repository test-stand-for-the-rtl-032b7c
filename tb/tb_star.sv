// tb_star: the STAR board on its own, driven over VME.
//
// The test data output is cabled back to SVX data input A, as the memory
// test facility is meant to be used. The test loads random words into the
// test memory, plays them out twice and reads buffer A back over VME; the
// words, header and EOR trailer must come back in order and the word
// counter must match. It then enables the readout state machine in external
// trigger mode, pulses the external trigger and checks that a DIG_READOUT
// command appears on both command buses, that the state machine stays busy
// until the EOR arrives (sent by another test memory playback) and that the
// event counter advances. Finally it checks the register read-back of the
// beam structure registers and the laser trigger output in laser mode.
module tb_star;
  import svx_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        vme_as_n = 1, vme_ds_n = 1, vme_write_n = 1;
  logic [23:1] vme_addr = '0;
  logic [15:0] vme_wdata = '0, vme_rdata;
  logic        vme_rdata_oe, vme_dtack_n;
  logic        ext_trigger = 0, laser_trigger, sync, beam_xing;
  cmd_bus_t    j3_cmd, fp_cmd;
  svx_byte_t   svx_data [N_HDI], test_data;

  star dut (.*);

  assign svx_data[0] = test_data;
  assign svx_data[1] = '0;
  assign svx_data[2] = '0;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic vme_cycle(input logic [7:0] off, input bit wr,
                           input logic [15:0] wd, output logic [15:0] rd);
    @(posedge clk);
    vme_addr    <= {8'h10, 7'b0, off};
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
  task automatic vw(input logic [7:0] off, input logic [15:0] d);
    logic [15:0] dummy;
    vme_cycle(off, 1, d, dummy);
  endtask
  task automatic vr(input logic [7:0] off, output logic [15:0] d);
    vme_cycle(off, 0, 16'h0, d);
  endtask

  int j3_dig = 0, fp_dig = 0, other_cmd = 0, laser_n = 0;
  always @(posedge clk) if (!rst) begin
    if (j3_cmd.strobe && j3_cmd.cmd == HL_DIG_READOUT) j3_dig++;
    else if (j3_cmd.strobe) other_cmd++;
    if (fp_cmd.strobe && fp_cmd.cmd == HL_DIG_READOUT) fp_dig++;
    if (laser_trigger) laser_n++;
  end

  initial begin
    logic [15:0] words [$], d;
    int n;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);

    // ---- memory test: random block played twice into buffer A ----
    n = 4 + $urandom_range(0, 20);
    for (int i = 0; i < n; i++) words.push_back(16'($urandom));
    vw(8'h00, 16'b001_000 | (16'(TRG_OFF) << 1));   // buffer A enabled
    vw(8'h10, 16'd0);
    foreach (words[i]) vw(8'h11, words[i]);
    vw(8'h12, 16'(n));
    vw(8'h13, 16'hA1_5B);
    for (int rep = 0; rep < 2; rep++) begin
      vw(8'h14, 16'd1);
      do vr(8'h14, d); while (d[0]);
    end
    vr(8'h15, d);
    check(d == 2, $sformatf("blocks played: %0d", d));
    vr(8'h22, d);
    check(d == 16'(2 * (n + 2)), $sformatf("buffer A word count %0d, expected %0d", d, 2 * (n + 2)));
    vr(8'h01, d);
    check(d[3], "EOR seen on buffer A");
    vw(8'h20, 16'd0);
    for (int rep = 0; rep < 2; rep++) begin
      vr(8'h21, d);
      check(d == 16'hA15B, $sformatf("header word %h", d));
      for (int i = 0; i < n; i++) begin
        vr(8'h21, d);
        check(d == words[i], $sformatf("data word %0d: %h expected %h", i, d, words[i]));
      end
      vr(8'h21, d);
      check(d == {EOR_CODE, 8'h00}, $sformatf("trailer word %h", d));
    end
    vr(8'h26, d);
    check(d == 0, "buffer B untouched");

    // ---- externally triggered event ----
    vw(8'h00, 16'h0040);                             // clear buffers
    vw(8'h00, 16'b001_000 | (16'(TRG_EXTERNAL) << 1) | 16'd1);
    repeat (20) @(posedge clk);
    @(posedge clk) ext_trigger <= 1;
    @(posedge clk) ext_trigger <= 0;
    repeat (30) @(posedge clk);
    check(j3_dig == 1 && fp_dig == 1, $sformatf("DIG_READOUT on J3 %0d, front panel %0d", j3_dig, fp_dig));
    vr(8'h01, d);
    check(d[6], "readout state machine busy until EOR");
    vw(8'h13, 16'h0102);
    vw(8'h12, 16'd1);
    vw(8'h14, 16'd1);
    repeat (60) @(posedge clk);
    vr(8'h0A, d);
    check(d == 1, $sformatf("event counter %0d", d));
    vr(8'h01, d);
    check(!d[6], "readout state machine idle after EOR");
    vr(8'h22, d);
    check(d == 3, $sformatf("event word count %0d", d));
    check(other_cmd == 0, "no other command sent");

    // ---- register read-back and laser mode ----
    vw(8'h02, 16'd21);
    vw(8'h03, 16'd7);
    vw(8'h04, 16'd3);
    vr(8'h02, d); check(d == 21, "turn length read-back");
    vr(8'h03, d); check(d == 7, "bunch count read-back");
    vr(8'h04, d); check(d == 3, "spacing read-back");
    vw(8'h00, 16'b001_000 | (16'(TRG_LASER) << 1) | 16'd1);
    repeat (400) @(posedge clk);
    check(laser_n > 0, $sformatf("laser triggers %0d", laser_n));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
