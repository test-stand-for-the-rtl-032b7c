// tb_tfib: the TFIB board on its own, driven over VME and the command buses.
//
// A receiver in the test decodes the serial line to the TPC (start bit,
// three code bits, then the command's extra sclk edges) into a list of low
// level commands, and counts SVX clocks between the digitize and readout
// edges. The test checks:
//   a STAR DIG_READOUT on J3 becomes LL_DIG_READOUT then LL_ACQUIRE, with
//   n_dig digitization clocks in between
//   readout data arriving on the three SVX data buses (random bytes ending
//   in EOR) are captured in data FIFOs A, B, C; A and B are read through the
//   G-Link A&B port, C over VME
//   the command multiplexer: HL_TEST answers only from the selected bus
//   emulation: commands written to the Cmd/Conf FIFO are sent in order
//   a DAC word written over VME arrives on the DAC serial lines
//   a TPC controller configuration byte is taken from the Cmd/Conf FIFO and
//   sent after LL_CONFIG_TPC, and an empty FIFO is flagged
//   HL_RESET as an immediate command pulses the TPC reset for 4 clocks
module tb_tfib;
  import svx_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        vme_as_n = 1, vme_ds_n = 1, vme_write_n = 1;
  logic [23:1] vme_addr = '0;
  logic [15:0] vme_wdata = '0, vme_rdata;
  logic        vme_rdata_oe, vme_dtack_n;
  cmd_bus_t    j3_cmd = '0, fp_cmd = '0;
  logic        sclk, scmd, svx_clk, tpc_rst, tpc_sdo = 0, test_pulse;
  logic        dac_sclk, dac_sdi, dac_ld;
  svx_byte_t   svx_data [N_HDI];
  logic        glink_ab_rd = 0, glink_ab_ready, glink_c_rd = 0, glink_c_ready;
  logic [17:0] glink_ab_data;
  logic [8:0]  glink_c_data;

  tfib dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic vme_cycle(input logic [7:0] off, input bit wr,
                           input logic [15:0] wd, output logic [15:0] rd);
    @(posedge clk);
    vme_addr    <= {8'h20, 7'b0, off};
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
  task automatic wait_idle();
    logic [15:0] st;
    do begin
      repeat (10) @(posedge clk);
      vr(8'h02, st);
    end while (st[0] || st[1]);
  endtask
  task automatic strobe(bit fp, hl_cmd_e c);
    @(posedge clk);
    if (fp) fp_cmd <= '{strobe: 1'b1, cmd: c};
    else    j3_cmd <= '{strobe: 1'b1, cmd: c};
    @(posedge clk);
    fp_cmd <= '0;
    j3_cmd <= '0;
  endtask

  // ---- serial line receiver ----
  ll_cmd_e ll_log [$];
  logic sclk_q = 0, svx_clk_q = 0;
  int rx_bits = -1, rx_edges = 0, dig_clocks = 0, cnt_clocks = 0;
  logic [2:0] rx_code;
  logic [7:0] rx_data = 0;
  bit readout_phase = 0;
  always @(posedge clk) begin
    sclk_q    <= sclk;
    svx_clk_q <= svx_clk;
    if (svx_clk && !svx_clk_q) cnt_clocks++;
    if (sclk && !sclk_q) begin
      if (rx_edges > 0) begin
        rx_edges--;
        if (rx_code == LL_CONFIG_TPC) rx_data = {rx_data[6:0], scmd};
        if (rx_code == LL_DIG_READOUT && rx_edges == 1) cnt_clocks = 0;
        if (rx_code == LL_DIG_READOUT && rx_edges == 0) begin
          dig_clocks    = cnt_clocks;
          readout_phase = 1;
        end
      end else if (rx_bits < 0) begin
        if (scmd) rx_bits = 0;
      end else begin
        rx_code = {rx_code[1:0], scmd};
        rx_bits++;
        if (rx_bits == LL_BITS) begin
          ll_log.push_back(ll_cmd_e'(rx_code));
          rx_edges = ll_edges(ll_cmd_e'(rx_code));
          rx_bits  = -1;
        end
      end
    end
  end

  // ---- readout data source: random byte pairs then EOR on each HDI ----
  localparam int N_PAIRS = 9;
  logic [8:0] sent [N_HDI][$];
  initial begin
    foreach (svx_data[h]) svx_data[h] = '0;
    wait (readout_phase);
    repeat (5) @(posedge clk);
    for (int i = 0; i <= N_PAIRS; i++)
      for (int half = 1; half >= 0; half--) begin
        @(posedge clk);
        for (int h = 0; h < N_HDI; h++) begin
          logic [7:0] b;
          b = (i == N_PAIRS) ? (half ? EOR_CODE : 8'h00) : 8'($urandom_range(0, 254));
          svx_data[h] <= '{valid: 1'b1, hi_half: half[0], data: b};
          sent[h].push_back({half[0], b});
        end
      end
    @(posedge clk);
    foreach (svx_data[h]) svx_data[h] <= '0;
  end

  // ---- DAC receiver and pulse counters ----
  logic [15:0] dac_sr = 0, dac_word = 0;
  logic dac_sclk_q = 0;
  int test_n = 0, rst_len = 0;
  always @(posedge clk) begin
    dac_sclk_q <= dac_sclk;
    if (dac_sclk && !dac_sclk_q) dac_sr <= {dac_sr[14:0], dac_sdi};
    if (dac_ld) dac_word <= dac_sr;
    if (test_pulse) test_n++;
    if (tpc_rst) rst_len++;
  end

  initial begin
    logic [15:0] d, w;
    int n0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);

    // ---- event readout from a J3 command ----
    vw(8'h09, 16'd20);              // 20 digitization clocks
    vw(8'h0C, 16'd400);
    vw(8'h00, 16'h0002);            // capture on, J3 selected
    strobe(0, HL_DIG_READOUT);
    wait_idle();
    check(ll_log.size() == 2 && ll_log[0] == LL_DIG_READOUT && ll_log[1] == LL_ACQUIRE,
          $sformatf("serial commands for DIG_READOUT (%0d)", ll_log.size()));
    check(dig_clocks == 20, $sformatf("digitization clocks %0d", dig_clocks));
    vr(8'h02, d);
    check(!d[3], "readout ended on EOR, not on timeout");
    for (int h = 0; h < N_HDI; h++) begin
      vr(8'(8'h1C + h), d);
      check(d == 16'(2 * (N_PAIRS + 1)), $sformatf("FIFO %0d holds %0d bytes", h, d));
    end
    for (int i = 0; i < 2 * (N_PAIRS + 1); i++) begin
      @(negedge clk);
      check(glink_ab_ready, "G-Link A&B data ready");
      check(glink_ab_data == {sent[0][i], sent[1][i]},
            $sformatf("G-Link A&B word %0d: %h, expected %h", i, glink_ab_data, {sent[0][i], sent[1][i]}));
      @(posedge clk) glink_ab_rd <= 1;
      @(posedge clk) glink_ab_rd <= 0;
    end
    @(negedge clk);
    check(!glink_ab_ready, "FIFOs A and B empty");
    for (int i = 0; i < 2 * (N_PAIRS + 1); i++) begin
      vr(8'h1A, d);
      check(d == {7'b1, sent[2][i]}, $sformatf("FIFO C byte %0d: %h", i, d));
    end
    check(!glink_c_ready, "FIFO C empty");

    // ---- command bus selection ----
    n0 = test_n;
    strobe(0, HL_TEST);
    strobe(1, HL_TEST);
    wait_idle();
    check(test_n == n0 + 1, "J3 selected: only the J3 command answered");
    vw(8'h00, 16'h0001);
    strobe(0, HL_TEST);
    strobe(1, HL_TEST);
    strobe(1, HL_TEST);
    wait_idle();
    check(test_n == n0 + 2 + 1, "front panel selected: only its commands answered");

    // ---- emulation from the Cmd/Conf FIFO ----
    ll_log.delete();
    vw(8'h03, 16'(HL_PREAMP_RESET));
    vw(8'h03, 16'(HL_CAL_INJECT));
    vw(8'h01, {9'b0, IMM_EMULATE, 4'h0});
    wait_idle();
    check(ll_log.size() >= 2 && ll_log[0] == LL_PREAMP_RESET && ll_log[ll_log.size()-1] == LL_CAL_INJECT,
          $sformatf("emulated commands (%0d sent)", ll_log.size()));
    vr(8'h1F, d);
    check(d == 0, "Cmd/Conf FIFO emptied");

    // ---- DAC download ----
    w = 16'($urandom);
    vw(8'h14, w);
    repeat (400) @(posedge clk);
    check(dac_word == w, $sformatf("DAC word %h, expected %h", dac_word, w));

    // ---- TPC controller configuration byte from the Cmd/Conf FIFO ----
    ll_log.delete();
    w = 16'($urandom_range(0, 255));
    vw(8'h03, w);
    vw(8'h01, {9'b0, IMM_CONFIG_TPC, 4'h0});
    wait_idle();
    check(ll_log.size() == 1 && ll_log[0] == LL_CONFIG_TPC && rx_data == w[7:0],
          $sformatf("TPC configuration byte %h, expected %h", rx_data, w[7:0]));
    vr(8'h02, d);
    check(!d[4] && d[5], "configuration byte taken, FIFO empty");
    vw(8'h01, {9'b0, IMM_CONFIG_TPC, 4'h0});
    wait_idle();
    vr(8'h02, d);
    check(d[4], "underrun flagged when the FIFO is empty");

    // ---- TPC reset ----
    rst_len = 0;
    vw(8'h01, {9'b0, IMM_HL, HL_RESET});
    wait_idle();
    check(rst_len == 4, $sformatf("TPC reset %0d clocks", rst_len));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
