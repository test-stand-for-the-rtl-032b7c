// tb_kek_beam_test: the beam-test workload at full size. One 128-channel SVX
// chip sits on each HDI, as in a single-detector beam test. Beam triggers
// arrive on the external trigger input in 132 ns mode, and every event is
// digitized and read out into STAR data buffer A until that 64k x 16 buffer
// overflows.
//
// The chips' thresholds stay at their reset value 0, so every channel with
// a non-zero value is read out. The model's channel value is
// (7c + 5e) mod 64 for channel c of event e, so 126 or 128 channels qualify.
// An event needs 1 header word, one word per channel and 1 EOR word. The
// test adds these counts up independently of the design to predict:
//   - the last event that fits completely;
//   - the event in which the overflow flag rises.
// It then checks both, checks the final word count (65536), and reads the
// last complete event back over VME, comparing it word by word.
// Buffer size, channel count and trigger path follow the test stand's
// description; the event format and values are those of the chip model.
module tb_kek_beam_test;
  import svx_pkg::*;

  localparam logic [7:0] STAR = 8'h10, TFIB = 8'h20;
  localparam int DEPTH = 65536;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        vme_as_n = 1, vme_ds_n = 1, vme_write_n = 1;
  logic [23:1] vme_addr = '0;
  logic [15:0] vme_wdata = '0, vme_rdata;
  logic        vme_dtack_n;
  logic        ext_trigger = 0, laser_trigger, sync, beam_xing, test_pulse;
  hdi_ctrl_t   hdi_ctrl [N_HDI];
  svx_byte_t   hdi_din  [N_HDI];
  logic        hdi_done [N_HDI];
  svx_byte_t   test_data;
  logic        dac_sclk, dac_sdi, dac_ld;
  logic        glink_ab_rd = 0, glink_ab_ready, glink_c_rd = 0, glink_c_ready;
  logic [17:0] glink_ab_data;
  logic [8:0]  glink_c_data;
  logic        tpc_ready;
  logic        eor_sent [N_HDI];
  int          n_prst [N_HDI], n_acq [N_HDI], ev_num [N_HDI];

  svx_test_stand dut (.*);

  for (genvar h = 0; h < N_HDI; h++) begin : g_chips
    svx_chip_model #(.N_CHIPS(1), .ID_BASE(16*h + 1)) u_chain (
      .clk, .rst, .ctrl(hdi_ctrl[h]), .dout(hdi_din[h]), .done(hdi_done[h]),
      .n_preamp_resets(n_prst[h]), .n_acq_edges(n_acq[h]), .event_num(ev_num[h])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic vme_cycle(input logic [7:0] base, input logic [7:0] off, input bit wr,
                           input logic [15:0] wd, output logic [15:0] rd);
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

  function automatic int n_channels(int e);
    int n = 0;
    for (int c = 0; c < SVX_CHANNELS; c++) if ((7*c + 5*e) % 64 != 0) n++;
    return n;
  endfunction

  initial begin
    logic [15:0] d, cnt_lo, cnt_hi;
    int total, fit_events, ovf_event, start_last, ev, seen_ovf;
    // prediction
    total = 0; fit_events = 0; ovf_event = -1; start_last = 0;
    for (int e = 1; ovf_event < 0; e++) begin
      int w;
      w = 1 + n_channels(e) + 1;
      if (total + w <= DEPTH) begin
        start_last = total;
        total += w;
        fit_events = e;
      end else ovf_event = e;
    end
    $display("prediction: %0d events fit (%0d words), overflow in event %0d",
             fit_events, total, ovf_event);

    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    // readout enable, external (beam) triggers, buffer A only
    vw(STAR, 8'h00, 16'b001_000 | (16'(TRG_EXTERNAL) << 1) | 16'd1);

    seen_ovf = -1;
    for (ev = 1; ev <= ovf_event; ev++) begin
      @(posedge clk) ext_trigger <= 1;
      repeat (3) @(posedge clk);
      ext_trigger <= 0;
      wait (int'(dut.u_star.event_count) == ev);
      wait (!dut.u_tfib.busy);
      if (seen_ovf < 0 && dut.u_star.overflow[0]) seen_ovf = ev;
    end

    vr(STAR, 8'h0A, d);
    check(int'(d) == ovf_event, $sformatf("events read out: %0d", d));
    check(seen_ovf == ovf_event, $sformatf("overflow first seen in event %0d, predicted %0d", seen_ovf, ovf_event));
    vr(STAR, 8'h22, cnt_lo);
    vr(STAR, 8'h23, cnt_hi);
    check({cnt_hi, cnt_lo} == 32'(DEPTH), $sformatf("buffer A word count %0d", {cnt_hi, cnt_lo}));
    check(fit_events >= 504, $sformatf("%0d complete events in one buffer", fit_events));

    // last complete event, word by word
    vw(STAR, 8'h20, 16'(start_last));
    vr(STAR, 8'h21, d);
    check(d == {8'd1, 1'b1, 1'b0, 6'(fit_events)}, $sformatf("header of event %0d: %h", fit_events, d));
    for (int c = 0; c < SVX_CHANNELS; c++) begin
      int v;
      v = (7*c + 5*fit_events) % 64;
      if (v != 0) begin
        vr(STAR, 8'h21, d);
        check(d == {8'(c), 8'(v)}, $sformatf("channel %0d: %h", c, d));
      end
    end
    vr(STAR, 8'h21, d);
    check(d == {EOR_CODE, 8'h00}, $sformatf("EOR word %h", d));
    // the other two HDIs were read out too, though their buffers were off
    check(ev_num[1] == ovf_event && ev_num[2] == ovf_event, "all chips digitized every event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
