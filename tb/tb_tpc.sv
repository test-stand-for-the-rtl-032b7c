// tb_tpc: the TPC with three modelled chains of two SVX chips. The test acts
// as the TFIB: it sends LL_DIG_READOUT serially, gives 256 digitization
// clocks, steps to readout, clocks the chips until every SVX data bus has
// carried the EOR code, and compares the three streams with the chip
// model's formula (thresholds 0 after reset). It also checks that all HDIs
// get the same control lines and that LL_ACQUIRE returns them to acquisition,
// and that a TPC configuration byte stops the SVX clock of a disabled HDI.
module tb_tpc;
  import svx_pkg::*;
  localparam int N_CHIPS = 2;
  logic clk = 0, rst = 1, sclk = 0, scmd = 0, svx_clk = 0, tpc_rst = 0;
  always #5 clk = ~clk;
  logic sdo, ready;
  hdi_ctrl_t hdi_ctrl [N_HDI];
  svx_byte_t hdi_din [N_HDI], svx_data [N_HDI];
  logic hdi_done [N_HDI], eor_sent [N_HDI];
  int n_prst [N_HDI], n_acq [N_HDI], ev_num [N_HDI];
  int checks = 0, failures = 0;

  tpc dut (.*);

  for (genvar h = 0; h < N_HDI; h++) begin : g_chips
    svx_chip_model #(.N_CHIPS(N_CHIPS), .ID_BASE(16*h + 1)) u_chain (
      .clk, .rst, .ctrl(hdi_ctrl[h]), .dout(hdi_din[h]), .done(hdi_done[h]),
      .n_preamp_resets(n_prst[h]), .n_acq_edges(n_acq[h]), .event_num(ev_num[h])
    );
  end

  // capture the three output streams
  logic [7:0] cap [N_HDI][$];
  bit seen_eor [N_HDI];
  always @(posedge clk) if (!rst) for (int h = 0; h < N_HDI; h++)
    if (svx_data[h].valid) begin
      cap[h].push_back(svx_data[h].data);
      if (svx_data[h].hi_half && svx_data[h].data == EOR_CODE) seen_eor[h] = 1;
    end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
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
  endtask
  task automatic svx_clocks(int n);
    repeat (n) begin
      @(negedge clk) svx_clk = 1;
      @(negedge clk) svx_clk = 0;
    end
  endtask

  function automatic logic [7:0] chan_val(int k, int c, int e);
    return 8'((7*c + 13*k + 5*e) % 64);
  endfunction

  initial begin
    int nclk;
    @(negedge clk);
    @(negedge clk) rst = 0;
    send(LL_DIG_READOUT);
    pulse(0);
    for (int h = 0; h < N_HDI; h++) check(hdi_ctrl[h].mode == SVX_DIGITIZE, "digitize mode on every HDI");
    svx_clocks(256);
    pulse(0);
    for (int h = 0; h < N_HDI; h++) check(hdi_ctrl[h].mode == SVX_READOUT, "readout mode on every HDI");
    nclk = 0;
    while (!(seen_eor[0] && seen_eor[1] && seen_eor[2]) && nclk < 2000) begin
      svx_clocks(1);
      nclk++;
    end
    repeat (4) @(negedge clk);
    for (int h = 0; h < N_HDI; h++) begin
      logic [7:0] e [$];
      bit ok;
      e.delete();
      for (int k = 0; k < N_CHIPS; k++) begin
        e.push_back(8'(16*h + 1 + k));
        e.push_back({1'b1, 1'b0, 6'd1});
        for (int c = 0; c < 128; c++)
          if (chan_val(k, c, 1) > 0) begin e.push_back(8'(c)); e.push_back(chan_val(k, c, 1)); end
      end
      e.push_back(EOR_CODE);
      e.push_back(8'h00);
      ok = (cap[h].size() == e.size());
      if (ok) foreach (e[i]) if (cap[h][i] != e[i]) ok = 0;
      check(ok, $sformatf("HDI %0d stream: %0d bytes, expected %0d", h, cap[h].size(), e.size()));
      check(eor_sent[h], "eor_sent");
    end
    send(LL_ACQUIRE);
    pulse(0);
    for (int h = 0; h < N_HDI; h++) check(hdi_ctrl[h].mode == SVX_ACQUIRE, "back to acquisition");
    check(ready, "TPC ready");
    // configuration byte 8'h06: HDI A's SVX clock stopped, B and C running
    send(LL_CONFIG_TPC);
    for (int i = 7; i >= 0; i--) pulse(i == 1 || i == 2);
    begin
      int edges [N_HDI];
      logic q [N_HDI];
      foreach (edges[h]) begin edges[h] = 0; q[h] = 0; end
      repeat (20) begin
        @(negedge clk) svx_clk = 1;
        @(negedge clk) svx_clk = 0;
        for (int h = 0; h < N_HDI; h++) begin
          if (hdi_ctrl[h].clk && !q[h]) edges[h]++;
          q[h] = hdi_ctrl[h].clk;
        end
        @(negedge clk);
        for (int h = 0; h < N_HDI; h++) begin
          if (hdi_ctrl[h].clk && !q[h]) edges[h]++;
          q[h] = hdi_ctrl[h].clk;
        end
      end
      check(edges[0] == 0 && edges[1] > 0 && edges[2] > 0,
            $sformatf("HDI clock enables: %0d/%0d/%0d clock edges", edges[0], edges[1], edges[2]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
