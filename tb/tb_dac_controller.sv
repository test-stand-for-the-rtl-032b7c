// tb_dac_controller: loads DAC words and checks, with a model of the serial
// DAC (bit taken on each rising dac_sclk, word on dac_ld), the word, the bit
// count, that a load while busy is ignored, and the download time
// 2*HALF*WORD_BITS + HALF + 1 clocks.
// Serial DAC download is from the board description; word length, bit order
// and the load strobe are this design's choices, and the test runs them at
// the module's defaults.
module tb_dac_controller;
  localparam int WORD_BITS = 16, HALF = 4;
  logic clk = 0, rst = 1, load = 0;
  always #5 clk = ~clk;
  logic [WORD_BITS-1:0] word = 0;
  logic dac_sclk, dac_sdi, dac_ld, busy;
  int checks = 0, failures = 0;

  dac_controller #(.WORD_BITS(WORD_BITS), .HALF(HALF)) dut (.*);

  logic [WORD_BITS-1:0] sr = 0, got = 0;
  int nbits = 0, nloads = 0;
  logic sclk_q = 0, ld_q = 0;
  always @(posedge clk) begin
    sclk_q <= dac_sclk;
    ld_q   <= dac_ld;
    if (dac_sclk && !sclk_q) begin sr <= {sr[WORD_BITS-2:0], dac_sdi}; nbits <= nbits + 1; end
    if (dac_ld && !ld_q) begin got <= sr; nloads <= nloads + 1; end
  end

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

  initial begin
    @(negedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 20; i++) begin
      logic [WORD_BITS-1:0] w;
      int t;
      w = WORD_BITS'($urandom);
      nbits = 0;
      load = 1; word = w;
      @(negedge clk) load = 0;
      t = 1;
      // a second load while busy must be ignored
      load = 1; word = ~w;
      @(negedge clk) load = 0;
      t++;
      while (busy) begin @(negedge clk); t++; end
      @(negedge clk);
      check(got == w, $sformatf("word %h expected %h", got, w));
      check(nbits == WORD_BITS, $sformatf("%0d bits clocked", nbits));
      check(t == 2*HALF*WORD_BITS + HALF + 1, $sformatf("download took %0d clocks", t));
    end
    check(nloads == 20, "one load pulse per word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
