// tb_sync_fifo: random pushes and pops against a queue model, on an 8-deep
// FIFO, checking head word, count, full, empty, ignored overflow and
// underflow, and clear.
// The FIFO is this design's building block for the Cmd/Conf and data FIFOs;
// the small depth here only shortens the test of full and empty.
module tb_sync_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst = 1, clr = 0, wr = 0, rd = 0;
  always #5 clk = ~clk;
  logic [15:0] din = 0, dout;
  logic empty, full;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [15:0] q [$];

  sync_fifo #(.DEPTH(DEPTH), .WIDTH(16)) dut (.*);

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
    int n_full = 0, n_empty = 0;
    @(negedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 3000; i++) begin
      bit do_wr, do_rd;
      wr  = ($urandom_range(99) < (i < 1500 ? 70 : 30));
      rd  = ($urandom_range(99) < (i < 1500 ? 30 : 70));
      clr = (i == 2000);
      din = 16'($urandom);
      do_wr = wr && q.size() < DEPTH;
      do_rd = rd && q.size() > 0;
      @(negedge clk);
      if (clr) q.delete();
      else begin
        if (do_rd) void'(q.pop_front());
        if (do_wr) q.push_back(din);
      end
      check(count == 4'(q.size()), $sformatf("count %0d expected %0d", count, q.size()));
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      if (q.size() > 0) check(dout == q[0], $sformatf("head %h expected %h", dout, q[0]));
      if (full) n_full++;
      if (empty) n_empty++;
    end
    check(n_full > 0 && n_empty > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
