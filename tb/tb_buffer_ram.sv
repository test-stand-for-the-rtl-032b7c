// tb_buffer_ram: writes pseudo-random words to the 64k x 16 memory, reads
// them back in another order, and checks the one-clock read latency and that
// the read data holds while `re` is low.
// The 64k x 16 organisation is the STAR data buffer's; the one-clock
// registered read is this design's choice.
module tb_buffer_ram;
  localparam int DEPTH = 65536;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [15:0] waddr = 0, raddr = 0, wdata = 0, rdata;
  int checks = 0, failures = 0;
  logic [15:0] model [int];

  buffer_ram #(.DEPTH(DEPTH), .WIDTH(16)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    // write 300 words at scattered addresses, including both ends
    for (int i = 0; i < 300; i++) begin
      a = (i == 0) ? 0 : (i == 1) ? DEPTH - 1 : int'($urandom_range(DEPTH - 1));
      @(posedge clk);
      we <= 1; waddr <= 16'(a); wdata <= 16'($urandom);
      @(negedge clk);
      model[a] = wdata;
    end
    @(posedge clk) we <= 0;
    foreach (model[k]) begin
      @(posedge clk); re <= 1; raddr <= 16'(k);
      @(posedge clk); re <= 0; raddr <= 16'(k + 1);
      @(negedge clk);
      checks++;
      if (rdata !== model[k]) begin
        failures++;
        $display("FAIL addr %0d: %h expected %h", k, rdata, model[k]);
      end
      // no read strobe: data must hold
      @(posedge clk); @(negedge clk);
      checks++;
      if (rdata !== model[k]) begin failures++; $display("FAIL hold at %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
