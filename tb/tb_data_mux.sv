// tb_data_mux: plays blocks of a test memory and checks the byte stream:
// chip ID and status, every word's high byte in a high half and low byte in
// a low half, the EOR trailer, one byte per clock with no gaps, and the
// block length 2*n_words + 4 bytes. Empty blocks and back-to-back blocks too.
// The header, EOR trailer and byte-per-clock rate follow the described
// memory test facility; the trailer value and the 64-word depth used here
// are this design's choices.
module tb_data_mux;
  import svx_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst = 1, start = 0;
  always #5 clk = ~clk;
  logic [6:0] n_words = 0;
  logic [7:0] chip_id = 0, status = 0;
  logic re, busy, done;
  logic [5:0] raddr;
  logic [15:0] rdata;
  svx_byte_t dout;
  logic [15:0] mem [DEPTH];
  int checks = 0, failures = 0;

  data_mux #(.DEPTH(DEPTH)) dut (.*);
  always @(posedge clk) if (re) rdata <= mem[raddr];

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

  task automatic play(int n);
    svx_byte_t got [$];
    svx_byte_t e [$];
    int first = -1, last = -1, c = 0;
    n_words = 7'(n); chip_id = 8'($urandom_range(1, 200)); status = 8'($urandom);
    e.push_back('{1'b1, 1'b1, chip_id});
    e.push_back('{1'b1, 1'b0, status});
    for (int i = 0; i < n; i++) begin
      e.push_back('{1'b1, 1'b1, mem[i][15:8]});
      e.push_back('{1'b1, 1'b0, mem[i][7:0]});
    end
    e.push_back('{1'b1, 1'b1, EOR_CODE});
    e.push_back('{1'b1, 1'b0, 8'h00});
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      @(negedge clk);
      c++;
      if (dout.valid) begin
        got.push_back(dout);
        if (first < 0) first = c;
        last = c;
      end
    end
    check(got.size() == e.size(), $sformatf("%0d bytes, expected %0d", got.size(), e.size()));
    check(last - first + 1 == got.size(), "one byte per clock");
    // start is sampled at edge 1, the chip ID leaves at edge 2
    check(first == 1, $sformatf("first byte %0d clocks after the start strobe ended", first));
    foreach (e[i]) if (i < got.size()) check(got[i] == e[i], $sformatf("byte %0d: %p expected %p", i, got[i], e[i]));
  endtask

  initial begin
    foreach (mem[i]) begin
      mem[i] = 16'($urandom);
      if (mem[i][15:8] == EOR_CODE) mem[i][15:8] = 8'h00;
    end
    @(negedge clk);
    @(negedge clk) rst = 0;
    play(5);
    play(0);
    play(1);
    play(DEPTH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
