// tb_data_demux: sends byte streams (high half, low half alternating, with
// gaps) into a 16-word demultiplexer and checks the words written, their
// addresses, the EOR flag, new_event, overflow at 16 words and clear.
// Pairing of high-half and low-half bytes into 16-bit words follows the
// described data path; the depth is cut to 16 words here so that the
// overflow case is reached quickly.
module tb_data_demux;
  import svx_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst = 1, enable = 1, clear = 0, new_event = 0;
  always #5 clk = ~clk;
  svx_byte_t din = '0;
  logic we;
  logic [3:0] waddr;
  logic [15:0] wdata;
  logic [4:0] word_count;
  logic eor_seen, overflow;
  int checks = 0, failures = 0;
  logic [15:0] mem [DEPTH];
  int nwrites = 0;

  data_demux #(.DEPTH(DEPTH)) dut (.*);
  always @(posedge clk) if (we && !rst) begin mem[waddr] <= wdata; nwrites++; end

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

  task automatic send_word(logic [15:0] w, int gap);
    @(negedge clk) din = '{valid: 1'b1, hi_half: 1'b1, data: w[15:8]};
    repeat (gap) begin @(negedge clk) din = '0; end
    @(negedge clk) din = '{valid: 1'b1, hi_half: 1'b0, data: w[7:0]};
    @(negedge clk) din = '0;
  endtask

  initial begin
    logic [15:0] words [$];
    @(negedge clk);
    @(negedge clk) rst = 0;
    // event 1: header, 5 hits, EOR
    words = '{16'h0181, 16'h0512, 16'h0a33, 16'h7f3f, 16'h10c8, 16'h2001, {EOR_CODE, 8'h00}};
    foreach (words[i]) begin
      if (i == 3) begin
        check(!eor_seen, "no EOR before trailer");
        // stray low byte without a high byte must be ignored
        @(negedge clk) din = '{valid: 1'b1, hi_half: 1'b0, data: 8'h55};
        @(negedge clk) din = '0;
      end
      send_word(words[i], i % 2);
    end
    repeat (2) @(negedge clk);
    check(eor_seen, "EOR seen");
    check(word_count == 7, $sformatf("word count %0d", word_count));
    foreach (words[i]) check(mem[i] == words[i], $sformatf("word %0d: %h expected %h", i, mem[i], words[i]));
    // new event clears the EOR flag, words continue after the first event
    @(negedge clk) new_event = 1;
    @(negedge clk) new_event = 0;
    check(!eor_seen, "new_event clears EOR flag");
    for (int i = 0; i < 12; i++) send_word(16'h0100 + 16'(i), 0);
    repeat (2) @(negedge clk);
    check(word_count == 16 && overflow, "buffer full and overflow flagged");
    for (int i = 7; i < 16; i++) check(mem[i] == 16'h0100 + 16'(i - 7), $sformatf("word %0d after event", i));
    check(nwrites == 16, $sformatf("%0d writes, none past the end", nwrites));
    // disabled input is ignored
    enable = 0;
    send_word(16'h1234, 0);
    enable = 1;
    // clear restarts at 0
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    check(word_count == 0 && !overflow, "clear");
    send_word(16'hBEEF, 0);
    repeat (2) @(negedge clk);
    check(mem[0] == 16'hBEEF && word_count == 1, "first word after clear at address 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
