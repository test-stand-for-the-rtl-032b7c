// tb_vme_slave: a small register file sits behind the slave. The test writes
// and reads it through VME cycles, checks that cycles for another board
// address get no DTACK* and no register access, and checks the DTACK*
// latency (read 5 clocks, write 3 clocks after DS* falls).
// The boards are VME slaves; the simplified A24/D16 protocol and the
// latencies are this design's choices.
module tb_vme_slave;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic vme_as_n = 1, vme_ds_n = 1, vme_write_n = 1;
  logic [23:1] vme_addr = 0;
  logic [15:0] vme_wdata = 0, vme_rdata;
  logic vme_rdata_oe, vme_dtack_n;
  logic reg_wr, reg_rd;
  logic [7:0] reg_addr;
  logic [15:0] reg_wdata, reg_rdata;
  logic [15:0] regs [256];
  int checks = 0, failures = 0, accesses = 0;

  vme_slave #(.BASE(8'h42), .REG_AW(8)) dut (.*);

  always @(posedge clk) begin
    if (reg_wr) regs[reg_addr] <= reg_wdata;
    if (reg_rd) reg_rdata <= regs[reg_addr];
    if (reg_wr || reg_rd) accesses++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // returns DTACK latency in clocks, -1 if none within 20 clocks
  task automatic cycle(input logic [7:0] base, input logic [7:0] off, input bit wr,
                       input logic [15:0] wd, output logic [15:0] rd, output int lat);
    @(negedge clk);
    vme_addr = {base, 7'b0, off}; vme_wdata = wd; vme_write_n = !wr; vme_as_n = 0;
    @(negedge clk);
    vme_ds_n = 0;
    lat = -1;
    for (int i = 1; i <= 20; i++) begin
      @(negedge clk);
      if (!vme_dtack_n) begin lat = i; break; end
    end
    rd = vme_rdata;
    if (lat > 0) check(!wr == vme_rdata_oe, "read data driven on reads only");
    vme_ds_n = 1; vme_as_n = 1;
    repeat (4) @(negedge clk);
    check(vme_dtack_n && !vme_rdata_oe, "DTACK released after DS");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] model [256], d;
    int lat, acc0;
    foreach (regs[i]) begin regs[i] = 0; model[i] = 0; end
    @(negedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 60; i++) begin
      logic [7:0] a;
      a = 8'($urandom);
      model[a] = 16'($urandom);
      cycle(8'h42, a, 1, model[a], d, lat);
      check(lat == 3, $sformatf("write DTACK latency %0d", lat));
    end
    for (int i = 0; i < 256; i += 7) begin
      cycle(8'h42, 8'(i), 0, 0, d, lat);
      check(lat == 5, $sformatf("read DTACK latency %0d", lat));
      check(d == model[i], $sformatf("reg %0d: %h expected %h", i, d, model[i]));
    end
    acc0 = accesses;
    cycle(8'h43, 8'h05, 1, 16'hDEAD, d, lat);
    check(lat == -1, "other board's cycle not acknowledged");
    check(accesses == acc0, "other board's cycle makes no access");
    check(regs[5] == model[5], "other board's write leaves registers alone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
