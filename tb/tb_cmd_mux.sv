// tb_cmd_mux: sends different commands on the J3 and front panel buses and
// checks that the selected one appears one clock later.
// The two command sources (J3 backplane, front panel) come from the board
// description; the one-clock register stage is this design's choice.
module tb_cmd_mux;
  import svx_pkg::*;
  logic clk = 0, rst = 1, sel_front_panel = 0;
  always #5 clk = ~clk;
  cmd_bus_t j3_cmd = '0, fp_cmd = '0, cmd_out;
  int checks = 0, failures = 0;

  cmd_mux dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd_bus_t exp_cmd;
    @(negedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 200; i++) begin
      sel_front_panel = $urandom_range(1);
      j3_cmd = '{strobe: 1'($urandom), cmd: hl_cmd_e'($urandom_range(7))};
      fp_cmd = '{strobe: 1'($urandom), cmd: hl_cmd_e'($urandom_range(7))};
      exp_cmd = sel_front_panel ? fp_cmd : j3_cmd;
      @(negedge clk);
      checks++;
      if (cmd_out != exp_cmd) begin
        failures++;
        $display("FAIL step %0d: got %p expected %p", i, cmd_out, exp_cmd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
