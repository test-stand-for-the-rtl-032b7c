// cmd_mux: the TFIB's input multiplexer for high level commands.
//
// The STAR can send its commands over the J3 backplane or over a front panel
// cable; the TFIB control register chooses which one the TFIB listens to.
// The selected command is registered once, so the TFIB controller sees a
// clean one-cycle strobe aligned to its own clock. Registering and the
// select bit are this design's choices.
//
// Timing: one clock from a strobe on the selected bus to `cmd_out.strobe`.
module cmd_mux
  import svx_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     sel_front_panel, // 1: front panel bus, 0: J3 bus
  input  cmd_bus_t j3_cmd,
  input  cmd_bus_t fp_cmd,
  output cmd_bus_t cmd_out
);
  always_ff @(posedge clk) begin
    if (rst) cmd_out <= '{strobe: 1'b0, cmd: HL_NOP};
    else     cmd_out <= sel_front_panel ? fp_cmd : j3_cmd;
  end
endmodule
