// buffer_ram: word memory with one write port and one registered read port.
//
// The STAR uses it for its three 64k x 16 data buffers, filled by a data
// demultiplexer and read over VME, and for its 32k x 16 test memory, filled
// over VME and read by the test data multiplexer. The depths and the 16-bit
// width follow the board description; the two-port organisation and the
// one-cycle read latency are this design's choices.
//
// Timing: a write with `we` high is done at the clock edge. `rdata` holds the
// word at `raddr` one clock after `re` was high and keeps it otherwise.
module buffer_ram #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
