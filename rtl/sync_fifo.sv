// sync_fifo: single-clock first-in first-out buffer.
//
// On the TFIB it serves as the Configuration Command FIFO, which the VME CPU
// fills with emulation commands or configuration bytes, and as the three data
// FIFOs that capture readout data from the TPC. The document gives no depths;
// the defaults here are this design's choice (the data FIFOs only have to be
// smaller than the STAR's 64k-word buffers).
//
// Interface: `wr` with `!full` stores `din`; `rd` with `!empty` removes the
// head word. `dout` always shows the head word (first-word fall-through).
// `count` is the number of stored words. Writes to a full FIFO and reads from
// an empty one are ignored.
module sync_fifo #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             wr,
  input  logic [WIDTH-1:0] din,
  input  logic             rd,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign dout  = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      wp <= '0;
      rp <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  assert property (@(posedge clk) disable iff (rst) count <= (AW+1)'(DEPTH));
endmodule
