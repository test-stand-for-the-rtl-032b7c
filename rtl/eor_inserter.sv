// eor_inserter: end-of-readout recognition and insertion for one HDI.
//
// The SVX chips of one HDI put their readout bytes on a shared 8-bit bus; the
// TPC forwards them, registered once, to the TFIB and STAR. The last chip of
// the chain raises `chips_done` when the whole chain has been read out. Once
// that is seen in readout mode, the inserter adds the end-of-readout pair to
// the stream: EOR_CODE in the next high half of the SVX clock (at its rising
// edge) and 8'h00 in the following low half (at its falling edge). It does so
// once per readout; leaving readout mode re-arms it.
//
// Recognising the end and inserting the EOR byte are the document's; using a
// done line from the chain, the code value and the 8'h00 filler are this
// design's choices.
//
// Timing: one clock from `din` to `dout`. The chips answer a clock edge one
// clock later, so `svx_clk` is delayed by one clock here to find the byte
// slot of each edge; the EOR byte takes the slot of the first rising edge
// that brings no chip byte after `chips_done`.
module eor_inserter
  import svx_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      readout_mode,
  input  logic      svx_clk,     // chip clock as seen by the chips
  input  logic      chips_done,
  input  svx_byte_t din,
  output svx_byte_t dout,
  output logic      eor_sent
);
  logic clk_d, clk_q, pending_lo;

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_d      <= 1'b0;
      clk_q      <= 1'b0;
      pending_lo <= 1'b0;
      eor_sent   <= 1'b0;
      dout       <= '0;
    end else begin
      clk_d <= svx_clk;
      clk_q <= clk_d;
      dout  <= din;
      if (!readout_mode) begin
        eor_sent   <= 1'b0;
        pending_lo <= 1'b0;
      end else if (pending_lo) begin
        if (!clk_d && clk_q) begin
          dout       <= '{valid: 1'b1, hi_half: 1'b0, data: 8'h00};
          pending_lo <= 1'b0;
        end
      end else if (chips_done && !eor_sent && !din.valid && clk_d && !clk_q) begin
        dout       <= '{valid: 1'b1, hi_half: 1'b1, data: EOR_CODE};
        eor_sent   <= 1'b1;
        pending_lo <= 1'b1;
      end
    end
  end
endmodule
