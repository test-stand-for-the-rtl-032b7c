// data_demux: STAR data input for one SVX data bus.
//
// The SVX data bus delivers one byte per RF clock (53 MB/s) together with the
// 26.5 MHz readout clock, whose level arrives here as `din.hi_half`. The
// demultiplexer pairs the byte of a high half with the byte of the following
// low half into one 16-bit word, high byte in bits 15:8, and writes it to the
// next address of its 64k x 16 data buffer. The end-of-readout code
// (EOR_CODE in a high half) is stored like any other word and sets
// `eor_seen`, which stays set until `new_event`. Events pile up in the buffer
// until `clear` sets the write address back to 0. When the buffer is full
// further words are dropped and `overflow` is set.
//
// The pairing and the 16-bit word follow the board description (hi byte and
// low byte into a x16 memory); the event handling flags are this design's.
//
// Timing: a word is written in the clock after its low byte arrived.
module data_demux
  import svx_pkg::*;
#(
  parameter int unsigned DEPTH = 65536,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enable,
  input  logic          clear,
  input  logic          new_event,
  input  svx_byte_t     din,
  // buffer write port
  output logic          we,
  output logic [AW-1:0] waddr,
  output logic [15:0]   wdata,
  // status
  output logic [AW:0]   word_count,
  output logic          eor_seen,
  output logic          overflow
);
  logic [7:0] hi_byte;
  logic       have_hi;
  logic       full;

  assign full = (word_count == (AW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (rst) begin
      hi_byte    <= '0;
      have_hi    <= 1'b0;
      we         <= 1'b0;
      waddr      <= '0;
      wdata      <= '0;
      word_count <= '0;
      eor_seen   <= 1'b0;
      overflow   <= 1'b0;
    end else begin
      we <= 1'b0;
      if (we) waddr <= waddr + 1'b1;
      if (clear) begin
        waddr      <= '0;
        word_count <= '0;
        overflow   <= 1'b0;
        have_hi    <= 1'b0;
        eor_seen   <= 1'b0;
      end else begin
        if (new_event) eor_seen <= 1'b0;
        if (enable && din.valid) begin
          if (din.hi_half) begin
            hi_byte <= din.data;
            have_hi <= 1'b1;
          end else if (have_hi) begin
            have_hi <= 1'b0;
            if (full) begin
              overflow <= 1'b1;
            end else begin
              we         <= 1'b1;
              wdata      <= {hi_byte, din.data};
              word_count <= word_count + 1'b1;
            end
            if (hi_byte == EOR_CODE) eor_seen <= 1'b1;
          end
        end
      end
    end
  end
endmodule
