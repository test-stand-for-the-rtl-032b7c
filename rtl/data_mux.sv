// data_mux: the STAR's Memory Test data multiplexer.
//
// It emulates the SVX data stream to test data buffers (of the STAR or of
// other boards). A block of `n_words` 16-bit words is taken from the test
// memory, starting at address 0, and sent on the test data cable as a byte
// stream at one byte per RF clock: each word's high byte in a high half of
// the emulated 26.5 MHz readout clock, its low byte in the following low
// half. The block is framed like a chip readout: a header of chip ID (high
// half) and status byte (low half) comes first, and a trailer of the
// end-of-readout code (EOR_CODE, then 8'h00) comes last. Blocks of up to 32k
// words are possible, the size of the test memory.
//
// The framing order follows the SVX readout (chip ID, status, then alternate
// halves); the status byte register and the 8'h00 after EOR are this
// design's choices. Test words whose high byte equals EOR_CODE would be taken
// for a trailer by a receiver, and should not be used.
//
// Timing: `start` for one clock; the header's first byte leaves 2 clocks
// later; a block takes 2*n_words + 4 byte clocks; `done` pulses with the last
// byte. The memory read port has one clock of latency.
module data_mux
  import svx_pkg::*;
#(
  parameter int unsigned DEPTH = 32768,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [AW:0]   n_words,
  input  logic [7:0]    chip_id,
  input  logic [7:0]    status,
  // test memory read port
  output logic          re,
  output logic [AW-1:0] raddr,
  input  logic [15:0]   rdata,
  // emulated SVX data stream
  output svx_byte_t     dout,
  output logic          busy,
  output logic          done
);
  typedef enum logic [2:0] {
    S_IDLE, S_HDR_HI, S_HDR_LO, S_DAT_HI, S_DAT_LO, S_TRL_HI, S_TRL_LO
  } state_e;
  state_e state;
  logic [AW:0] idx;
  logic [7:0]  lo_byte;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      idx     <= '0;
      lo_byte <= '0;
      re      <= 1'b0;
      raddr   <= '0;
      dout    <= '0;
      done    <= 1'b0;
    end else begin
      re   <= 1'b0;
      done <= 1'b0;
      dout <= '0;
      case (state)
        S_IDLE: if (start) begin
          raddr <= '0;
          re    <= 1'b1;
          idx   <= '0;
          state <= S_HDR_HI;
        end
        S_HDR_HI: begin
          dout  <= '{valid: 1'b1, hi_half: 1'b1, data: chip_id};
          state <= S_HDR_LO;
        end
        S_HDR_LO: begin
          dout  <= '{valid: 1'b1, hi_half: 1'b0, data: status};
          state <= (n_words == 0) ? S_TRL_HI : S_DAT_HI;
        end
        S_DAT_HI: begin
          dout    <= '{valid: 1'b1, hi_half: 1'b1, data: rdata[15:8]};
          lo_byte <= rdata[7:0];
          if (idx + 1'b1 < n_words) begin
            raddr <= raddr + 1'b1;
            re    <= 1'b1;
          end
          state <= S_DAT_LO;
        end
        S_DAT_LO: begin
          dout  <= '{valid: 1'b1, hi_half: 1'b0, data: lo_byte};
          idx   <= idx + 1'b1;
          state <= (idx + 1'b1 < n_words) ? S_DAT_HI : S_TRL_HI;
        end
        S_TRL_HI: begin
          dout  <= '{valid: 1'b1, hi_half: 1'b1, data: EOR_CODE};
          state <= S_TRL_LO;
        end
        S_TRL_LO: begin
          dout  <= '{valid: 1'b1, hi_half: 1'b0, data: 8'h00};
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
