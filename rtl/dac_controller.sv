// dac_controller: serial download of the TPC's reference-voltage DACs.
//
// The TPC carries serially loaded DACs that set the voltage references of
// the SVX chips; the TFIB's DAC Controller loads them under VME control. A
// word written with `load` (typically {channel, value}) is shifted out MSB
// first on `dac_sdi`, one bit per `dac_sclk` period; the receiving DAC takes
// the bit on the rising edge of `dac_sclk`. After the last bit `dac_ld` is
// pulsed high for one half period to transfer the word to the DAC output.
// A `load` while `busy` is ignored.
//
// The document gives only that the DACs are serially downloaded by this
// controller; the word length, the clock rate and the load pulse are this
// design's choices.
//
// Timing: each bit takes 2*HALF clocks (low half, then high half); a word
// takes 2*HALF*WORD_BITS + HALF + 1 clocks from `load` to `busy` low.
module dac_controller #(
  parameter int unsigned WORD_BITS = 16,
  parameter int unsigned HALF      = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,
  input  logic [WORD_BITS-1:0] word,
  output logic                 dac_sclk,
  output logic                 dac_sdi,
  output logic                 dac_ld,
  output logic                 busy
);
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_LOAD} state_e;
  state_e state;
  logic [WORD_BITS-1:0]         sr;
  logic [$clog2(WORD_BITS):0]   nbits;
  logic [$clog2(HALF+1)-1:0]    tcnt;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      sr       <= '0;
      nbits    <= '0;
      tcnt     <= '0;
      dac_sclk <= 1'b0;
      dac_sdi  <= 1'b0;
      dac_ld   <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (load) begin
          sr       <= word << 1;
          dac_sdi  <= word[WORD_BITS-1];
          dac_sclk <= 1'b0;
          nbits    <= '0;
          tcnt     <= '0;
          state    <= S_SHIFT;
        end
        S_SHIFT: begin
          if (tcnt == $bits(tcnt)'(HALF - 1)) begin
            tcnt <= '0;
            if (!dac_sclk) begin
              dac_sclk <= 1'b1;
            end else begin
              dac_sclk <= 1'b0;
              if (nbits == $bits(nbits)'(WORD_BITS - 1)) begin
                dac_sdi <= 1'b0;
                dac_ld  <= 1'b1;
                state   <= S_LOAD;
              end else begin
                dac_sdi <= sr[WORD_BITS-1];
                sr      <= sr << 1;
                nbits   <= nbits + 1'b1;
              end
            end
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        S_LOAD: begin
          if (tcnt == $bits(tcnt)'(HALF - 1)) begin
            dac_ld <= 1'b0;
            tcnt   <= '0;
            state  <= S_IDLE;
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
