// readout_sm: the STAR's Readout State Machine.
//
// It turns triggers from the master clock into sequences of high level
// commands on the STAR -> TFIB command bus. What it sends depends on the
// trigger mode held in the STAR control register:
//   TRG_EXTERNAL, TRG_LASER : HL_DIG_READOUT, then wait for the event's data.
//   TRG_CHARGE              : HL_CAL_INJECT, wait `cal_latency` clocks, then
//                             HL_DIG_READOUT and wait for the data.
// The event is over when `readout_done` (all enabled data buffers saw the
// end-of-readout code) arrives, or when `timeout` clocks pass without it,
// which sets `timed_out`. `readout_done` is ignored in the first clock after
// the command, while the buffers still show the previous event. Only then is `arm` raised again, so the master
// clock sends no trigger while an event is being read out. The TFIB itself
// returns the SVX chips to acquisition after a readout, so no command is
// needed for that. A one-shot command from the VME side (`sw_cmd`) is passed
// to the bus while the machine is idle, e.g. HL_ACQUIRE or HL_RESET at the
// start of a run.
//
// The document says the sequences depend on the mode but does not list them;
// the sequences above, the calibration delay and the timeout are this
// design's choices. Commands leave as one-cycle strobes, registered.
module readout_sm
  import svx_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic       trigger,
  input  trig_mode_e trigger_type,
  input  logic       readout_done,
  input  logic [15:0] cal_latency,
  input  logic [23:0] timeout,
  input  cmd_bus_t   sw_cmd,
  output cmd_bus_t   cmd,
  output logic       arm,
  output logic       busy,
  output logic       readout_start, // pulses with each HL_DIG_READOUT sent
  output logic [15:0] event_count,
  output logic       timed_out
);
  typedef enum logic [1:0] {S_IDLE, S_CAL_WAIT, S_READOUT} state_e;
  state_e state;
  logic [23:0] cnt;

  assign arm  = enable && (state == S_IDLE);
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_IDLE;
      cnt           <= '0;
      cmd           <= '{strobe: 1'b0, cmd: HL_NOP};
      readout_start <= 1'b0;
      event_count   <= '0;
      timed_out     <= 1'b0;
    end else begin
      cmd           <= '{strobe: 1'b0, cmd: HL_NOP};
      readout_start <= 1'b0;
      case (state)
        S_IDLE: begin
          if (enable && trigger) begin
            cnt <= '0;
            if (trigger_type == TRG_CHARGE) begin
              cmd   <= '{strobe: 1'b1, cmd: HL_CAL_INJECT};
              state <= S_CAL_WAIT;
            end else begin
              cmd           <= '{strobe: 1'b1, cmd: HL_DIG_READOUT};
              readout_start <= 1'b1;
              state         <= S_READOUT;
            end
          end else if (sw_cmd.strobe) begin
            cmd <= sw_cmd;
          end
        end
        S_CAL_WAIT: begin
          if (cnt >= 24'(cal_latency)) begin
            cnt           <= '0;
            cmd           <= '{strobe: 1'b1, cmd: HL_DIG_READOUT};
            readout_start <= 1'b1;
            state         <= S_READOUT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_READOUT: begin
          if (readout_done && cnt != 0) begin
            event_count <= event_count + 1'b1;
            state       <= S_IDLE;
          end else if (cnt == timeout) begin
            timed_out <= 1'b1;
            state     <= S_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
