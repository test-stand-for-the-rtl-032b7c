// master_clock: the STAR's emulation of the accelerator beam structure, and
// its trigger interface.
//
// The block is clocked by the RF clock (the 53 MHz time base). Every
// RF_PER_SYNC = 7 RF clocks it pulses `sync`, marking a potential beam
// crossing (7 x 18.9 ns = 132 ns). `beam_xing` is a level held for the whole
// crossing; qualified by `sync` it says that a bunch is present. The crossings
// are counted around a turn of `turn_len` crossings; a bunch sits on every
// `bunch_spacing`-th crossing (1 gives 132 ns operation, 3 gives 396 ns)
// until `n_bunches` bunches have been placed. The turn length, bunch count
// and the trigger settings are registers, so the structure is programmable;
// their layout is this design's choice.
//
// Triggers: in TRG_EXTERNAL mode a rising edge on the asynchronous
// `ext_trigger` input is synchronised, held, and issued as `trigger` one RF
// clock after the next `sync`. In TRG_LASER and TRG_CHARGE modes an internal
// trigger is issued one RF clock after the `sync` of crossing `int_xing`, once
// every `int_turns` turns; in TRG_LASER mode `laser_trigger` fires the external laser pulser on
// the same cycle. Triggers arrive only while `arm` is high (the readout state
// machine is ready); `trig_lost` counts the ones that found it busy.
module master_clock
  import svx_pkg::*;
#(
  parameter int unsigned SYNC_PERIOD = RF_PER_SYNC,
  parameter int unsigned XW          = 8   // crossing counter width
) (
  input  logic          clk,          // RF clock
  input  logic          rst,
  // programmable structure
  input  logic [XW-1:0] turn_len,     // crossings per turn
  input  logic [XW-1:0] n_bunches,    // bunches per turn
  input  logic [3:0]    bunch_spacing,// crossings between bunches
  // trigger settings
  input  trig_mode_e    trig_mode,
  input  logic [XW-1:0] int_xing,     // crossing of the internal trigger
  input  logic [15:0]   int_turns,    // internal trigger every this many turns
  input  logic          arm,
  input  logic          ext_trigger,  // asynchronous external trigger input
  // outputs
  output logic          sync,
  output logic          beam_xing,
  output logic [XW-1:0] xing_num,
  output logic          trigger,
  output trig_mode_e    trigger_type,
  output logic          laser_trigger,
  output logic [15:0]   trig_lost
);
  localparam int unsigned RW = $clog2(SYNC_PERIOD);

  logic [RW-1:0] rf_cnt;
  logic [15:0]   turn_cnt;
  logic [3:0]    space_cnt;
  logic [XW-1:0] bunch_cnt;
  logic [2:0]    ext_sync;
  logic          ext_pending;
  logic          sync_next, int_fire, ext_fire, want;

  assign sync_next = (rf_cnt == RW'(SYNC_PERIOD - 1));

  // RF bucket counter, crossing counter and bunch pattern. space_cnt and
  // bunch_cnt locate the current crossing between the bunch slots.
  assign beam_xing = (space_cnt == 4'd0) && (bunch_cnt < n_bunches);

  always_ff @(posedge clk) begin
    if (rst) begin
      rf_cnt    <= '0;
      xing_num  <= '0;
      turn_cnt  <= '0;
      space_cnt <= '0;
      bunch_cnt <= '0;
      sync      <= 1'b0;
    end else begin
      sync <= sync_next;
      if (sync_next) begin
        rf_cnt <= '0;
        if (xing_num >= turn_len - 1'b1) begin  // >= so a shortened turn takes effect at once
          xing_num  <= '0;
          turn_cnt  <= (turn_cnt == int_turns - 1'b1) ? '0 : turn_cnt + 1'b1;
          space_cnt <= '0;
          bunch_cnt <= '0;
        end else begin
          xing_num <= xing_num + 1'b1;
          if (space_cnt == bunch_spacing - 1'b1) begin
            space_cnt <= '0;
            bunch_cnt <= bunch_cnt + 1'b1;
          end else begin
            space_cnt <= space_cnt + 1'b1;
          end
        end
      end else begin
        rf_cnt <= rf_cnt + 1'b1;
      end
    end
  end

  // Trigger generation, one RF clock after the sync pulse of a crossing.
  assign int_fire = (trig_mode == TRG_LASER || trig_mode == TRG_CHARGE) &&
                    (xing_num == int_xing) && (turn_cnt == 16'd0);
  assign ext_fire = (trig_mode == TRG_EXTERNAL) && ext_pending;
  assign want     = sync && (int_fire || ext_fire);

  always_ff @(posedge clk) begin
    if (rst) begin
      ext_sync      <= '0;
      ext_pending   <= 1'b0;
      trigger       <= 1'b0;
      trigger_type  <= TRG_OFF;
      laser_trigger <= 1'b0;
      trig_lost     <= '0;
    end else begin
      ext_sync      <= {ext_sync[1:0], ext_trigger};
      trigger       <= 1'b0;
      laser_trigger <= 1'b0;
      if (ext_sync[1] && !ext_sync[2] && trig_mode == TRG_EXTERNAL)
        ext_pending <= 1'b1;
      if (want) begin
        ext_pending <= 1'b0;
        if (arm) begin
          trigger       <= 1'b1;
          trigger_type  <= trig_mode;
          laser_trigger <= (trig_mode == TRG_LASER);
        end else begin
          trig_lost <= trig_lost + 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) trigger |-> $past(sync));
endmodule
