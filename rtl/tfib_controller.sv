// tfib_controller: the TFIB Controller, which runs the SVX chips through the
// TPC.
//
// Commands come from three sources: high level commands from the STAR (via
// the command multiplexer), emulation commands read from the Cmd/Conf FIFO
// (the same codes, so the TFIB and TPC can be run without a STAR), and
// immediate commands from the TFIB control register. Each command is carried
// out as a short program of micro-operations:
//   SEND  send a low level command to the TPC: start bit and code on `scmd`,
//         one `sclk` pulse per bit (low half, then high half of sclk_half
//         clocks; the TPC samples on the rising edge)
//   EDGE  one more `sclk` pulse, stepping the TPC controller one state
//   DIG   n_dig SVX clocks for the analog-to-digital conversion
//   RO    SVX readout clocks until every enabled HDI stream has shown the
//         end-of-readout code, then stop the clock (or give up after ro_max
//         clocks and set `ro_timeout`)
//   HOLD  wait `hold` clocks between the two edges of a 2-edge command
//   CFG   take cfg_bytes bytes from the FIFO and shift them MSB first on
//         `scmd`, one SVX clock per bit (chips in configuration mode)
//   RB    READBACK_BITS `sclk` pulses, sampling `tpc_sdo` into `readback`
//   TCFG  take one byte from the FIFO and send it as LL_CONFIG_TPC: start
//         bit, code and the byte's 8 bits MSB first, one `sclk` pulse each
//   ACQ_ON/ACQ_OFF  start or stop the free-running acquisition SVX clock
//   TPC_RST hold `tpc_rst` high for 4 clocks (HL_RESET)
//   TEST  one-clock `test_pulse` (HL_TEST, a diagnostic answer)
// The digitize-readout program is the document's event readout sequence:
// ACQ_OFF, SEND(LL_DIG_READOUT), EDGE (digitize), DIG, EDGE (readout), RO,
// SEND(LL_ACQUIRE), EDGE, ACQ_ON.
//
// While the chips acquire, the TFIB shapes the SVX clock itself with acq_hi
// and acq_lo (7 clocks give the 132 ns crossing period at 53 MHz). The
// splitting of work between TFIB and TPC, the three command sources, the
// serial line with its two clocks and the readout sequence follow the
// document; the micro-operation programs for the other commands, the
// register layout (tfib_cfg_t) and all the timing values are this design's.
//
// A high level command that arrives while another is running waits in a
// one-deep queue; one that finds the queue full is counted in `dropped`.
// Immediate commands go first, then the emulation list, then STAR commands.
module tfib_controller
  import svx_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  tfib_cfg_t       cfg,
  // command sources
  input  cmd_bus_t        hl_cmd,
  input  logic            imm_strobe,
  input  imm_cmd_e        imm_code,
  input  hl_cmd_e         imm_arg,
  input  logic [15:0]     fifo_dout,
  input  logic            fifo_empty,
  output logic            fifo_rd,
  // readout data from the TPC, watched for EOR
  input  svx_byte_t       hdi_data [N_HDI],
  // TPC lines
  input  logic            tpc_sdo,
  output logic            sclk,
  output logic            scmd,
  output logic            svx_clk,
  output logic            tpc_rst,
  output logic            test_pulse,
  // status
  output logic            busy,
  output logic            emulating,
  output logic            acq_run,
  output logic [READBACK_BITS-1:0] readback,
  output logic [15:0]     cmd_done,
  output logic [15:0]     dropped,
  output logic            ro_timeout,
  output logic            cfg_underrun,
  output logic [15:0]     ro_clocks
);
  typedef enum logic [3:0] {
    U_END, U_SEND, U_EDGE, U_DIG, U_RO, U_HOLD, U_CFG, U_RB,
    U_ACQ_ON, U_ACQ_OFF, U_TPC_RST, U_TEST, U_TCFG
  } uop_e;

  typedef struct packed {
    uop_e    op;
    ll_cmd_e ll;
  } uop_t;

  typedef enum logic [3:0] {
    P_NOP, P_ACQUIRE, P_DIG_READOUT, P_READOUT, P_CAL, P_PRST, P_RESET,
    P_TEST, P_CONFIG, P_READBACK, P_TPC_CFG
  } prog_e;

  // Program of each command, one micro-operation per step.
  function automatic uop_t prog_step(prog_e p, logic [3:0] s);
    uop_t u;
    u = '{op: U_END, ll: LL_ACQUIRE};
    case (p)
      P_ACQUIRE: case (s)
        0: u = '{U_SEND, LL_ACQUIRE};
        1: u.op = U_EDGE;
        2: u.op = U_ACQ_ON;
        default: ;
      endcase
      P_DIG_READOUT: case (s)
        0: u.op = U_ACQ_OFF;
        1: u = '{U_SEND, LL_DIG_READOUT};
        2: u.op = U_EDGE;
        3: u.op = U_DIG;
        4: u.op = U_EDGE;
        5: u.op = U_RO;
        6: u = '{U_SEND, LL_ACQUIRE};
        7: u.op = U_EDGE;
        8: u.op = U_ACQ_ON;
        default: ;
      endcase
      P_READOUT: case (s)
        0: u.op = U_ACQ_OFF;
        1: u = '{U_SEND, LL_READOUT};
        2: u.op = U_EDGE;
        3: u.op = U_RO;
        4: u = '{U_SEND, LL_ACQUIRE};
        5: u.op = U_EDGE;
        6: u.op = U_ACQ_ON;
        default: ;
      endcase
      P_CAL, P_PRST: case (s)
        0: u = '{U_SEND, (p == P_CAL) ? LL_CAL_INJECT : LL_PREAMP_RESET};
        1: u.op = U_EDGE;
        2: u.op = U_HOLD;
        3: u.op = U_EDGE;
        default: ;
      endcase
      P_RESET: case (s)
        0: u.op = U_ACQ_OFF;
        1: u.op = U_TPC_RST;
        default: ;
      endcase
      P_TEST: if (s == 0) u.op = U_TEST;
      P_CONFIG: case (s)
        0: u.op = U_ACQ_OFF;
        1: u = '{U_SEND, LL_INIT};
        2: u.op = U_EDGE;
        3: u.op = U_CFG;
        4: u = '{U_SEND, LL_ACQUIRE};
        5: u.op = U_EDGE;
        6: u.op = U_ACQ_ON;
        default: ;
      endcase
      P_READBACK: case (s)
        0: u = '{U_SEND, LL_READBACK};
        1: u.op = U_RB;
        default: ;
      endcase
      P_TPC_CFG: if (s == 0) u = '{U_TCFG, LL_CONFIG_TPC};
      default: ;
    endcase
    return u;
  endfunction

  function automatic prog_e prog_of(hl_cmd_e c);
    case (c)
      HL_ACQUIRE:      return P_ACQUIRE;
      HL_DIG_READOUT:  return P_DIG_READOUT;
      HL_READOUT:      return P_READOUT;
      HL_CAL_INJECT:   return P_CAL;
      HL_PREAMP_RESET: return P_PRST;
      HL_RESET:        return P_RESET;
      HL_TEST:         return P_TEST;
      default:         return P_NOP;
    endcase
  endfunction

  typedef enum logic [1:0] {E_IDLE, E_FETCH, E_RUN} exec_e;
  exec_e      est;
  prog_e      prog;
  logic [3:0] step;
  uop_t       uop;

  logic        hl_pend, imm_pend;
  hl_cmd_e     hl_pend_cmd, imm_pend_arg;
  imm_cmd_e    imm_pend_code;

  logic [15:0] tcnt, ncnt;
  logic [3:0]  bcnt;
  logic        phase;
  logic [LL_BITS+TPC_CFG_BITS:0] frame;   // start bit, code, data byte
  logic [7:0]  shreg;
  logic        op_clk;
  logic [N_HDI-1:0] eor_seen;
  logic        eor_all;

  // acquisition clock
  logic        acq_clk;
  logic [7:0]  acq_cnt;

  // length of the current half of a digitize or readout SVX clock
  logic [7:0] burst_len;
  always_comb begin
    if (uop.op == U_DIG) burst_len = op_clk ? cfg.dig_hi : cfg.dig_lo;
    else                 burst_len = op_clk ? cfg.ro_hi  : cfg.ro_lo;
  end

  assign busy    = (est != E_IDLE) || hl_pend || imm_pend;
  assign eor_all = &(eor_seen | ~cfg.hdi_en);
  assign svx_clk = acq_run ? acq_clk : op_clk;

  // EOR monitors on the readout streams.
  logic clr_eor;
  always_ff @(posedge clk) begin
    if (rst || clr_eor) eor_seen <= '0;
    else for (int h = 0; h < N_HDI; h++)
      if (hdi_data[h].valid && hdi_data[h].hi_half && hdi_data[h].data == EOR_CODE)
        eor_seen[h] <= 1'b1;
  end

  // Free-running SVX clock while the chips acquire.
  always_ff @(posedge clk) begin
    if (rst || !acq_run) begin
      acq_clk <= 1'b0;
      acq_cnt <= '0;
    end else if (acq_cnt == ((acq_clk ? cfg.acq_hi : cfg.acq_lo) - 8'd1)) begin
      acq_cnt <= '0;
      acq_clk <= !acq_clk;
    end else begin
      acq_cnt <= acq_cnt + 1'b1;
    end
  end

  // Command sequencer.
  always_ff @(posedge clk) begin
    if (rst) begin
      est           <= E_IDLE;
      prog          <= P_NOP;
      step          <= '0;
      uop           <= '{op: U_END, ll: LL_ACQUIRE};
      hl_pend       <= 1'b0;
      hl_pend_cmd   <= HL_NOP;
      imm_pend      <= 1'b0;
      imm_pend_code <= IMM_HL;
      imm_pend_arg  <= HL_NOP;
      emulating     <= 1'b0;
      acq_run       <= 1'b0;
      tcnt          <= '0;
      ncnt          <= '0;
      bcnt          <= '0;
      phase         <= 1'b0;
      frame         <= '0;
      shreg         <= '0;
      op_clk        <= 1'b0;
      sclk          <= 1'b0;
      scmd          <= 1'b0;
      tpc_rst       <= 1'b0;
      test_pulse    <= 1'b0;
      fifo_rd       <= 1'b0;
      readback      <= '0;
      cmd_done      <= '0;
      dropped       <= '0;
      ro_timeout    <= 1'b0;
      cfg_underrun  <= 1'b0;
      ro_clocks     <= '0;
      clr_eor       <= 1'b0;
    end else begin
      fifo_rd    <= 1'b0;
      test_pulse <= 1'b0;
      clr_eor    <= 1'b0;

      // command intake
      if (hl_cmd.strobe) begin
        if (hl_pend) dropped <= dropped + 1'b1;
        else begin
          hl_pend     <= 1'b1;
          hl_pend_cmd <= hl_cmd.cmd;
        end
      end
      if (imm_strobe && !imm_pend) begin
        imm_pend      <= 1'b1;
        imm_pend_code <= imm_code;
        imm_pend_arg  <= imm_arg;
      end

      case (est)
        E_IDLE: begin
          step <= '0;
          if (imm_pend) begin
            imm_pend <= 1'b0;
            case (imm_pend_code)
              IMM_HL:         begin prog <= prog_of(imm_pend_arg); est <= E_FETCH; end
              IMM_EMULATE:    emulating <= 1'b1;
              IMM_CONFIG_SVX: begin prog <= P_CONFIG;   est <= E_FETCH; end
              IMM_READBACK:   begin prog <= P_READBACK; est <= E_FETCH; end
              IMM_CONFIG_TPC: begin prog <= P_TPC_CFG;  est <= E_FETCH; end
              IMM_RESET:      begin prog <= P_RESET;    est <= E_FETCH; end
              default: ;
            endcase
          end else if (emulating) begin
            if (fifo_empty) emulating <= 1'b0;
            else begin
              fifo_rd <= 1'b1;
              prog    <= prog_of(hl_cmd_e'(fifo_dout[3:0]));
              est     <= E_FETCH;
            end
          end else if (hl_pend) begin
            hl_pend <= 1'b0;
            prog    <= prog_of(hl_pend_cmd);
            est     <= E_FETCH;
          end
        end

        E_FETCH: begin
          uop   <= prog_step(prog, step);
          tcnt  <= '0;
          ncnt  <= '0;
          phase <= 1'b0;
          est   <= E_RUN;
          case (prog_step(prog, step).op)
            U_SEND: begin
              frame <= {1'b1, prog_step(prog, step).ll, TPC_CFG_BITS'(0)};
              scmd  <= 1'b1;
              bcnt  <= '0;
            end
            U_TCFG: begin
              frame <= {1'b1, LL_CONFIG_TPC, fifo_dout[TPC_CFG_BITS-1:0]};
              scmd  <= 1'b1;
              bcnt  <= '0;
              if (fifo_empty) begin
                cfg_underrun <= 1'b1;
                scmd         <= 1'b0;
                step         <= step + 1'b1;
                est          <= E_FETCH;
              end else begin
                fifo_rd <= 1'b1;
              end
            end
            U_EDGE, U_RB: begin
              scmd <= 1'b0;
              bcnt <= '0;
            end
            U_DIG: op_clk <= 1'b1;
            U_RO: begin
              op_clk    <= 1'b1;
              ro_clocks <= '0;
              clr_eor   <= 1'b1;
            end
            U_CFG: bcnt <= 4'd8;
            default: ;
          endcase
        end

        E_RUN: begin
          case (uop.op)
            U_END: begin
              cmd_done <= cmd_done + 1'b1;
              est      <= E_IDLE;
            end
            // sclk pulses: low half then high half, one per bit
            U_SEND, U_EDGE, U_RB, U_TCFG: begin
              if (tcnt == 16'(cfg.sclk_half) - 16'd1) begin
                tcnt <= '0;
                if (!phase) begin
                  phase <= 1'b1;
                  sclk  <= 1'b1;
                end else begin
                  phase <= 1'b0;
                  sclk  <= 1'b0;
                  if (uop.op == U_RB) readback <= {readback[READBACK_BITS-2:0], tpc_sdo};
                  if ((uop.op == U_SEND && bcnt == 4'(LL_BITS)) || uop.op == U_EDGE ||
                      (uop.op == U_TCFG && bcnt == 4'(LL_BITS + TPC_CFG_BITS)) ||
                      (uop.op == U_RB && bcnt == 4'(READBACK_BITS - 1))) begin
                    scmd <= 1'b0;
                    step <= step + 1'b1;
                    est  <= E_FETCH;
                  end else begin
                    bcnt <= bcnt + 1'b1;
                    if (uop.op == U_SEND || uop.op == U_TCFG) begin
                      scmd  <= frame[LL_BITS+TPC_CFG_BITS-1];
                      frame <= frame << 1;
                    end
                  end
                end
              end else begin
                tcnt <= tcnt + 1'b1;
              end
            end
            // SVX clock bursts: high time then low time per clock
            U_DIG, U_RO: begin
              if (uop.op == U_RO && eor_all && !clr_eor) begin
                op_clk <= 1'b0;
                step   <= step + 1'b1;
                est    <= E_FETCH;
              end else if (tcnt == 16'(burst_len) - 16'd1) begin
                tcnt <= '0;
                if (op_clk) begin
                  op_clk <= 1'b0;
                end else begin
                  ncnt <= ncnt + 1'b1;
                  if (uop.op == U_RO) ro_clocks <= ro_clocks + 1'b1;
                  if ((uop.op == U_DIG && ncnt + 1'b1 == cfg.n_dig) ||
                      (uop.op == U_RO && ncnt + 1'b1 == cfg.ro_max)) begin
                    if (uop.op == U_RO) ro_timeout <= 1'b1;
                    step <= step + 1'b1;
                    est  <= E_FETCH;
                  end else begin
                    op_clk <= 1'b1;
                  end
                end
              end else begin
                tcnt <= tcnt + 1'b1;
              end
            end
            U_HOLD: begin
              if (tcnt >= cfg.hold) begin
                step <= step + 1'b1;
                est  <= E_FETCH;
              end else tcnt <= tcnt + 1'b1;
            end
            // configuration bytes: one SVX clock (low half, high half) per bit
            U_CFG: begin
              if (bcnt == 4'd8) begin
                if (ncnt == 16'(cfg.cfg_bytes)) begin
                  step <= step + 1'b1;
                  est  <= E_FETCH;
                end else if (fifo_empty) begin
                  cfg_underrun <= 1'b1;
                  step <= step + 1'b1;
                  est  <= E_FETCH;
                end else if (!fifo_rd) begin
                  fifo_rd <= 1'b1;
                  shreg   <= fifo_dout[7:0] << 1;
                  scmd    <= fifo_dout[7];
                  bcnt    <= '0;
                  tcnt    <= '0;
                  phase   <= 1'b0;
                end
              end else if (tcnt == 16'(cfg.sclk_half) - 16'd1) begin
                tcnt <= '0;
                if (!phase) begin
                  phase  <= 1'b1;
                  op_clk <= 1'b1;
                end else begin
                  phase  <= 1'b0;
                  op_clk <= 1'b0;
                  if (bcnt == 4'd7) begin
                    bcnt <= 4'd8;
                    ncnt <= ncnt + 1'b1;
                    scmd <= 1'b0;
                  end else begin
                    bcnt  <= bcnt + 1'b1;
                    scmd  <= shreg[7];
                    shreg <= shreg << 1;
                  end
                end
              end else begin
                tcnt <= tcnt + 1'b1;
              end
            end
            U_ACQ_ON, U_ACQ_OFF: begin
              acq_run <= (uop.op == U_ACQ_ON);
              op_clk  <= 1'b0;
              step    <= step + 1'b1;
              est     <= E_FETCH;
            end
            U_TPC_RST: begin
              tpc_rst <= 1'b1;
              if (tcnt == 16'd4) begin
                tpc_rst <= 1'b0;
                step    <= step + 1'b1;
                est     <= E_FETCH;
              end else tcnt <= tcnt + 1'b1;
            end
            U_TEST: begin
              test_pulse <= 1'b1;
              step       <= step + 1'b1;
              est        <= E_FETCH;
            end
            default: est <= E_IDLE;
          endcase
        end
        default: est <= E_IDLE;
      endcase
    end
  end
endmodule
