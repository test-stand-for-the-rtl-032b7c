// vme_slave: VME interface of the STAR and TFIB boards.
//
// Turns a VME A24/D16 data transfer into a one-cycle access of the board's
// internal registers. The boards' register maps sit behind this block. The
// document only names the VME interface; the reduced bus (address strobe,
// one data strobe, write line, 23-bit word address, 16-bit data, DTACK) and
// the board select on the top address byte are this design's choices.
//
// Operation: AS* and DS* are synchronised over two flops. When both are low
// and vme_addr[23:16] equals BASE, one `reg_wr` or `reg_rd` pulse is issued.
// For a read, `reg_rdata` is taken one clock after `reg_rd` and driven on
// `vme_rdata` (with `vme_rdata_oe`) while DTACK* is low. DTACK* stays low
// until the master releases DS*. A cycle whose address is not for this board
// is ignored. Latency from DS* low to DTACK* low: 5 clocks on a read, 3 on a
// write.
module vme_slave #(
  parameter logic [7:0]  BASE   = 8'h10,
  parameter int unsigned REG_AW = 8
) (
  input  logic              clk,
  input  logic              rst,
  // VME side
  input  logic              vme_as_n,
  input  logic              vme_ds_n,
  input  logic              vme_write_n,
  input  logic [23:1]       vme_addr,
  input  logic [15:0]       vme_wdata,
  output logic [15:0]       vme_rdata,
  output logic              vme_rdata_oe,
  output logic              vme_dtack_n,
  // internal register bus
  output logic              reg_wr,
  output logic              reg_rd,
  output logic [REG_AW-1:0] reg_addr,
  output logic [15:0]       reg_wdata,
  input  logic [15:0]       reg_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_ACK} state_e;
  state_e state;
  logic [1:0] as_sync, ds_sync;
  logic as_act, ds_act, sel;

  assign as_act = !as_sync[1];
  assign ds_act = !ds_sync[1];
  assign sel    = (vme_addr[23:16] == BASE);

  always_ff @(posedge clk) begin
    if (rst) begin
      as_sync <= 2'b11;
      ds_sync <= 2'b11;
    end else begin
      as_sync <= {as_sync[0], vme_as_n};
      ds_sync <= {ds_sync[0], vme_ds_n};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      reg_wr       <= 1'b0;
      reg_rd       <= 1'b0;
      reg_addr     <= '0;
      reg_wdata    <= '0;
      vme_rdata    <= '0;
      vme_rdata_oe <= 1'b0;
      vme_dtack_n  <= 1'b1;
    end else begin
      reg_wr <= 1'b0;
      reg_rd <= 1'b0;
      case (state)
        S_IDLE: if (as_act && ds_act && sel) begin
          reg_addr  <= vme_addr[REG_AW:1];
          reg_wdata <= vme_wdata;
          if (vme_write_n) begin
            reg_rd <= 1'b1;
            state  <= S_READ;
          end else begin
            reg_wr      <= 1'b1;
            vme_dtack_n <= 1'b0;
            state       <= S_ACK;
          end
        end
        S_READ: if (!reg_rd) begin
          vme_rdata    <= reg_rdata;
          vme_rdata_oe <= 1'b1;
          vme_dtack_n  <= 1'b0;
          state        <= S_ACK;
        end
        S_ACK: if (!ds_act) begin
          vme_dtack_n  <= 1'b1;
          vme_rdata_oe <= 1'b0;
          state        <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
