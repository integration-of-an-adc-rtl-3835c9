// chipxadc: Wishbone B4 slave that puts the 7-series XADC under software
// control. Through six 32-bit registers a program can start an
// event-driven conversion, read any XADC status or control register, and
// rewrite XADC control registers at run time over the Dynamic
// Reconfiguration Port (DRP), with no new bitstream.
//
// Register map (byte offsets, low 8 Wishbone address bits):
//   00h ADR    r/w  DRP address used by the next DRP command (7 bits kept)
//   04h DATA   w    DRP write data (16 bits kept)
//              r    last word the XADC returned on the DRP (DO when DRDY)
//   08h STATUS r/w  bit 0: set when a conversion started from CTRL has
//                   ended (EOC); cleared when a new one starts or by writing 0
//   0Ch CTRL   r/w  write 1 to start one conversion; clears itself to 0 once
//                   the XADC reports BUSY
//   10h TEST   r    always 2, a bus sanity value; writes are ignored
//   14h RW     r/w  DRP command: 0 none, 1 read, 2 write (3 is taken as 0).
//                   Reads back the pending command, 0 again once DRDY came.
// A result read from a status register (00h-3Fh) holds the 12-bit code in
// bits [15:4]; a unipolar input of V volts gives code = V * 4096.
//
// How it works. The Wishbone side is a classic single-cycle slave: ack_o
// is a registered copy of cyc_i & stb_i that drops for a cycle after each
// acknowledge, and dat_o is registered from adr_i every clock, so read data
// is valid while ack_o is high. A write is taken once, in the request cycle
// before the acknowledge. Behind the registers are two small state machines:
//   * conversion: CTRL = 1 raises CONVST and holds it until BUSY goes high
//     (the conversion has begun), then drops CONVST, clears CTRL and waits
//     for EOC to set STATUS bit 0.
//   * DRP: a pending read or write command waits until BUSY is low, then
//     drives DEN (and DWE for a write) high for exactly one clock with ADR
//     and DATA on DADDR and DI, waits for DRDY, stores DO in the read-back
//     register and clears the command.
// The DRP clock DCLK is clk_i. busy_i, eoc_i and drp_drdy_i are taken to
// be synchronous to it, as the XADC primitive produces them.
//
// From the reference design: the register offsets and their roles, the TEST
// value 2, the acknowledge rule, CONVST held until the conversion starts,
// the BUSY-low condition for DRP accesses, the one-clock DEN/DWE pulse, and
// DO captured whenever DRDY is high. Own choices: the XADC primitive sits
// outside this module (its DRP and status pins are ports here), the CTRL
// self-clear and the STATUS flag lifetime, the RW command being consumed
// when DRDY arrives (the reference leaves it set), and sel_i being ignored
// (all registers are written as whole words).
module chipxadc
  import xadc_wb_pkg::*;
(
  // Wishbone slave
  input  logic              clk_i,
  input  logic              rst_i,
  input  logic              cyc_i,
  input  logic [WB_AW-1:0]  adr_i,
  input  logic [WB_DW-1:0]  dat_i,
  input  logic [3:0]        sel_i,
  input  logic              we_i,
  input  logic              stb_i,
  output logic [WB_DW-1:0]  dat_o,
  output logic              ack_o,
  // XADC dynamic reconfiguration port (DCLK = clk_i)
  output logic [DRP_AW-1:0] drp_daddr_o,
  output logic [DRP_DW-1:0] drp_di_o,
  output logic              drp_den_o,
  output logic              drp_dwe_o,
  input  logic [DRP_DW-1:0] drp_do_i,
  input  logic              drp_drdy_i,
  // XADC conversion control and status
  output logic              convst_o,
  input  logic              busy_i,
  input  logic              eoc_i
);

  typedef enum logic [1:0] {CV_IDLE, CV_START, CV_WAIT_EOC} conv_state_e;
  typedef enum logic       {DRP_IDLE, DRP_WAIT}              drp_state_e;

  logic              wb_acc, wb_wr;
  logic [DRP_AW-1:0] adr_q;
  logic [DRP_DW-1:0] wdata_q;
  logic [DRP_DW-1:0] rdata_q;
  logic              done_q;
  logic [WB_DW-1:0]  ctrl_q;
  drp_cmd_e          cmd_q;
  conv_state_e       cv_state;
  drp_state_e        drp_state;
  drp_cmd_e          cmd_wr;

  assign wb_acc = cyc_i & stb_i;
  assign wb_wr  = wb_acc & we_i & ~ack_o;

  // Only a read or a write is a command; 3 is stored as "none".
  always_comb begin
    unique case (dat_i[1:0])
      2'd1:    cmd_wr = DRP_CMD_READ;
      2'd2:    cmd_wr = DRP_CMD_WRITE;
      default: cmd_wr = DRP_CMD_NONE;
    endcase
  end

  // ------------------------------------------------------------ Wishbone
  always_ff @(posedge clk_i) begin
    if (rst_i) ack_o <= 1'b0;
    else       ack_o <= wb_acc & ~ack_o;
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      adr_q   <= '0;
      wdata_q <= '0;
    end else if (wb_wr) begin
      if (adr_i == XADC_REG_ADR)  adr_q   <= dat_i[DRP_AW-1:0];
      if (adr_i == XADC_REG_DATA) wdata_q <= dat_i[DRP_DW-1:0];
    end
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) dat_o <= '0;
    else begin
      unique case (adr_i)
        XADC_REG_ADR:    dat_o <= WB_DW'(adr_q);
        XADC_REG_DATA:   dat_o <= WB_DW'(rdata_q);
        XADC_REG_STATUS: dat_o <= WB_DW'(done_q);
        XADC_REG_CTRL:   dat_o <= ctrl_q;
        XADC_REG_TEST:   dat_o <= XADC_TEST_VALUE;
        XADC_REG_RW:     dat_o <= WB_DW'(cmd_q);
        default:         dat_o <= '0;
      endcase
    end
  end

  // ------------------------------------------- event-driven conversion
  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      cv_state <= CV_IDLE;
      convst_o <= 1'b0;
      ctrl_q   <= '0;
      done_q   <= 1'b0;
    end else begin
      unique case (cv_state)
        CV_IDLE: if (ctrl_q == 32'd1) begin
          convst_o <= 1'b1;
          done_q   <= 1'b0;
          cv_state <= CV_START;
        end
        CV_START: if (busy_i) begin
          convst_o <= 1'b0;
          ctrl_q   <= '0;
          cv_state <= CV_WAIT_EOC;
        end
        CV_WAIT_EOC: if (eoc_i) begin
          done_q   <= 1'b1;
          cv_state <= CV_IDLE;
        end
        default: cv_state <= CV_IDLE;
      endcase
      // A bus write wins over the state machine's own update.
      if (wb_wr && adr_i == XADC_REG_CTRL)   ctrl_q <= dat_i;
      if (wb_wr && adr_i == XADC_REG_STATUS) done_q <= dat_i[0];
    end
  end

  // ------------------------------------------------------------- DRP side
  assign drp_daddr_o = adr_q;
  assign drp_di_o    = wdata_q;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      drp_state <= DRP_IDLE;
      drp_den_o <= 1'b0;
      drp_dwe_o <= 1'b0;
      cmd_q     <= DRP_CMD_NONE;
    end else begin
      drp_den_o <= 1'b0;
      drp_dwe_o <= 1'b0;
      unique case (drp_state)
        DRP_IDLE: if (cmd_q != DRP_CMD_NONE && !busy_i && !(wb_wr && adr_i == XADC_REG_RW)) begin
          drp_den_o <= 1'b1;
          drp_dwe_o <= (cmd_q == DRP_CMD_WRITE);
          drp_state <= DRP_WAIT;
        end
        DRP_WAIT: if (drp_drdy_i) begin
          cmd_q     <= DRP_CMD_NONE;
          drp_state <= DRP_IDLE;
        end
        default: drp_state <= DRP_IDLE;
      endcase
      // A new command is only accepted while no DRP access is in flight.
      if (wb_wr && adr_i == XADC_REG_RW && drp_state == DRP_IDLE) cmd_q <= cmd_wr;
    end
  end

  // DO is captured whenever the XADC flags it valid.
  always_ff @(posedge clk_i) begin
    if (rst_i)           rdata_q <= '0;
    else if (drp_drdy_i) rdata_q <= drp_do_i;
  end

  // ------------------------------------------------------------ checks
  // DEN is a single-clock pulse, DWE never comes without DEN, and no new
  // DRP access starts before the previous one saw DRDY.
  a_den_pulse:   assert property (@(posedge clk_i) disable iff (rst_i) drp_den_o |=> !drp_den_o);
  a_dwe_has_den: assert property (@(posedge clk_i) disable iff (rst_i) drp_dwe_o |-> drp_den_o);
  a_one_access:  assert property (@(posedge clk_i) disable iff (rst_i)
                                  drp_den_o |-> drp_state == DRP_WAIT);
  a_ack_needs_request: assert property (@(posedge clk_i) disable iff (rst_i)
                                        ack_o |-> $past(wb_acc));

endmodule
