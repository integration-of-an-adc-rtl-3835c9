// rvfpga_xadc_top: the peripheral side of a RISC-V SoC that reads voltages
// with the FPGA's built-in XADC. A SweRV-class RV32 core reaches its
// peripherals through an AXI-to-Wishbone bridge and a Wishbone
// interconnect; this top holds the two Wishbone slaves that were added to
// that SoC:
//   * chipxadc - the XADC controller (conversions and DRP access)
//   * wb_adder - a demo slave with three registers and summing reads
// Each slave has its own Wishbone slave port (wb_adc_*, wb_adder_*), to be
// wired to a slave port of the SoC interconnect. In the reference SoC both
// are mapped at 0x8000_1600 in separate builds; the interconnect passes the
// low 8 address bits to the slave. The XADC primitive itself is a hard
// block outside this top: its DRP (DADDR, DI, DEN, DWE, DO, DRDY, with DCLK
// = clk_i) and its CONVST, BUSY and EOC pins are ports here, and the
// auxiliary analog pairs (VAUX2, 3, 10, 11 on the board's XADC connector)
// go straight from the package pins to that primitive.
//
// Timing: one clock, clk_i, for both slaves and the DRP; rst_i is
// synchronous and active high. Each Wishbone access is acknowledged on the
// second clock edge after the request (see the two slaves).
module rvfpga_xadc_top
  import xadc_wb_pkg::*;
(
  input  logic              clk_i,
  input  logic              rst_i,
  // Wishbone slave port of the XADC controller
  input  logic              wb_adc_cyc_i,
  input  logic              wb_adc_stb_i,
  input  logic [WB_AW-1:0]  wb_adc_adr_i,
  input  logic              wb_adc_we_i,
  input  logic [3:0]        wb_adc_sel_i,
  input  logic [WB_DW-1:0]  wb_adc_dat_i,
  output logic [WB_DW-1:0]  wb_adc_dat_o,
  output logic              wb_adc_ack_o,
  output logic              wb_adc_err_o,
  output logic              wb_adc_rty_o,
  // Wishbone slave port of the demo adder
  input  logic              wb_adder_cyc_i,
  input  logic              wb_adder_stb_i,
  input  logic [WB_AW-1:0]  wb_adder_adr_i,
  input  logic              wb_adder_we_i,
  input  logic [WB_DW-1:0]  wb_adder_dat_i,
  output logic [WB_DW-1:0]  wb_adder_dat_o,
  output logic              wb_adder_ack_o,
  output logic              wb_adder_rty_o,
  // XADC primitive pins
  output logic [DRP_AW-1:0] xadc_daddr_o,
  output logic [DRP_DW-1:0] xadc_di_o,
  output logic              xadc_den_o,
  output logic              xadc_dwe_o,
  input  logic [DRP_DW-1:0] xadc_do_i,
  input  logic              xadc_drdy_i,
  output logic              xadc_convst_o,
  input  logic              xadc_busy_i,
  input  logic              xadc_eoc_i
);

  chipxadc u_adc (
    .clk_i       (clk_i),
    .rst_i       (rst_i),
    .cyc_i       (wb_adc_cyc_i),
    .adr_i       (wb_adc_adr_i),
    .dat_i       (wb_adc_dat_i),
    .sel_i       (wb_adc_sel_i),
    .we_i        (wb_adc_we_i),
    .stb_i       (wb_adc_stb_i),
    .dat_o       (wb_adc_dat_o),
    .ack_o       (wb_adc_ack_o),
    .drp_daddr_o (xadc_daddr_o),
    .drp_di_o    (xadc_di_o),
    .drp_den_o   (xadc_den_o),
    .drp_dwe_o   (xadc_dwe_o),
    .drp_do_i    (xadc_do_i),
    .drp_drdy_i  (xadc_drdy_i),
    .convst_o    (xadc_convst_o),
    .busy_i      (xadc_busy_i),
    .eoc_i       (xadc_eoc_i)
  );

  // The XADC controller never ends a cycle with an error or a retry.
  assign wb_adc_err_o = 1'b0;
  assign wb_adc_rty_o = 1'b0;

  wb_adder u_adder (
    .clk_i (clk_i),
    .rst_i (rst_i),
    .cyc_i (wb_adder_cyc_i),
    .stb_i (wb_adder_stb_i),
    .adr_i (wb_adder_adr_i),
    .we_i  (wb_adder_we_i),
    .dat_i (wb_adder_dat_i),
    .dat_o (wb_adder_dat_o),
    .ack_o (wb_adder_ack_o),
    .rty_o (wb_adder_rty_o)
  );

endmodule
