// Shared constants and types for the XADC Wishbone peripheral and the demo
// adder peripheral.
//
// The register offsets are the byte offsets inside each peripheral's
// Wishbone window (the low 8 address bits; the SoC interconnect decodes the
// upper bits, which place both peripherals at 0x8000_1600 in the reference
// SoC). unipolar_code() gives the 12-bit XADC code of a unipolar input;
// the 16-bit XADC result word holds that code in bits [15:4].
package xadc_wb_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned WB_AW   = 8;   // Wishbone address bits seen by a slave
  localparam int unsigned WB_DW   = 32;  // Wishbone data width
  localparam int unsigned DRP_AW  = 7;   // XADC DRP address width
  localparam int unsigned DRP_DW  = 16;  // XADC DRP data width

  // ------------------------------------------- XADC peripheral register map
  localparam logic [WB_AW-1:0] XADC_REG_ADR    = 8'h00; // DRP address
  localparam logic [WB_AW-1:0] XADC_REG_DATA   = 8'h04; // DRP write data / last DRP read data
  localparam logic [WB_AW-1:0] XADC_REG_STATUS = 8'h08; // conversion-done flag
  localparam logic [WB_AW-1:0] XADC_REG_CTRL   = 8'h0C; // write 1: start one conversion
  localparam logic [WB_AW-1:0] XADC_REG_TEST   = 8'h10; // fixed read-back value
  localparam logic [WB_AW-1:0] XADC_REG_RW     = 8'h14; // DRP command

  // Value returned by the TEST register: lets software check the bus path.
  localparam logic [WB_DW-1:0] XADC_TEST_VALUE = 32'd2;

  // Command written to the RW register.
  typedef enum logic [1:0] {
    DRP_CMD_NONE  = 2'd0,
    DRP_CMD_READ  = 2'd1,
    DRP_CMD_WRITE = 2'd2
  } drp_cmd_e;

  // ----------------------------------------------- demo adder register map
  localparam logic [WB_AW-1:0] ADDER_REG_A = 8'h00;
  localparam logic [WB_AW-1:0] ADDER_REG_B = 8'h04;
  localparam logic [WB_AW-1:0] ADDER_REG_C = 8'h08;
  // Read value for an unmapped adder offset.
  localparam logic [WB_DW-1:0] ADDER_UNMAPPED = 32'h0000_00FF;

  // 12-bit code of a unipolar input in millivolts (1 V full scale):
  // code = mV * 4096 / 1000, saturated at FFFh.
  function automatic logic [11:0] unipolar_code(input int unsigned mv);
    int unsigned c;
    c = (mv * 4096) / 1000;
    return (c > 32'hFFF) ? 12'hFFF : c[11:0];
  endfunction

endpackage
