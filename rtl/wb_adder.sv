// wb_adder: a small Wishbone B4 slave used to exercise single read and
// single write bus cycles before a real peripheral is attached.
//
// It holds three 32-bit registers, A (offset 00h), B (04h) and C (08h),
// written by single write cycles. A read returns a sum rather than the
// register itself, computed three ways on purpose:
//   offset 00h -> A + B
//   offset 04h -> sum, where sum = A + B is a separate adder
//   offset 08h -> C + sum
//   any other  -> 0000_00FFh
// So after software writes A = 50 and B = 60, a read of C gives 110.
//
// Timing: classic single cycles. ack_o is a registered copy of (cyc_i &
// stb_i) that drops for one cycle after each acknowledge, so every access
// takes two clock edges. Read data is registered from adr_i on every clock,
// so it is valid in the cycle ack_o is high. rst_i is synchronous, active
// high, and clears A, B, C, the read register and ack_o.
//
// The register set, the three read sums, the FFh default, the
// acknowledge rule and the never-retry output follow the reference design.
// Own choices: C is cleared by reset as well (the reference only gives it
// an initial value), and a write is taken once per access, in the cycle
// before the acknowledge, instead of in both cycles of the access.
module wb_adder
  import xadc_wb_pkg::*;
(
  input  logic             clk_i,
  input  logic             rst_i,
  input  logic             cyc_i,
  input  logic             stb_i,
  input  logic [WB_AW-1:0] adr_i,
  input  logic             we_i,
  input  logic [WB_DW-1:0] dat_i,
  output logic [WB_DW-1:0] dat_o,
  output logic             ack_o,
  output logic             rty_o
);

  logic [WB_DW-1:0] reg_a, reg_b, reg_c;
  logic [WB_DW-1:0] sum;
  logic             wb_acc, wb_wr;

  assign wb_acc = cyc_i & stb_i;
  assign wb_wr  = wb_acc & we_i & ~ack_o;
  assign sum    = reg_a + reg_b;
  assign rty_o  = 1'b0;           // this slave never asks for a retry

  // Acknowledge one cycle after the request, then drop for one cycle.
  always_ff @(posedge clk_i) begin
    if (rst_i) ack_o <= 1'b0;
    else       ack_o <= wb_acc & ~ack_o;
  end

  // Register writes.
  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      reg_a <= '0;
      reg_b <= '0;
      reg_c <= '0;
    end else if (wb_wr) begin
      unique case (adr_i)
        ADDER_REG_A: reg_a <= dat_i;
        ADDER_REG_B: reg_b <= dat_i;
        ADDER_REG_C: reg_c <= dat_i;
        default: ;
      endcase
    end
  end

  // Registered read data.
  always_ff @(posedge clk_i) begin
    if (rst_i) dat_o <= '0;
    else begin
      unique case (adr_i)
        ADDER_REG_A: dat_o <= reg_a + reg_b;
        ADDER_REG_B: dat_o <= sum;
        ADDER_REG_C: dat_o <= reg_c + sum;
        default:     dat_o <= ADDER_UNMAPPED;
      endcase
    end
  end

  // A slave only acknowledges a cycle that was requested.
  a_ack_needs_request: assert property (@(posedge clk_i) disable iff (rst_i)
    ack_o |-> $past(wb_acc));

endmodule
