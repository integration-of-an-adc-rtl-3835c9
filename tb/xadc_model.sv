// xadc_model: behavioural model of the Xilinx 7-series XADC primitive, for
// simulation only. The real part is a mixed-signal hard block (dual 12-bit,
// 1 MSPS ADC with on-chip sensors); this model reproduces only its digital
// behaviour as seen from fabric logic, with the primitive's port list.
//
// Modelled:
//   * DRP: a DEN pulse captures DADDR, DWE and DI; DRP_LAT DCLK cycles later
//     DRDY is high for one cycle. A read returns the addressed register on
//     DO; a write stores DI (registers 40h-7Fh only; 00h-3Fh are read-only)
//     and returns the written word on DO. DO holds its value afterwards.
//   * Event-driven conversion: a rising CONVST starts one conversion of the
//     channel in configuration register 40h bits [4:0]; BUSY goes high on
//     the next DCLK and stays high for CONV_ADCCLK ADCCLK periods of
//     ADCCLK_DIV DCLK each. EOC_DELAY DCLK after BUSY falls, EOC and EOS
//     pulse for one DCLK and the status register of that channel takes the
//     result {code[11:0], 4'b0}. CONVST seen while busy is ignored.
//   * The analog value of each channel is set from the testbench as a 12-bit
//     code with set_input(); VP/VN/VAUX pins are present but not sampled.
// Not modelled: continuous sampling, the channel sequencer, averaging,
// alarms (ALM, OT stay low), min/max registers, JTAG access, MUXADDR.
module xadc_model #(
  parameter int unsigned DRP_LAT     = 3,
  parameter int unsigned ADCCLK_DIV  = 4,
  parameter int unsigned CONV_ADCCLK = 22,
  parameter int unsigned EOC_DELAY   = 16,
  parameter logic [15:0] INIT_40     = 16'h0000,
  parameter logic [15:0] INIT_41     = 16'h0000,
  parameter logic [15:0] INIT_42     = 16'h0400
) (
  input  logic [15:0] DI,
  output logic [15:0] DO,
  input  logic [6:0]  DADDR,
  input  logic        DEN,
  input  logic        DWE,
  input  logic        DCLK,
  output logic        DRDY,
  input  logic        RESET,
  input  logic        CONVST,
  input  logic        CONVSTCLK,
  input  logic        VP,
  input  logic        VN,
  input  logic [15:0] VAUXP,
  input  logic [15:0] VAUXN,
  output logic [7:0]  ALM,
  output logic        OT,
  output logic [4:0]  MUXADDR,
  output logic [4:0]  CHANNEL,
  output logic        EOC,
  output logic        EOS,
  output logic        BUSY,
  output logic        JTAGLOCKED,
  output logic        JTAGMODIFIED,
  output logic        JTAGBUSY
);

  logic [15:0] regs [0:127];
  logic [11:0] analog [0:31];

  // DRP pipeline
  int unsigned drp_cnt;
  logic        drp_act, drp_we;
  logic [6:0]  drp_addr;
  logic [15:0] drp_di;

  // conversion
  logic        convst_d;
  int unsigned busy_cnt, eoc_cnt;
  logic        eoc_pend;
  logic [4:0]  conv_ch;

  // Counters the testbench may read.
  int unsigned n_conversions, n_drp_reads, n_drp_writes;

  assign ALM          = '0;
  assign OT           = 1'b0;
  assign MUXADDR      = '0;
  assign JTAGLOCKED   = 1'b0;
  assign JTAGMODIFIED = 1'b0;
  assign JTAGBUSY     = 1'b0;

  task automatic set_input(input int unsigned ch, input logic [11:0] code);
    analog[ch] = code;
  endtask

  initial begin
    for (int i = 0; i < 128; i++) regs[i] = '0;
    for (int i = 0; i < 32; i++)  analog[i] = '0;
    regs[7'h40] = INIT_40;
    regs[7'h41] = INIT_41;
    regs[7'h42] = INIT_42;
    DO = '0; DRDY = 1'b0; EOC = 1'b0; EOS = 1'b0; BUSY = 1'b0; CHANNEL = '0;
    drp_cnt = 0; drp_act = 1'b0; drp_we = 1'b0; drp_addr = '0; drp_di = '0;
    convst_d = 1'b0; busy_cnt = 0; eoc_cnt = 0; eoc_pend = 1'b0; conv_ch = '0;
    n_conversions = 0; n_drp_reads = 0; n_drp_writes = 0;
  end

  // ------------------------------------------------------------------ DRP
  always @(posedge DCLK) begin
    DRDY <= 1'b0;
    if (drp_act) begin
      if (drp_cnt <= 1) begin
        drp_act <= 1'b0;
        DRDY    <= 1'b1;
        if (drp_we) begin
          if (drp_addr >= 7'h40) regs[drp_addr] <= drp_di;
          DO <= drp_di;
          n_drp_writes <= n_drp_writes + 1;
        end else begin
          DO <= regs[drp_addr];
          n_drp_reads <= n_drp_reads + 1;
        end
      end else begin
        drp_cnt <= drp_cnt - 1;
      end
    end else if (DEN) begin
      drp_act  <= 1'b1;
      drp_we   <= DWE;
      drp_addr <= DADDR;
      drp_di   <= DI;
      drp_cnt  <= DRP_LAT;
    end
  end

  // ----------------------------------------------------------- conversion
  always @(posedge DCLK) begin
    convst_d <= CONVST;
    EOC <= 1'b0;
    EOS <= 1'b0;
    if (RESET) begin
      BUSY     <= 1'b0;
      busy_cnt <= 0;
      eoc_pend <= 1'b0;
    end else if (BUSY) begin
      if (busy_cnt <= 1) begin
        BUSY     <= 1'b0;
        eoc_pend <= 1'b1;
        eoc_cnt  <= EOC_DELAY;
      end else begin
        busy_cnt <= busy_cnt - 1;
      end
    end else if (eoc_pend) begin
      if (eoc_cnt <= 1) begin
        eoc_pend <= 1'b0;
        EOC      <= 1'b1;
        EOS      <= 1'b1;
        regs[{2'b00, conv_ch}] <= {analog[conv_ch], 4'h0};
        n_conversions <= n_conversions + 1;
      end else begin
        eoc_cnt <= eoc_cnt - 1;
      end
    end else if (CONVST && !convst_d) begin
      BUSY     <= 1'b1;
      busy_cnt <= CONV_ADCCLK * ADCCLK_DIV;
      conv_ch  <= regs[7'h40][4:0];
      CHANNEL  <= regs[7'h40][4:0];
    end
  end

endmodule
