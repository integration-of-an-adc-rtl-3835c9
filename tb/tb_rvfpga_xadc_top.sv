// tb_rvfpga_xadc_top: end-to-end test of the peripheral top with every
// parameter at its default. Two Wishbone masters stand in for the CPU's
// path through the SoC interconnect, one per slave port, and a behavioural
// XADC model hangs on the XADC pins. The test runs, as bus traffic:
//   * the adder bring-up program: A = 50, B = 60, read C -> 110;
//   * the XADC program: TEST read (2), ADR = 13h and CTRL = 1 (one
//     event-driven conversion of auxiliary channel 3, set here to 830 mV),
//     ADR read-back, DRP read of 13h and the millivolt value computed the
//     way the firmware does ((DATA >> 4) * 1000 / 4096), then DRP writes of
//     9000h to 40h and AAAAh to 41h, each read back over the DRP;
//   * a sweep of input voltages across the unipolar range, one conversion
//     each, with a DRP read queued while the conversion is still running;
//   * a reading of the on-chip temperature sensor (code AACh, about 63 C)
//     after writing 8200h to configuration register 40h.
// It counts how often each mechanism happened - conversion started by
// CTRL, CTRL self-clear, STATUS done flag, DRP read, DRP write, DRP command
// held back by BUSY, Wishbone acknowledge on both ports - and fails on any
// that never did.
module tb_rvfpga_xadc_top;
  import xadc_wb_pkg::*;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  // adc port
  logic             a_cyc, a_stb, a_we, a_ack, a_err, a_rty;
  logic [WB_AW-1:0] a_adr;
  logic [3:0]       a_sel;
  logic [WB_DW-1:0] a_mdat, a_sdat;
  // adder port
  logic             s_cyc, s_stb, s_we, s_ack, s_rty;
  logic [WB_AW-1:0] s_adr;
  logic [3:0]       s_sel;
  logic [WB_DW-1:0] s_mdat, s_sdat;
  // XADC pins
  logic [6:0]  daddr;
  logic [15:0] di, dout;
  logic        den, dwe, drdy, convst, busy, eoc;

  int checks = 0, failures = 0;

  wb_master_bfm #(.AW(WB_AW), .DW(WB_DW)) cpu_adc (
    .clk(clk), .cyc(a_cyc), .stb(a_stb), .adr(a_adr), .we(a_we), .sel(a_sel),
    .dat_o(a_mdat), .dat_i(a_sdat), .ack(a_ack));

  wb_master_bfm #(.AW(WB_AW), .DW(WB_DW)) cpu_adder (
    .clk(clk), .cyc(s_cyc), .stb(s_stb), .adr(s_adr), .we(s_we), .sel(s_sel),
    .dat_o(s_mdat), .dat_i(s_sdat), .ack(s_ack));

  rvfpga_xadc_top dut (
    .clk_i(clk), .rst_i(rst),
    .wb_adc_cyc_i(a_cyc), .wb_adc_stb_i(a_stb), .wb_adc_adr_i(a_adr), .wb_adc_we_i(a_we),
    .wb_adc_sel_i(a_sel), .wb_adc_dat_i(a_mdat), .wb_adc_dat_o(a_sdat), .wb_adc_ack_o(a_ack),
    .wb_adc_err_o(a_err), .wb_adc_rty_o(a_rty),
    .wb_adder_cyc_i(s_cyc), .wb_adder_stb_i(s_stb), .wb_adder_adr_i(s_adr),
    .wb_adder_we_i(s_we), .wb_adder_dat_i(s_mdat), .wb_adder_dat_o(s_sdat),
    .wb_adder_ack_o(s_ack), .wb_adder_rty_o(s_rty),
    .xadc_daddr_o(daddr), .xadc_di_o(di), .xadc_den_o(den), .xadc_dwe_o(dwe),
    .xadc_do_i(dout), .xadc_drdy_i(drdy), .xadc_convst_o(convst), .xadc_busy_i(busy),
    .xadc_eoc_i(eoc));

  // Model defaults: 22 ADCCLK conversions, ADCCLK = DCLK / 4, EOC 16 DCLK
  // after BUSY falls. Configuration register 40h starts on channel 13h.
  xadc_model #(.INIT_40(16'h0013)) u_xadc (
    .DI(di), .DO(dout), .DADDR(daddr), .DEN(den), .DWE(dwe), .DCLK(clk), .DRDY(drdy),
    .RESET(1'b0), .CONVST(convst), .CONVSTCLK(1'b0), .VP(1'b0), .VN(1'b0),
    .VAUXP('0), .VAUXN('0), .ALM(), .OT(), .MUXADDR(), .CHANNEL(),
    .EOC(eoc), .EOS(), .BUSY(busy), .JTAGLOCKED(), .JTAGMODIFIED(), .JTAGBUSY());

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ----------------------------------------------------- mechanism counts
  int unsigned n_convst = 0, n_drp_wait_busy = 0, n_ctrl_clear = 0, n_done = 0;
  logic convst_d = 1'b0, drp_started = 1'b0;
  always @(posedge clk) begin
    convst_d <= convst;
    if (den) drp_started = 1'b1;
    if (!rst) begin
      if (convst && !convst_d) n_convst++;
      if (a_err || a_rty || s_rty) begin failures++; $display("FAIL err/rty asserted"); end
    end
  end

  logic [31:0] q;
  int unsigned lat;

  task automatic adc_wr(input logic [7:0] a, input logic [31:0] d);
    cpu_adc.write(a, d, lat);
  endtask
  task automatic adc_rd(input logic [7:0] a, output logic [31:0] d);
    cpu_adc.read(a, d, lat);
  endtask
  // Write a DRP command to RW; drp_started records whether DEN followed.
  task automatic adc_cmd(input logic [31:0] cmd);
    drp_started = 1'b0;
    adc_wr(XADC_REG_RW, cmd);
  endtask
  task automatic wait_rw_idle();
    int unsigned n = 0;
    do begin
      adc_rd(XADC_REG_RW, q);
      n++;
      // The command is still pending and no DRP access was started because
      // a conversion is running: the access is held back by BUSY.
      if (q != 0 && busy && !drp_started) n_drp_wait_busy++;
    end while (q != 0 && n < 500);
    check("DRP command done", q, 0);
  endtask
  task automatic wait_done();
    int unsigned n = 0;
    do begin adc_rd(XADC_REG_STATUS, q); n++; end while (q != 1 && n < 500);
    check("STATUS done", q, 1);
    if (q == 1) n_done++;
  endtask

  logic [11:0] code;
  int unsigned mv, exp_mv;

  initial begin
    rst = 1'b1;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // ---------------- adder program (the two ports run side by side)
    fork
      begin
        cpu_adder.write(ADDER_REG_A, 32'd50, lat);
        cpu_adder.write(ADDER_REG_B, 32'd60, lat);
        cpu_adder.read(ADDER_REG_C, q, lat);
        check("adder C", q, 32'd110);
      end
      begin
        adc_rd(XADC_REG_TEST, q);
        check("TEST value", q, 2);
      end
    join

    // ---------------- XADC program
    code = unipolar_code(830);
    u_xadc.set_input(5'h13, code);
    adc_wr(XADC_REG_ADR, 32'h13);
    adc_wr(XADC_REG_CTRL, 32'h1);
    adc_rd(XADC_REG_ADR, q);
    check("ADR read-back", q, 32'h13);
    wait_done();
    adc_rd(XADC_REG_CTRL, q);
    check("CTRL cleared", q, 0);
    if (q == 0) n_ctrl_clear++;
    adc_cmd(32'h1);
    wait_rw_idle();
    adc_rd(XADC_REG_DATA, q);
    mv = ((q >> 4) * 1000) / 4096;
    check("value read (mV)", mv, 829);

    adc_wr(XADC_REG_ADR, 32'h40);
    adc_wr(XADC_REG_DATA, 32'h9000);
    adc_cmd(32'h2);
    wait_rw_idle();
    adc_cmd(32'h1);
    wait_rw_idle();
    adc_rd(XADC_REG_DATA, q);
    check("value address 40h", q, 32'h9000);

    adc_wr(XADC_REG_ADR, 32'h41);
    adc_wr(XADC_REG_DATA, 32'hAAAA);
    adc_cmd(32'h2);
    wait_rw_idle();
    adc_cmd(32'h1);
    wait_rw_idle();
    adc_rd(XADC_REG_DATA, q);
    check("value address 41h", q, 32'hAAAA);
    adc_rd(XADC_REG_TEST, q);
    check("TEST value again", q, 2);

    // ---------------- voltage sweep on channel 13h
    adc_wr(XADC_REG_ADR, 32'h40);
    adc_wr(XADC_REG_DATA, 32'h0013);
    adc_cmd(32'h2);
    wait_rw_idle();
    adc_wr(XADC_REG_ADR, 32'h13);
    for (int i = 0; i <= 10; i++) begin
      exp_mv = (i == 10) ? 999 : i * 100 + ($urandom % 50);
      code = unipolar_code(exp_mv);
      u_xadc.set_input(5'h13, code);
      adc_wr(XADC_REG_CTRL, 32'h1);
      // Queue a DRP read at once: it must wait until BUSY falls.
      adc_cmd(32'h1);
      wait_rw_idle();
      wait_done();
      adc_cmd(32'h1);
      wait_rw_idle();
      adc_rd(XADC_REG_DATA, q);
      check("sweep code", q, {16'h0, code, 4'h0});
      mv = ((q >> 4) * 1000) / 4096;
      // Truncation in both conversions loses at most 1 mV.
      checks++;
      if (!(mv == exp_mv || mv + 1 == exp_mv)) begin
        failures++;
        $display("FAIL sweep mV: got %0d expected %0d", mv, exp_mv);
      end
      adc_rd(XADC_REG_CTRL, q);
      if (q == 0) n_ctrl_clear++;
    end

    // ---------------- on-chip temperature sensor (channel 00h)
    // Configuration word 8200h selects channel 0; the sensor is set to ADC
    // code AACh, which the transfer function T = code * 503.975 / 4096 -
    // 273.15 turns into about 63 degrees C.
    adc_wr(XADC_REG_ADR, 32'h40);
    adc_wr(XADC_REG_DATA, 32'h8200);
    adc_cmd(32'h2);
    wait_rw_idle();
    adc_rd(XADC_REG_DATA, q);
    check("DO after write of 40h", q, 32'h8200);
    u_xadc.set_input(5'h00, 12'hAAC);
    adc_wr(XADC_REG_CTRL, 32'h1);
    wait_done();
    adc_wr(XADC_REG_ADR, 32'h00);
    adc_cmd(32'h1);
    wait_rw_idle();
    adc_rd(XADC_REG_DATA, q);
    check("temperature word", q, 32'hAAC0);
    // Temperature in hundredths of a degree, integer arithmetic.
    mv = ((q >> 4) * 503975) / 40960 - 27315;
    checks++;
    if (!(mv >= 6270 && mv <= 6330)) begin
      failures++;
      $display("FAIL temperature %0d.%02d C", mv / 100, mv % 100);
    end

    // ---------------- mechanism counts
    $display("conversions=%0d ctrl_clears=%0d done_flags=%0d drp_reads=%0d drp_writes=%0d drp_busy_waits=%0d acks_adc=%0d acks_adder=%0d",
             n_convst, n_ctrl_clear, n_done, u_xadc.n_drp_reads, u_xadc.n_drp_writes,
             n_drp_wait_busy, cpu_adc.n_acks, cpu_adder.n_acks);
    check("conversions started", 32'(n_convst), 13);
    check("model converted", 32'(u_xadc.n_conversions), 13);
    checks++; if (n_ctrl_clear == 0)         begin failures++; $display("FAIL no CTRL self-clear"); end
    checks++; if (n_done == 0)               begin failures++; $display("FAIL no STATUS done"); end
    checks++; if (u_xadc.n_drp_reads == 0)   begin failures++; $display("FAIL no DRP read"); end
    checks++; if (u_xadc.n_drp_writes == 0)  begin failures++; $display("FAIL no DRP write"); end
    checks++; if (n_drp_wait_busy == 0)      begin failures++; $display("FAIL DRP never held by BUSY"); end
    checks++; if (cpu_adder.n_acks == 0)     begin failures++; $display("FAIL no adder ack"); end
    check("no bus timeouts", cpu_adc.n_timeouts + cpu_adder.n_timeouts, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
