// tb_chipxadc: self-checking test of the XADC Wishbone controller against a
// behavioural XADC model. It replays the bring-up program of the design
// (TEST read, event-driven conversion of auxiliary channel 3 at DRP 13h,
// DRP read of the result, DRP writes of 9000h to 40h and AAAAh to 41h with
// read-back), and adds: random control-register writes and reads, a write
// to a read-only status register, a DRP command issued while a conversion
// is running (it must wait for BUSY to fall), the ignored command 3, the
// STATUS flag clear, a BLOCK READ of all registers, and the cycle counts
// of CONVST, DEN and a conversion.
module tb_chipxadc;
  import xadc_wb_pkg::*;

  localparam int unsigned ADCCLK_DIV  = 4;
  localparam int unsigned CONV_ADCCLK = 22;
  localparam int unsigned EOC_DELAY   = 16;
  localparam int unsigned DRP_LAT     = 3;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic             cyc, stb, we, ack;
  logic [WB_AW-1:0] adr;
  logic [3:0]       sel;
  logic [WB_DW-1:0] mdat, sdat;

  logic [6:0]  daddr;
  logic [15:0] di, dout;
  logic        den, dwe, drdy, convst, busy, eoc, eos;
  logic [4:0]  channel;

  int checks = 0, failures = 0;

  wb_master_bfm #(.AW(WB_AW), .DW(WB_DW)) bfm (
    .clk(clk), .cyc(cyc), .stb(stb), .adr(adr), .we(we), .sel(sel),
    .dat_o(mdat), .dat_i(sdat), .ack(ack));

  chipxadc dut (
    .clk_i(clk), .rst_i(rst), .cyc_i(cyc), .adr_i(adr), .dat_i(mdat), .sel_i(sel),
    .we_i(we), .stb_i(stb), .dat_o(sdat), .ack_o(ack),
    .drp_daddr_o(daddr), .drp_di_o(di), .drp_den_o(den), .drp_dwe_o(dwe),
    .drp_do_i(dout), .drp_drdy_i(drdy), .convst_o(convst), .busy_i(busy), .eoc_i(eoc));

  xadc_model #(
    .DRP_LAT(DRP_LAT), .ADCCLK_DIV(ADCCLK_DIV), .CONV_ADCCLK(CONV_ADCCLK),
    .EOC_DELAY(EOC_DELAY), .INIT_40(16'h0013)
  ) u_xadc (
    .DI(di), .DO(dout), .DADDR(daddr), .DEN(den), .DWE(dwe), .DCLK(clk), .DRDY(drdy),
    .RESET(1'b0), .CONVST(convst), .CONVSTCLK(1'b0), .VP(1'b0), .VN(1'b0),
    .VAUXP('0), .VAUXN('0), .ALM(), .OT(), .MUXADDR(), .CHANNEL(channel),
    .EOC(eoc), .EOS(eos), .BUSY(busy), .JTAGLOCKED(), .JTAGMODIFIED(), .JTAGBUSY());

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------- monitors
  int unsigned cyc_count = 0;
  int unsigned den_pulses = 0, den_while_busy = 0, den_wide = 0;
  int unsigned convst_run = 0, convst_last_run = 0, dwe_alone = 0, t_convst = 0;
  logic den_d = 1'b0, convst_d = 1'b0;
  // cyc_count numbers the rising edges; this block sees the values that
  // were set on the previous edge.
  always @(posedge clk) begin
    cyc_count++;
    den_d    <= den;
    convst_d <= convst;
    if (!rst) begin
      if (den && !den_d) den_pulses++;
      if (den && den_d)  den_wide++;
      if (den && busy)   den_while_busy++;
      if (dwe && !den)   dwe_alone++;
      if (convst) convst_run++;
      if (convst && !convst_d) t_convst = cyc_count - 1; // edge that set CONVST
      if (!convst && convst_d) begin convst_last_run = convst_run; convst_run = 0; end
    end
  end

  logic [31:0] q;
  int unsigned lat, t0, t1;
  logic [11:0] code;


  task automatic wait_cmd_done();
    int unsigned n = 0;
    do begin
      bfm.read(XADC_REG_RW, q, lat);
      n++;
    end while (q != 0 && n < 200);
    check("DRP command completes", q, 0);
  endtask

  task automatic drp_read(input logic [6:0] a, output logic [15:0] v);
    bfm.write(XADC_REG_ADR, 32'(a), lat);
    bfm.write(XADC_REG_RW, 32'(DRP_CMD_READ), lat);
    wait_cmd_done();
    bfm.read(XADC_REG_DATA, q, lat);
    v = q[15:0];
  endtask

  task automatic drp_write(input logic [6:0] a, input logic [15:0] v);
    bfm.write(XADC_REG_ADR, 32'(a), lat);
    bfm.write(XADC_REG_DATA, 32'(v), lat);
    bfm.write(XADC_REG_RW, 32'(DRP_CMD_WRITE), lat);
    wait_cmd_done();
  endtask

  task automatic wait_status();
    int unsigned n = 0;
    do begin
      bfm.read(XADC_REG_STATUS, q, lat);
      n++;
    end while (q != 1 && n < 400);
    check("conversion completes", q, 1);
  endtask

  logic [15:0] v;
  logic [31:0] blk_q [8];
  logic [6:0]  ra;
  int unsigned mv;
  logic [15:0] shadow [int];

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // Bus sanity value.
    bfm.read(XADC_REG_TEST, q, lat); check("TEST value", q, 2);
    check("read latency", lat, 1);
    bfm.write(XADC_REG_TEST, 32'h55, lat);
    bfm.read(XADC_REG_TEST, q, lat); check("TEST ignores writes", q, 2);

    // ADR keeps 7 bits.
    bfm.write(XADC_REG_ADR, 32'h13, lat); check("write latency", lat, 1);
    bfm.read(XADC_REG_ADR, q, lat); check("ADR readback", q, 32'h13);
    bfm.write(XADC_REG_ADR, 32'hFFFF_FFFF, lat);
    bfm.read(XADC_REG_ADR, q, lat); check("ADR width", q, 32'h7F);

    // Event-driven conversion of VAUX3 (DRP 13h) holding 830 mV.
    code = unipolar_code(830);
    u_xadc.set_input(5'h13, code);
    t0 = cyc_count;
    bfm.write(XADC_REG_CTRL, 32'd1, lat);
    @(posedge eoc);
    #1 t1 = cyc_count;   // edge that set EOC
    // BUSY rises one DCLK after CONVST, lasts CONV_ADCCLK*ADCCLK_DIV edges,
    // and EOC follows EOC_DELAY edges after BUSY falls.
    check("CONVST to EOC cycles", t1 - t_convst, 1 + CONV_ADCCLK * ADCCLK_DIV + EOC_DELAY);
    // The bus request starts after one idle edge, CTRL is written on the
    // next edge and CONVST is registered one edge later.
    check("CTRL write to CONVST cycles", t_convst - t0, 3);
    check("CONVST held until BUSY", convst_last_run, 2);
    bfm.read(XADC_REG_CTRL, q, lat); check("CTRL self-clears", q, 0);
    wait_status();
    check("channel converted", 32'(channel), 32'h13);
    drp_read(7'h13, v);
    check("VAUX3 result", 32'(v), {20'h0, code, 4'h0});
    mv = ((32'(v) >> 4) * 1000) / 4096;
    check("software mV", mv, 829);

    // STATUS is cleared by writing 0.
    bfm.write(XADC_REG_STATUS, 32'd0, lat);
    bfm.read(XADC_REG_STATUS, q, lat); check("STATUS clear", q, 0);

    // DRP writes and read-back of configuration registers.
    drp_write(7'h40, 16'h9000);
    check("model reg 40h", 32'(u_xadc.regs[7'h40]), 32'h9000);
    drp_read(7'h40, v); check("read 40h", 32'(v), 32'h9000);
    drp_write(7'h41, 16'hAAAA);
    drp_read(7'h41, v); check("read 41h", 32'(v), 32'hAAAA);
    drp_read(7'h40, v); check("40h unchanged", 32'(v), 32'h9000);

    // Status registers are read-only.
    drp_write(7'h13, 16'h1234);
    drp_read(7'h13, v); check("status reg read-only", 32'(v), {20'h0, code, 4'h0});

    // Random control-register traffic (42h..7Fh) against a shadow copy.
    for (int i = 0; i < 20; i++) begin
      ra = 7'(7'h42 + ($urandom % 62));
      v  = 16'($urandom);
      shadow[int'(ra)] = v;
      drp_write(ra, v);
    end
    foreach (shadow[k]) begin
      drp_read(7'(k), v);
      check("random ctrl reg", 32'(v), 32'(shadow[k]));
    end

    // A DRP command while a conversion runs waits for BUSY to fall.
    drp_write(7'h40, 16'h0013);
    u_xadc.set_input(5'h13, 12'h5A5);
    bfm.write(XADC_REG_CTRL, 32'd1, lat);
    @(posedge busy);
    bfm.write(XADC_REG_ADR, 32'h13, lat);
    bfm.write(XADC_REG_RW, 32'(DRP_CMD_READ), lat);
    check("BUSY still high when command queued", 32'(busy), 1);
    wait_cmd_done();
    bfm.read(XADC_REG_DATA, q, lat);
    // The read ran after BUSY fell but before EOC stored the new result.
    check("read waited for BUSY", q, {20'h0, code, 4'h0});
    wait_status();
    drp_read(7'h13, v); check("new result", 32'(v), 32'h5A50);

    // BLOCK READ of all six registers in one CYC.
    bfm.block_read(XADC_REG_ADR, 6, blk_q, lat);
    check("block ADR",    blk_q[0], 32'h13);
    check("block DATA",   blk_q[1], 32'h5A50);
    check("block STATUS", blk_q[2], 1);
    check("block CTRL",   blk_q[3], 0);
    check("block TEST",   blk_q[4], 2);
    check("block RW",     blk_q[5], 0);

    // Command 3 is not a command.
    t0 = den_pulses;
    bfm.write(XADC_REG_RW, 32'd3, lat);
    bfm.read(XADC_REG_RW, q, lat); check("RW=3 ignored", q, 0);
    repeat (10) @(posedge clk);
    check("no DEN for RW=3", den_pulses, t0);

    check("DEN never held two cycles", den_wide, 0);
    check("DEN never while BUSY", den_while_busy, 0);
    check("DWE never without DEN", dwe_alone, 0);
    check("DRP accesses reach XADC", u_xadc.n_drp_reads + u_xadc.n_drp_writes, den_pulses);
    check("no bus timeouts", bfm.n_timeouts, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
