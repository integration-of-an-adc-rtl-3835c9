// tb_wb_adder: self-checking test of the demo Wishbone adder slave.
// Replays the bring-up program (A = 50, B = 60, read C -> 110), then random
// register values, checking every read offset against sums computed here,
// Wishbone BLOCK read/write and READ-MODIFY-WRITE cycles,
// the FFh value of an unmapped offset, the one-cycle acknowledge latency,
// the single-cycle ACK pulse, that RTY stays low, and that reset clears
// the registers.
module tb_wb_adder;
  import xadc_wb_pkg::*;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic             cyc, stb, we, ack, rty;
  logic [WB_AW-1:0] adr;
  logic [3:0]       sel;
  logic [WB_DW-1:0] mdat, sdat;

  int checks = 0, failures = 0;

  wb_master_bfm #(.AW(WB_AW), .DW(WB_DW)) bfm (
    .clk(clk), .cyc(cyc), .stb(stb), .adr(adr), .we(we), .sel(sel),
    .dat_o(mdat), .dat_i(sdat), .ack(ack));

  wb_adder dut (
    .clk_i(clk), .rst_i(rst), .cyc_i(cyc), .stb_i(stb), .adr_i(adr), .we_i(we),
    .dat_i(mdat), .dat_o(sdat), .ack_o(ack), .rty_o(rty));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ACK is never high two cycles in a row, RTY never high.
  logic ack_d = 1'b0;
  always @(posedge clk) begin
    ack_d <= ack;
    if (!rst && ack && ack_d) begin failures++; $display("FAIL ack held two cycles"); end
    if (rty) begin failures++; $display("FAIL rty asserted"); end
  end

  logic [31:0] a, b, c, q;
  logic [31:0] blk_d [8], blk_q [8];
  int unsigned lat;

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // Bring-up program.
    bfm.write(ADDER_REG_A, 32'd50, lat); check("write latency", lat, 1);
    bfm.write(ADDER_REG_B, 32'd60, lat); check("write latency", lat, 1);
    bfm.read(ADDER_REG_C, q, lat);       check("read C", q, 32'd110);
    check("read latency", lat, 1);

    // Random values.
    for (int i = 0; i < 40; i++) begin
      a = $urandom; b = $urandom; c = $urandom;
      bfm.write(ADDER_REG_A, a, lat);
      bfm.write(ADDER_REG_B, b, lat);
      bfm.write(ADDER_REG_C, c, lat);
      bfm.read(ADDER_REG_A, q, lat); check("read A+B", q, a + b);
      bfm.read(ADDER_REG_B, q, lat); check("read sum", q, a + b);
      bfm.read(ADDER_REG_C, q, lat); check("read C+sum", q, c + a + b);
    end

    // BLOCK WRITE of A, B, C and BLOCK READ of the three sums in one CYC.
    for (int i = 0; i < 3; i++) blk_d[i] = $urandom;
    bfm.block_write(ADDER_REG_A, 3, blk_d, lat);
    check("block write phase latency", lat, 1);
    bfm.block_read(ADDER_REG_A, 3, blk_q, lat);
    check("block read A+B", blk_q[0], blk_d[0] + blk_d[1]);
    check("block read sum", blk_q[1], blk_d[0] + blk_d[1]);
    check("block read C+sum", blk_q[2], blk_d[2] + blk_d[0] + blk_d[1]);

    // READ-MODIFY-WRITE on B: the read returns A+B, the write stores it + 1.
    bfm.rmw(ADDER_REG_B, 32'd1, q);
    check("rmw read", q, blk_d[0] + blk_d[1]);
    bfm.read(ADDER_REG_B, q, lat);
    check("rmw result", q, blk_d[0] + (blk_d[0] + blk_d[1] + 1));
    a = blk_d[0]; b = blk_d[0] + blk_d[1] + 1; c = blk_d[2];

    // Unmapped offsets.
    bfm.read(8'h0C, q, lat); check("unmapped 0C", q, 32'hFF);
    bfm.read(8'h40, q, lat); check("unmapped 40", q, 32'hFF);
    // A write to an unmapped offset changes nothing.
    bfm.write(8'h10, 32'hDEAD_BEEF, lat);
    bfm.read(ADDER_REG_C, q, lat); check("after unmapped write", q, c + a + b);

    // Reset clears A, B and C.
    @(negedge clk) rst = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    bfm.read(ADDER_REG_C, q, lat); check("after reset", q, 32'd0);

    check("no bus timeouts", bfm.n_timeouts, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
