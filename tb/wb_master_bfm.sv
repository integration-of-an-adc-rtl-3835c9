// wb_master_bfm: Wishbone B4 master for testbenches. write() and read()
// run one classic single cycle: CYC, STB, ADR, WE, SEL and DAT are driven
// just after a falling clock edge, held until ACK is sampled high on a
// rising edge, then released. Each call returns the number of rising edges
// from the request to the acknowledge, so testbenches can check latency.
// A cycle with no ACK after TIMEOUT edges is abandoned and flagged.
// block_read(), block_write() and rmw() keep CYC high over several phases,
// each phase raising STB until its ACK, as in Wishbone BLOCK and
// READ-MODIFY-WRITE cycles.
module wb_master_bfm #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 32,
  parameter int unsigned TIMEOUT = 64
) (
  input  logic          clk,
  output logic          cyc,
  output logic          stb,
  output logic [AW-1:0] adr,
  output logic          we,
  output logic [3:0]    sel,
  output logic [DW-1:0] dat_o,
  input  logic [DW-1:0] dat_i,
  input  logic          ack
);

  int unsigned n_timeouts;
  int unsigned n_acks;

  initial begin
    cyc = 1'b0; stb = 1'b0; adr = '0; we = 1'b0; sel = '0; dat_o = '0;
    n_timeouts = 0; n_acks = 0;
  end

  task automatic cycle(input logic w, input logic [AW-1:0] a, input logic [DW-1:0] d,
                       output logic [DW-1:0] q, output int unsigned lat);
    @(negedge clk);
    cyc = 1'b1; stb = 1'b1; adr = a; we = w; sel = 4'hF; dat_o = d;
    lat = 0;
    q = '0;
    forever begin
      @(posedge clk);
      lat++;
      #1;
      if (ack) begin
        q = dat_i;
        n_acks++;
        break;
      end
      if (lat >= TIMEOUT) begin
        n_timeouts++;
        break;
      end
    end
    @(negedge clk);
    cyc = 1'b0; stb = 1'b0; we = 1'b0; sel = '0;
  endtask

  // One phase of a BLOCK or RMW cycle: CYC is already high; STB, ADR, WE
  // and DAT are driven for this phase and STB drops after its ACK.
  task automatic phase(input logic w, input logic [AW-1:0] a, input logic [DW-1:0] d,
                       output logic [DW-1:0] q, output int unsigned lat);
    @(negedge clk);
    stb = 1'b1; adr = a; we = w; sel = 4'hF; dat_o = d;
    lat = 0;
    q = '0;
    forever begin
      @(posedge clk);
      lat++;
      #1;
      if (ack) begin
        q = dat_i;
        n_acks++;
        break;
      end
      if (lat >= TIMEOUT) begin
        n_timeouts++;
        break;
      end
    end
    @(negedge clk);
    stb = 1'b0; we = 1'b0;
  endtask

  // BLOCK READ: CYC stays high over n phases at consecutive word offsets.
  task automatic block_read(input logic [AW-1:0] a0, input int unsigned n,
                            output logic [DW-1:0] q [8], output int unsigned lat);
    @(negedge clk);
    cyc = 1'b1;
    for (int i = 0; i < n && i < 8; i++) phase(1'b0, AW'(a0 + 4 * i), '0, q[i], lat);
    cyc = 1'b0; sel = '0;
  endtask

  // BLOCK WRITE: CYC stays high over n phases at consecutive word offsets.
  task automatic block_write(input logic [AW-1:0] a0, input int unsigned n,
                             input logic [DW-1:0] d [8], output int unsigned lat);
    logic [DW-1:0] q;
    @(negedge clk);
    cyc = 1'b1;
    for (int i = 0; i < n && i < 8; i++) phase(1'b1, AW'(a0 + 4 * i), d[i], q, lat);
    cyc = 1'b0; sel = '0;
  endtask

  // READ-MODIFY-WRITE: a read phase and a write phase inside one CYC; the
  // value written is the value read plus inc.
  task automatic rmw(input logic [AW-1:0] a, input logic [DW-1:0] inc,
                     output logic [DW-1:0] q_read);
    int unsigned lat;
    logic [DW-1:0] q;
    @(negedge clk);
    cyc = 1'b1;
    phase(1'b0, a, '0, q_read, lat);
    phase(1'b1, a, q_read + inc, q, lat);
    cyc = 1'b0; sel = '0;
  endtask

  task automatic write(input logic [AW-1:0] a, input logic [DW-1:0] d, output int unsigned lat);
    logic [DW-1:0] q;
    cycle(1'b1, a, d, q, lat);
  endtask

  task automatic read(input logic [AW-1:0] a, output logic [DW-1:0] q, output int unsigned lat);
    cycle(1'b0, a, '0, q, lat);
  endtask

endmodule
