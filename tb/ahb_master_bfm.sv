// ahb_master_bfm -- AHB master model for the testbenches (stands in for the
// CPU or the host bridge).
//
// Tasks write(addr, data) and read(addr, data) perform one single 32-bit
// transfer each: the address phase is driven after a rising edge while the
// master holds the grant, the data phase follows; read data is sampled on
// the falling edge of the last data-phase cycle.  The master keeps its bus
// request high while `want_bus` is set.  An ERROR response is counted in
// `errors`.  Signals are driven with non-blocking assignments right after
// the rising edge, so there are no races with the design.
module ahb_master_bfm
  import avc_pkg::*;
(
  input  logic     clk,
  input  logic     gnt,
  input  ahb_s2m_t s,
  output logic     req,
  output ahb_m2s_t m
);
  bit want_bus = 1'b1;
  int errors   = 0;
  int xfers    = 0;

  initial begin
    m   = '{haddr: '0, htrans: HTRANS_IDLE, hwrite: 1'b0, hsize: 3'd2, hwdata: '0};
    req = 1'b0;
  end

  always @(posedge clk) req <= want_bus;

  task automatic xfer(input logic [31:0] addr, input bit wr,
                      input logic [31:0] wdata, output logic [31:0] rdata);
    // wait for the grant with the bus ready (sampled on falling edges)
    do @(negedge clk); while (!(gnt && s.hready));
    @(posedge clk);
    m.haddr  <= addr;
    m.htrans <= HTRANS_NONSEQ;
    m.hwrite <= wr;
    m.hsize  <= 3'd2;
    do @(negedge clk); while (!s.hready);   // address phase accepted
    @(posedge clk);
    m.htrans <= HTRANS_IDLE;
    m.hwdata <= wdata;
    do @(negedge clk); while (!s.hready);   // end of the data phase
    rdata = s.hrdata;
    if (s.hresp) errors++;
    xfers++;
  endtask

  task automatic write(input logic [31:0] addr, input logic [31:0] data);
    logic [31:0] d;
    xfer(addr, 1'b1, data, d);
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data);
    xfer(addr, 1'b0, 32'h0, data);
  endtask
endmodule
