// ahb_slave_port -- AHB slave front end shared by the three coprocessors.
//
// Turns AHB single transfers into a simple word-addressed register bus
// (regbus_t).  The address phase of a selected NONSEQ/SEQ transfer is
// registered; in the following data phase a write is presented with the
// bus write data (and byte strobes from HSIZE/HADDR) so the slave stores it
// at the end of that cycle, while a read presents its word address so the
// slave returns the word combinationally on rdata.  Because reads are
// served from the registered address in the data phase, a read right after
// a write to the same word returns the new value.
// The slave never inserts wait states (HREADYOUT = 1) and always answers
// OKAY.  Bursts are handled as series of single transfers.  Only the low
// 14 address bits are used (16 KiB per slave).  All of this is this
// design's own choice; the system only states that the coprocessors are
// AHB slaves.
module ahb_slave_port
  import avc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hsel,
  input  ahb_m2s_t    m,
  input  logic        hready,     // bus HREADY (end of the previous data phase)
  output ahb_s2m_t    s,
  output regbus_t     rb,
  input  logic [31:0] rdata       // word at rb.raddr, combinational
);
  logic        dp_wr, dp_rd;
  logic [11:0] dp_addr;
  logic [3:0]  dp_strb;

  function automatic logic [3:0] strobes(input logic [2:0] hsize, input logic [1:0] a);
    case (hsize)
      3'd0:    return 4'b0001 << a;
      3'd1:    return a[1] ? 4'b1100 : 4'b0011;
      default: return 4'b1111;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_wr   <= 1'b0;
      dp_rd   <= 1'b0;
      dp_addr <= '0;
      dp_strb <= '0;
    end else if (hready) begin
      dp_wr   <= hsel && m.htrans[1] && m.hwrite;
      dp_rd   <= hsel && m.htrans[1] && !m.hwrite;
      dp_addr <= m.haddr[13:2];
      dp_strb <= strobes(m.hsize, m.haddr[1:0]);
    end
  end

  always_comb begin
    rb.we    = dp_wr;
    rb.waddr = dp_addr;
    rb.wdata = m.hwdata;
    rb.wstrb = dp_strb;
    rb.raddr = dp_addr;
    s.hrdata = dp_rd ? rdata : 32'h0;
    s.hready = 1'b1;
    s.hresp  = 1'b0;
  end
endmodule
