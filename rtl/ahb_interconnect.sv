// ahb_interconnect -- AHB arbiter and address decoder of the system bus.
//
// Two masters share one 32-bit AHB: master 0 is the CPU, master 1 the host
// bridge.  Five slaves hang off it (embedded SRAM, external memory
// interface, and the MC, Q^-1DCT^-1 and loop-filter coprocessors).
//
// Arbiter.  A master asks for the bus with mreq.  As with AHB's HGRANT,
// mgnt names the master that owns the address bus in the next cycle: a
// master that sees its mgnt and HREADY high at a rising edge drives the
// address phase after that edge.  The owner keeps the bus as long as it
// requests it; when it releases it, the bus goes to the requesting master
// with the lower index (with no request, the last owner keeps it).  Ownership changes only at the end of a cycle with HREADY
// high, so the last address phase of the old owner completes normally and
// its data phase (write data, read data) stays with it.
// Decoder.  Address-phase HADDR selects a slave by the map in avc_pkg
// (HSEL); the response (HRDATA, HREADY, HRESP) of the slave that owns the
// data phase is returned.  A transfer to an unmapped address gets the
// two-cycle AHB ERROR response from a built-in default slave.
// Timing: no added cycles; the bus is combinational apart from the owner and
// data-phase registers.
// The AHB itself, the CPU as bus master and the coprocessors as slaves follow
// the design; the arbitration rule, the second master's role and the address
// map are this design's own choices.
module ahb_interconnect
  import avc_pkg::*;
#(
  parameter int unsigned NMST = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  // masters
  input  logic     mreq   [NMST],
  output logic     mgnt   [NMST],
  input  ahb_m2s_t mst_m  [NMST],
  output ahb_s2m_t mst_s,
  // slaves
  output logic     hsel   [NSLV],
  output ahb_m2s_t slv_m,
  input  ahb_s2m_t slv_s  [NSLV],
  output logic     hready
);
  localparam int unsigned MW = (NMST > 1) ? $clog2(NMST) : 1;

  logic [MW-1:0] owner, downer;
  logic [2:0]    dsel;            // data-phase slave, NSLV = default slave
  logic          dactive;         // data phase of a real transfer
  logic          err_first;       // first cycle of the ERROR response

  // ------------------------------------------------------------ arbiter
  logic [MW-1:0] owner_nxt;
  always_comb begin
    owner_nxt = owner;
    if (!mreq[owner]) begin
      for (int i = NMST - 1; i >= 0; i--)
        if (mreq[i]) owner_nxt = MW'(i);
    end
    for (int i = 0; i < NMST; i++) mgnt[i] = (owner_nxt == MW'(i));
  end

  // ------------------------------------------------------------ decoder
  logic [2:0] asel;
  always_comb begin
    logic [31:0] a;
    a = mst_m[owner].haddr;
    if (a[31:20] == BASE_SRAM[31:20])      asel = 3'(SLV_SRAM);
    else if (a[31:28] == BASE_EMI[31:28])  asel = 3'(SLV_EMI);
    else if (a[31:16] == BASE_MC[31:16])   asel = 3'(SLV_MC);
    else if (a[31:16] == BASE_IQ[31:16])   asel = 3'(SLV_IQ);
    else if (a[31:16] == BASE_LF[31:16])   asel = 3'(SLV_LF);
    else                                   asel = 3'(NSLV);
    for (int i = 0; i < NSLV; i++) hsel[i] = (asel == 3'(i));
  end

  always_comb begin
    slv_m        = mst_m[owner];
    slv_m.hwdata = mst_m[downer].hwdata;
  end

  // ------------------------------------------------- response multiplexer
  always_comb begin
    mst_s = '{hrdata: 32'h0, hready: 1'b1, hresp: 1'b0};
    if (dsel < 3'(NSLV)) begin
      mst_s = slv_s[dsel];
    end else if (dactive) begin
      mst_s.hready = !err_first;
      mst_s.hresp  = 1'b1;
    end
    hready = mst_s.hready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner     <= '0;
      downer    <= '0;
      dsel      <= 3'(NSLV);
      dactive   <= 1'b0;
      err_first <= 1'b0;
    end else begin
      if (hready) begin
        owner     <= owner_nxt;
        downer    <= owner;
        dsel      <= asel;
        dactive   <= slv_m.htrans[1];
        err_first <= (asel == 3'(NSLV)) && slv_m.htrans[1];
      end else begin
        err_first <= 1'b0;
      end
    end
  end

  // A data phase is never stretched by more than one error cycle from the
  // default slave; the coprocessor slaves never insert wait states.
  a_err_two_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    (dsel == 3'(NSLV) && dactive && !hready) |=> hready);
endmodule
