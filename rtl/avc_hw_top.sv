// avc_hw_top -- hardware side of the software/hardware H.264 (MPEG-4 AVC)
// baseline decoder: the system bus and the three macroblock coprocessors.
//
// The CPU runs the entropy decoding (CAVLD), MV decoding, intra prediction
// and reconstruction in software and drives a macroblock-level pipeline:
// while it parses MB n+1, the MC and Q^-1DCT^-1 coprocessors work on MB n
// and the loop-filter coprocessor on MB n-1.  The CPU moves all data in and
// out of the coprocessors over the bus and polls their ready bits.
//
// This module holds the AHB arbiter/decoder and the three coprocessors,
// which are AHB slaves:
//   0x8000_0000  mc_coproc      motion compensation (interpolation)
//   0x8001_0000  iqidct_coproc  inverse quantisation and inverse transform
//   0x8002_0000  lf_coproc      MB-based loop filter
// The CPU and the host bridge are bus masters outside this module (cpu_* and
// host_* ports); the embedded SRAM (0x0000_0000, 1 MiB) and the external
// memory interface (0x2000_0000) are slaves outside it (sram_* and emi_*
// ports).  The ready signals of the coprocessors are brought out as well.
// All ports are plain signals or AHB structs from avc_pkg.
// The partitioning, the bus and the three coprocessors follow the design;
// the address map and the second master are this design's own choices.
module avc_hw_top
  import avc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // CPU (ARM966) master port
  input  logic     cpu_req,
  output logic     cpu_gnt,
  input  ahb_m2s_t cpu_m,
  output ahb_s2m_t cpu_s,
  // host bridge master port
  input  logic     host_req,
  output logic     host_gnt,
  input  ahb_m2s_t host_m,
  output ahb_s2m_t host_s,
  // embedded SRAM slave port
  output logic     sram_sel,
  output ahb_m2s_t sram_m,
  input  ahb_s2m_t sram_s,
  // external memory interface slave port
  output logic     emi_sel,
  output ahb_m2s_t emi_m,
  input  ahb_s2m_t emi_s,
  // bus HREADY seen by the external slaves
  output logic     hready,
  // coprocessor ready signals
  output logic     mc_ready,
  output logic     iq_ready,
  output logic     lf_ready
);
  logic     mreq [2];
  logic     mgnt [2];
  ahb_m2s_t mst_m [2];
  ahb_s2m_t mst_s;
  logic     hsel  [NSLV];
  ahb_m2s_t slv_m;
  ahb_s2m_t slv_s [NSLV];

  assign mreq[0]  = cpu_req;
  assign mreq[1]  = host_req;
  assign mst_m[0] = cpu_m;
  assign mst_m[1] = host_m;
  assign cpu_gnt  = mgnt[0];
  assign host_gnt = mgnt[1];
  assign cpu_s    = mst_s;
  assign host_s   = mst_s;

  ahb_interconnect #(.NMST(2)) u_bus (
    .clk, .rst_n,
    .mreq, .mgnt, .mst_m, .mst_s,
    .hsel, .slv_m, .slv_s, .hready
  );

  assign sram_sel          = hsel[SLV_SRAM];
  assign sram_m            = slv_m;
  assign slv_s[SLV_SRAM]   = sram_s;
  assign emi_sel           = hsel[SLV_EMI];
  assign emi_m             = slv_m;
  assign slv_s[SLV_EMI]    = emi_s;

  mc_coproc u_mc (
    .clk, .rst_n, .hsel(hsel[SLV_MC]), .m(slv_m), .hready,
    .s(slv_s[SLV_MC]), .ready(mc_ready)
  );

  iqidct_coproc u_iq (
    .clk, .rst_n, .hsel(hsel[SLV_IQ]), .m(slv_m), .hready,
    .s(slv_s[SLV_IQ]), .ready(iq_ready)
  );

  lf_coproc u_lf (
    .clk, .rst_n, .hsel(hsel[SLV_LF]), .m(slv_m), .hready,
    .s(slv_s[SLV_LF]), .ready(lf_ready)
  );
endmodule
