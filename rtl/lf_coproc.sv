// lf_coproc -- macroblock-based loop-filter (deblocking) coprocessor.
//
// What it does.  The CPU writes one reconstructed macroblock (MB) together
// with the already-decoded pixels above and to the left of it into the local
// memory, the boundary strengths of all 4x4 block edges and the QPs into
// registers, and starts the coprocessor.  It filters the MB in place, and the
// CPU reads back the MB and the boundary pixels the filter changed.  The
// coprocessor never needs pixels of other MBs, so MBs can be filtered one
// at a time inside the MB pipeline, and only the current and the upper MB
// row have to be kept by the CPU.
//
// How it works.  The local memory is 480 bytes (3.84 Kbit):
//   bytes   0..63   luma rows -4..-1 (from the MB above), columns 0..15
//   bytes  64..383  luma rows 0..15, columns -4..15 (20 bytes per row; the
//                   4 leftmost columns belong to the MB on the left)
//   bytes 384..399  chroma rows -2..-1, columns 0..7
//   bytes 400..479  chroma rows 0..7, columns -2..7 (10 bytes per row)
// One chroma component is held at a time.  Each cycle the sequencer reads
// the 8 pixels across one edge at one line, passes them through
// lf_edge_filter and writes the changed pixels back, so the next edge sees
// the filtered values.  Order: luma vertical edges left to right, luma
// horizontal edges top to bottom, then the same for chroma (Fig.-12-style
// 1-D filtering applied horizontally first, then vertically).
//   luma:   4 edges x 16 lines x 2 directions = 128 cycles
//   chroma: 2 edges x  8 lines x 2 directions =  32 cycles
//
// Register map (byte offsets, 32-bit words):
//   0x000-0x1DF  local memory (byte addressed, little-endian words)
//   0x200 CTRL   bit 0 start, bit 1 filter luma, bit 2 filter chroma
//   0x204 STATUS bit 0 ready, bit 1 busy
//   0x208 CYCLES clock cycles taken by the last task
//   0x210-0x21C  bS, 3 bits in each nibble: word 0 vertical edges 0-1,
//                word 1 vertical edges 2-3, word 2 horizontal edges 0-1,
//                word 3 horizontal edges 2-3; nibble 4*(edge%2) + segment,
//                segment = 4-pixel piece of the edge, top/left first.
//                The CPU sets bS = 0 on picture borders.  Chroma edge k uses
//                the bS of luma edge 2k, chroma line i that of segment i/2.
//   0x220 QPY    [5:0] QP inside the MB, [13:8] average QP of the left
//                edge, [21:16] average QP of the top edge (luma)
//   0x224 QPC    the same for chroma
// Timing: 162 cycles for luma and one chroma component, 34 for a chroma
// component alone, 196 per MB in all (limit 480).
// Following the design: MB-based filtering with only top/left neighbour
// data, 3.84-Kbit local memory, separable filtering in the order of Fig. 12.
// The memory layout (which fits 480 bytes exactly with one chroma component
// at a time), the register map and one line per cycle are this design's own
// choices; the CPU computes bS.
module lf_coproc
  import avc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     hsel,
  input  ahb_m2s_t m,
  input  logic     hready,
  output ahb_s2m_t s,
  output logic     ready
);
  localparam int unsigned MEM_BYTES = 480;

  regbus_t     rb;
  logic [31:0] rdata;

  ahb_slave_port u_port (
    .clk, .rst_n, .hsel, .m, .hready, .s, .rb, .rdata
  );

  logic [7:0]  px [MEM_BYTES];
  logic [31:0] bsw [4];
  logic [21:0] qpyr, qpcr;
  logic [1:0]  en;
  logic        busy;
  logic [15:0] cycles;

  // Byte address of luma pixel (x, y), x,y in -4..15, and chroma (x, y),
  // x,y in -2..7.
  function automatic logic [8:0] yaddr(input int x, input int y);
    if (y < 0) return 9'((y + 4) * 16 + x);
    return 9'(64 + y * 20 + x + 4);
  endfunction
  function automatic logic [8:0] caddr(input int x, input int y);
    if (y < 0) return 9'(384 + (y + 2) * 8 + x);
    return 9'(400 + y * 10 + x + 2);
  endfunction

  // ------------------------------------------------------------ sequencer
  // phase 0 luma vertical, 1 luma horizontal, 2 chroma vertical,
  // 3 chroma horizontal; edge e, line l along the edge.
  logic       run;
  logic [1:0] ph, e;
  logic [3:0] l;
  logic       chroma, horiz;
  assign chroma = ph[1];
  assign horiz  = ph[0];

  logic [8:0] pa [4];
  logic [8:0] qa [4];
  logic [2:0] bs;
  logic [5:0] qp;
  always_comb begin
    int ex, seg, nib, w;
    ex = 4 * int'(e);                   // edge position: luma 0,4,8,12; chroma 0,4
    for (int i = 0; i < 4; i++) begin
      int ii;
      ii = chroma && i > 1 ? 1 : i;        // chroma uses p1..q1 only
      if (!chroma) begin
        pa[i] = horiz ? yaddr(int'(l), ex - 1 - ii) : yaddr(ex - 1 - ii, int'(l));
        qa[i] = horiz ? yaddr(int'(l), ex + ii)     : yaddr(ex + ii, int'(l));
      end else begin
        pa[i] = horiz ? caddr(int'(l), ex - 1 - ii) : caddr(ex - 1 - ii, int'(l));
        qa[i] = horiz ? caddr(int'(l), ex + ii)     : caddr(ex + ii, int'(l));
      end
    end
    // boundary strength of this line
    seg = chroma ? int'(l) / 2 : int'(l) / 4;
    if (!chroma) begin
      w   = (horiz ? 2 : 0) + int'(e) / 2;
      nib = 4 * (int'(e) % 2) + seg;
    end else begin
      w   = horiz ? 2 : 0;                // luma edge 2k: k=0 -> edge 0, k=1 -> edge 2
      w   = w + int'(e);
      nib = seg;
    end
    bs = bsw[w][4*nib +: 3];
    // QP: the MB edge (edge 0) uses the averaged neighbour QP
    if (e == 2'd0) qp = chroma ? (horiz ? qpcr[21:16] : qpcr[13:8])
                               : (horiz ? qpyr[21:16] : qpyr[13:8]);
    else           qp = chroma ? qpcr[5:0] : qpyr[5:0];
  end

  logic [7:0] p_in [4];
  logic [7:0] q_in [4];
  logic [7:0] p_out [3];
  logic [7:0] q_out [3];
  logic       filt;
  always_comb
    for (int i = 0; i < 4; i++) begin
      p_in[i] = px[pa[i]];
      q_in[i] = px[qa[i]];
    end

  lf_edge_filter u_filt (
    .p_in, .q_in, .bs, .qp, .chroma, .p_out, .q_out, .filtered(filt)
  );

  logic last_line;
  always_comb begin
    last_line = chroma ? (l == 4'd7 && e == 2'd1) : (l == 4'd15 && e == 2'd3);
  end

  logic start_cmd;
  assign start_cmd = rb.we && rb.waddr == LF_CTRL_W && rb.wstrb[0] && rb.wdata[0] && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run    <= 1'b0;
      ph     <= '0;
      e      <= '0;
      l      <= '0;
      en     <= '0;
      busy   <= 1'b0;
      ready  <= 1'b0;
      cycles <= '0;
      qpyr   <= '0;
      qpcr   <= '0;
      for (int i = 0; i < 4; i++) bsw[i] <= '0;
    end else begin
      if (rb.we && rb.waddr >= LF_BS_W && rb.waddr < LF_BS_W + 12'd4)
        bsw[rb.waddr[1:0]] <= rb.wdata;
      if (rb.we && rb.waddr == LF_QPY_W) qpyr <= rb.wdata[21:0];
      if (rb.we && rb.waddr == LF_QPC_W) qpcr <= rb.wdata[21:0];
      if (busy) cycles <= cycles + 16'd1;

      if (!run) begin
        if (start_cmd && rb.wdata[2:1] != 2'b00) begin
          run    <= 1'b1;
          busy   <= 1'b1;
          ready  <= 1'b0;
          cycles <= 16'd1;
          en     <= rb.wdata[2:1];
          ph     <= rb.wdata[1] ? 2'd0 : 2'd2;
          e      <= '0;
          l      <= '0;
        end else if (busy) begin
          busy  <= 1'b0;
          ready <= 1'b1;
        end
      end else begin
        if (!last_line) begin
          if ((chroma && l == 4'd7) || (!chroma && l == 4'd15)) begin
            l <= '0;
            e <= e + 2'd1;
          end else begin
            l <= l + 4'd1;
          end
        end else begin
          l <= '0;
          e <= '0;
          if (ph == 2'd3 || (ph == 2'd1 && !en[1])) run <= 1'b0;
          else ph <= ph + 2'd1;
        end
      end
    end
  end

  // Local memory: bus writes when idle, filter write-back while running.
  always_ff @(posedge clk) begin
    if (run) begin
      if (filt) begin
        for (int i = 0; i < 3; i++) begin
          if (!chroma || i == 0) begin
            px[pa[i]] <= p_out[i];
            px[qa[i]] <= q_out[i];
          end
        end
      end
    end else if (rb.we && rb.waddr < 12'(MEM_BYTES / 4)) begin
      for (int b = 0; b < 4; b++)
        if (rb.wstrb[b]) px[{rb.waddr[6:0], 2'(b)}] <= rb.wdata[8*b +: 8];
    end
  end

  always_comb begin
    rdata = 32'h0;
    if (rb.raddr < 12'(MEM_BYTES / 4))
      for (int b = 0; b < 4; b++) rdata[8*b +: 8] = px[{rb.raddr[6:0], 2'(b)}];
    else if (rb.raddr == LF_STAT_W)
      rdata = {30'h0, busy, ready};
    else if (rb.raddr == LF_CYC_W)
      rdata = {16'h0, cycles};
    else if (rb.raddr >= LF_BS_W && rb.raddr < LF_BS_W + 12'd4)
      rdata = bsw[rb.raddr[1:0]];
    else if (rb.raddr == LF_QPY_W)
      rdata = {10'h0, qpyr};
    else if (rb.raddr == LF_QPC_W)
      rdata = {10'h0, qpcr};
  end

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (rb.we && rb.waddr == LF_CTRL_W && rb.wdata[0]) |-> !busy);
endmodule
