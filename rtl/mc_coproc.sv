// mc_coproc -- macroblock-based motion-compensation coprocessor.
//
// What it does.  For one macroblock (MB) the CPU writes the integer-pixel
// reference windows of its sixteen 4x4 luma blocks and eight 4x4 chroma
// blocks into the local memory, and the fractional part of each block's
// motion vector into the MV registers, then starts the coprocessor.  It
// interpolates every block and writes the 16 predicted pixels of each block
// back over the first 16 bytes of that block's window, where the CPU reads
// them after `ready`.
//
// How it works.  A 12-Kbit local memory (384 x 32 bits) holds the windows:
// luma block b (raster order inside the MB) at byte 81*b as a 9x9 array,
// chroma block k (Cb 0..3, then Cr 0..3, raster order) at byte 1296 + 25*k as
// a 5x5 array, 1496 pixels in all.  The sequencer loads a window word by
// word into the luma or chroma interpolation engine (unaligned windows are
// handled by per-lane byte selection), starts the engine and, when it is
// done, hands the result to a write-back unit that stores it while the next
// window is already being loaded.
//
// Register map (byte offsets in the slave's window, 32-bit words):
//   0x000-0x5FF  local memory, byte addressed, little-endian in each word
//   0x600-0x63C  MV word b: [1:0] luma x fraction, [3:2] luma y fraction
//                (quarter pel) of luma block b; in words 0..7 also
//                [10:8] dx and [14:12] dy (eighth pel) of chroma block b
//   0x700 CTRL   write bit 0 = 1: start one MB
//   0x704 STATUS bit 0 ready (last MB finished), bit 1 busy
//   0x708 CYCLES clock cycles taken by the last MB
// Timing: 61 cycles per fractional luma block, 25 per integer one, about 26
// per chroma block; at most 1167 cycles per MB (limit 1280).
// Following the design: 12-Kbit memory holding about 1500 integer pixels,
// separate luma and chroma engines, 4x4 granularity (16 iterations per MB),
// results written back to the local memory.  The window layout, the MV
// word format, the register map and the overlap of write-back with loading
// are this design's own choices.
module mc_coproc
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
  localparam int unsigned MEM_WORDS = 384;   // 12 Kbit
  localparam int unsigned NLUMA     = 16;
  localparam int unsigned NBLK      = 24;
  localparam int unsigned CBASE     = 1296;

  regbus_t     rb;
  logic [31:0] rdata;

  ahb_slave_port u_port (
    .clk, .rst_n, .hsel, .m, .hready, .s, .rb, .rdata
  );

  logic [31:0] mem [MEM_WORDS];
  logic [15:0] mv  [16];
  logic        busy;
  logic [15:0] cycles;

  // ------------------------------------------------------------ sequencer
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_GO, S_WAIT} state_e;
  state_e      st;
  logic [4:0]  blk;
  logic [8:0]  lw;                 // word being loaded
  logic        is_luma;
  logic [10:0] base, len;

  always_comb begin
    is_luma = (blk < 5'(NLUMA));
    base    = is_luma ? 11'(blk) * 11'd81 : 11'(CBASE) + 11'(blk - 5'(NLUMA)) * 11'd25;
    len     = is_luma ? 11'd81 : 11'd25;
  end

  // Load lanes towards the engines.
  logic [31:0] lword;
  logic [3:0]  lwe;
  logic [6:0]  lidx_y [4];
  logic [4:0]  lidx_c [4];
  logic [7:0]  ldat   [4];
  always_comb begin
    lword = mem[lw];
    for (int l = 0; l < 4; l++) begin
      logic [10:0] a, d;
      a = {lw, 2'(l)};
      d = a - base;
      lwe[l]    = (st == S_LOAD) && (a >= base) && (a < base + len);
      lidx_y[l] = d[6:0];
      lidx_c[l] = d[4:0];
      ldat[l]   = lword[8*l +: 8];
    end
  end

  logic       y_done, c_done, y_busy, c_busy;
  logic [7:0] y_pred [16];
  logic [7:0] c_pred [16];

  mc_luma_interp u_luma (
    .clk, .rst_n,
    .ld_we   (is_luma ? lwe : 4'b0),
    .ld_idx  (lidx_y),
    .ld_data (ldat),
    .start   (st == S_GO && is_luma),
    .xfrac   (mv[blk[3:0]][1:0]),
    .yfrac   (mv[blk[3:0]][3:2]),
    .busy    (y_busy),
    .done    (y_done),
    .pred    (y_pred)
  );

  mc_chroma_interp u_chroma (
    .clk, .rst_n,
    .ld_we   (is_luma ? 4'b0 : lwe),
    .ld_idx  (lidx_c),
    .ld_data (ldat),
    .start   (st == S_GO && !is_luma),
    .dx      (mv[{1'b0, blk[2:0]}][10:8]),
    .dy      (mv[{1'b0, blk[2:0]}][14:12]),
    .busy    (c_busy),
    .done    (c_done),
    .pred    (c_pred)
  );

  // ------------------------------------------------------ write-back unit
  logic        wb_busy;
  logic [10:0] wb_base;
  logic [8:0]  wb_w;
  logic [7:0]  wb_px [16];
  logic [31:0] wb_word;
  logic [3:0]  wb_strb;
  always_comb begin
    for (int l = 0; l < 4; l++) begin
      logic [10:0] a, d;
      a = {wb_w, 2'(l)};
      d = a - wb_base;
      wb_strb[l]        = (a >= wb_base) && (a < wb_base + 11'd16);
      wb_word[8*l +: 8] = wb_px[d[3:0]];
    end
  end

  logic start_cmd;
  assign start_cmd = rb.we && rb.waddr == MC_CTRL_W && rb.wstrb[0] && rb.wdata[0] && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      blk     <= '0;
      lw      <= '0;
      busy    <= 1'b0;
      ready   <= 1'b0;
      cycles  <= '0;
      wb_busy <= 1'b0;
      wb_base <= '0;
      wb_w    <= '0;
      for (int i = 0; i < 16; i++) begin
        mv[i]    <= '0;
        wb_px[i] <= '0;
      end
    end else begin
      // register writes
      if (rb.we && rb.waddr >= MC_MV_W && rb.waddr < MC_MV_W + 12'd16) begin
        if (rb.wstrb[0]) mv[rb.waddr[3:0]][7:0]  <= rb.wdata[7:0];
        if (rb.wstrb[1]) mv[rb.waddr[3:0]][15:8] <= rb.wdata[15:8];
      end
      if (busy) cycles <= cycles + 16'd1;

      case (st)
        S_IDLE: if (start_cmd) begin
          busy   <= 1'b1;
          ready  <= 1'b0;
          cycles <= 16'd1;
          blk    <= '0;
          lw     <= '0;
          st     <= S_LOAD;
        end
        S_LOAD: begin
          if ({lw, 2'b11} >= base + len - 11'd1) st <= S_GO;
          else                                    lw <= lw + 9'd1;
        end
        S_GO: st <= S_WAIT;
        default: begin   // S_WAIT
          if (y_done || c_done) begin
            if (blk == 5'(NBLK - 1)) begin
              st <= S_IDLE;
            end else begin
              blk <= blk + 5'd1;
              st  <= S_LOAD;
              lw  <= (blk + 5'd1 < 5'(NLUMA))
                     ? 9'((11'(blk + 5'd1) * 11'd81) >> 2)
                     : 9'((11'(CBASE) + 11'(blk + 5'd1 - 5'(NLUMA)) * 11'd25) >> 2);
            end
          end
        end
      endcase

      // write-back of a finished block
      if ((y_done || c_done) && st == S_WAIT) begin
        wb_busy <= 1'b1;
        wb_base <= base;
        wb_w    <= base[10:2];
        wb_px   <= y_done ? y_pred : c_pred;
      end else if (wb_busy) begin
        if ({wb_w, 2'b11} >= wb_base + 11'd15) wb_busy <= 1'b0;
        else                                   wb_w    <= wb_w + 9'd1;
      end

      // end of the MB: last block written back
      if (busy && st == S_IDLE && !wb_busy && !(y_done || c_done)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

  // Local memory: one write port shared by the write-back unit and the bus.
  always_ff @(posedge clk) begin
    if (wb_busy) begin
      for (int l = 0; l < 4; l++)
        if (wb_strb[l]) mem[wb_w][8*l +: 8] <= wb_word[8*l +: 8];
    end else if (rb.we && rb.waddr < 12'(MEM_WORDS)) begin
      for (int l = 0; l < 4; l++)
        if (rb.wstrb[l]) mem[rb.waddr[8:0]][8*l +: 8] <= rb.wdata[8*l +: 8];
    end
  end

  // Bus read mux.
  always_comb begin
    rdata = 32'h0;
    if (rb.raddr < 12'(MEM_WORDS))
      rdata = mem[rb.raddr[8:0]];
    else if (rb.raddr >= MC_MV_W && rb.raddr < MC_MV_W + 12'd16)
      rdata = {16'h0, mv[rb.raddr[3:0]]};
    else if (rb.raddr == MC_STAT_W)
      rdata = {30'h0, busy, ready};
    else if (rb.raddr == MC_CYC_W)
      rdata = {16'h0, cycles};
  end

  // The CPU must not start a new MB while one is running.
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (rb.we && rb.waddr == MC_CTRL_W && rb.wdata[0]) |-> !busy);
endmodule
