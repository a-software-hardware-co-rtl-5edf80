// iqidct_coproc -- macroblock-based inverse quantisation and inverse
// transform (Q^-1 DCT^-1) coprocessor.
//
// What it does.  The CPU writes the 384 quantised coefficient levels of one
// macroblock (MB) into the 3-Kbit coefficient memory, a coded-block mask and
// the quantiser parameters into registers, and starts the coprocessor.  It
// produces the 384 residual samples of the MB in the result memory.
//
// How it works.  Three kinds of inverse transform are integrated:
//   1. luma 4x4 DC (Intra 16x16 MBs only): the 16 DC levels, one at position
//      0 of every luma block, go through a 4x4 Hadamard transform and are
//      dequantised with rounding;
//   2. chroma 2x2 DC: the four DC levels of each chroma component go through
//      a 2x2 Hadamard transform and are dequantised;
//   3. the 4x4 integer inverse DCT of every block: dequantisation with a
//      hardwired multiplier, a multiplication-free row transform, a
//      transpose and a multiplication-free column transform, then
//      (x + 32) >> 6.
// The block loop reads one row of four levels per cycle (4 cycles), then
// transforms the whole block in one cycle; a write-back unit stores the 4
// result rows while the next block is read.  Following the content-aware
// idea of the design, blocks fall into three classes: a block whose mask bit
// is 0 is not read at all (it is all zero, or in a block that receives a
// transformed DC, only that DC enters the transform); a block marked DC-only
// has only its first row read (1 cycle instead of 4); any other coded block
// is read in full.  The transform of a DC-only block reduces to its inverse
// DC term, so the same transform cycle serves all three classes.
//
// Register map (byte offsets, 32-bit words):
//   0x000-0x17F  level memory: block b (0..15 luma in raster order inside the
//                MB, 16..19 Cb, 20..23 Cr), row r at word 4*b + r, column c in
//                byte c; levels are signed 8-bit, already in raster order
//   0x200-0x4FC  results, read-only: word 2*(4*b + r) + h holds columns
//                2h (bits 15:0) and 2h+1 (bits 31:16) of row r, signed 16-bit
//   0x600 CTRL   write bit 0 = 1: start one MB
//   0x604 STATUS bit 0 ready, bit 1 busy
//   0x608 INFO   [23:0] coded-block mask (bit b = block b has levels),
//                [24] Intra 16x16 (luma DC levels present)
//   0x60C QP     [5:0] luma QP, [13:8] chroma QP
//   0x610 CYCLES clock cycles taken by the last MB
//   0x614 DCMASK [23:0] bit b = coded block b has a nonzero level only at
//                position 0 (its other levels are zero)
// Timing: at most 152 cycles per MB from the start write to ready (16 + 8
// DC gather cycles, 5 per coded block, write-back tail), limit 210.
// Following the design: 3-Kbit memory for one MB, three transform types,
// multiplication-free transforms with one transpose, a hardwired multiplier
// for dequantisation, block skipping by content.  The register map, the
// 16-bit result format (residuals do not fit in bytes), the coded-block
// and DC-only masks and the write-back overlap are this design's own
// choices.  Levels are limited to signed 8 bits by the 3-Kbit memory.
module iqidct_coproc
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
  localparam int unsigned NBLK = 24;

  regbus_t     rb;
  logic [31:0] rdata;

  ahb_slave_port u_port (
    .clk, .rst_n, .hsel, .m, .hready, .s, .rb, .rdata
  );

  logic [31:0] lvl [96];      // 3 Kbit coefficient memory
  logic [63:0] res [96];      // residual rows, 4 x 16 bit
  logic [24:0] info;
  logic [23:0] dcmask;
  logic [5:0]  qpy, qpc;
  logic        busy;
  logic [15:0] cycles;

  // -------------------------------------------------------- arithmetic
  typedef logic signed [31:0] s32;
  typedef s32 vec4_t [4];

  // One multiplication-free 1-D inverse transform.
  function automatic vec4_t it1d(input vec4_t d);
    s32 e0, e1, e2, e3;
    vec4_t f;
    e0 = d[0] + d[2];
    e1 = d[0] - d[2];
    e2 = (d[1] >>> 1) - d[3];
    e3 = d[1] + (d[3] >>> 1);
    f[0] = e0 + e3;
    f[1] = e1 + e2;
    f[2] = e1 - e2;
    f[3] = e0 - e3;
    return f;
  endfunction

  // One 1-D 4-point Hadamard transform.
  function automatic vec4_t had1d(input vec4_t d);
    vec4_t f;
    f[0] = d[0] + d[1] + d[2] + d[3];
    f[1] = d[0] + d[1] - d[2] - d[3];
    f[2] = d[0] - d[1] - d[2] + d[3];
    f[3] = d[0] - d[1] + d[2] - d[3];
    return f;
  endfunction

  function automatic logic [1:0] pos_class(input int r, input int c);
    if (r % 2 == 0 && c % 2 == 0) return 2'd0;
    if (r % 2 == 1 && c % 2 == 1) return 2'd1;
    return 2'd2;
  endfunction

  // --------------------------------------------------------- sequencer
  typedef enum logic [2:0] {S_IDLE, S_LDC, S_LDCX, S_CDC, S_CDCX, S_RD, S_XF, S_END} state_e;
  state_e     st;
  logic [4:0] idx;            // DC gather index / block index
  logic [1:0] row;
  s32         dcy [16];       // dequantised luma DC
  s32         dcc [8];        // dequantised chroma DC
  logic signed [7:0] dcin [16];
  s32         dq  [4][4];     // dequantised block

  logic [5:0] qp_blk;
  logic       blk_coded, blk_has_dc, blk_dconly;
  always_comb begin
    qp_blk     = (idx < 5'd16) ? qpy : qpc;
    blk_coded  = info[idx];
    blk_dconly = dcmask[idx];
    blk_has_dc = (idx >= 5'd16) || info[24];
  end

  // Dequantisation of the row being read: hardwired multipliers.
  s32 dq_row [4];
  always_comb begin
    logic [31:0] w;
    w = lvl[{idx, row}];
    for (int c = 0; c < 4; c++) begin
      s32 lv;
      lv = s32'(signed'(w[8*c +: 8]));
      dq_row[c] = (lv * s32'({1'b0, dq_scale(3'(qp_blk % 6), pos_class(int'(row), c))})) <<< (qp_blk / 6);
    end
  end

  // Luma DC transform and dequantisation.
  s32 dcy_n [16];
  always_comb begin
    vec4_t t [4];
    vec4_t u;
    s32 v0;
    int qd;
    v0 = s32'({1'b0, dq_scale(3'(qpy % 6), 2'd0)});
    qd = int'(qpy / 6);
    for (int i = 0; i < 4; i++) begin
      vec4_t rw;
      for (int j = 0; j < 4; j++) rw[j] = s32'(dcin[4*i + j]);
      t[i] = had1d(rw);
    end
    for (int j = 0; j < 4; j++) begin
      for (int i = 0; i < 4; i++) u[i] = t[i][j];
      u = had1d(u);
      for (int i = 0; i < 4; i++) begin
        if (qd >= 2) dcy_n[4*i + j] = (u[i] * v0) <<< (qd - 2);
        else         dcy_n[4*i + j] = (u[i] * v0 + (s32'(1) <<< (1 - qd))) >>> (2 - qd);
      end
    end
  end

  // Chroma DC transform and dequantisation (both components).
  s32 dcc_n [8];
  always_comb begin
    s32 v0;
    v0 = s32'({1'b0, dq_scale(3'(qpc % 6), 2'd0)});
    for (int k = 0; k < 2; k++) begin
      s32 c0, c1, c2, c3;
      s32 f [4];
      c0 = s32'(dcin[4*k]);     c1 = s32'(dcin[4*k + 1]);
      c2 = s32'(dcin[4*k + 2]); c3 = s32'(dcin[4*k + 3]);
      f[0] = c0 + c1 + c2 + c3;
      f[1] = c0 - c1 + c2 - c3;
      f[2] = c0 + c1 - c2 - c3;
      f[3] = c0 - c1 - c2 + c3;
      for (int i = 0; i < 4; i++)
        dcc_n[4*k + i] = ((f[i] * v0) <<< (qpc / 6)) >>> 1;
    end
  end

  // 4x4 inverse transform of the current block: rows, transpose, columns.
  logic [63:0] xf_rows [4];
  always_comb begin
    vec4_t d, t [4], u;
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) d[j] = dq[i][j];
      if (i == 0 && blk_has_dc)
        d[0] = (idx < 5'd16) ? dcy[idx[3:0]] : dcc[idx[2:0]];
      t[i] = it1d(d);
    end
    for (int j = 0; j < 4; j++) begin
      for (int i = 0; i < 4; i++) u[i] = t[i][j];
      u = it1d(u);
      for (int i = 0; i < 4; i++) begin
        s32 r;
        r = (u[i] + 32) >>> 6;
        xf_rows[i][16*j +: 16] = r[15:0];
      end
    end
  end

  // Write-back unit.
  logic        wb_busy;
  logic [1:0]  wb_row;
  logic [4:0]  wb_blk;
  logic [63:0] wb_buf [4];

  logic start_cmd;
  assign start_cmd = rb.we && rb.waddr == IQ_CTRL_W && rb.wstrb[0] && rb.wdata[0] && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      idx     <= '0;
      row     <= '0;
      info    <= '0;
      dcmask  <= '0;
      qpy     <= '0;
      qpc     <= '0;
      busy    <= 1'b0;
      ready   <= 1'b0;
      cycles  <= '0;
      wb_busy <= 1'b0;
      wb_row  <= '0;
      wb_blk  <= '0;
      for (int i = 0; i < 16; i++) begin dcy[i] <= '0; dcin[i] <= '0; end
      for (int i = 0; i < 8; i++) dcc[i] <= '0;
      for (int i = 0; i < 4; i++) begin
        wb_buf[i] <= '0;
        for (int j = 0; j < 4; j++) dq[i][j] <= '0;
      end
    end else begin
      if (rb.we && rb.waddr == IQ_INFO_W) info <= rb.wdata[24:0];
      if (rb.we && rb.waddr == IQ_DCM_W) dcmask <= rb.wdata[23:0];
      if (rb.we && rb.waddr == IQ_QP_W) begin
        qpy <= rb.wdata[5:0];
        qpc <= rb.wdata[13:8];
      end
      if (busy) cycles <= cycles + 16'd1;

      case (st)
        S_IDLE: if (start_cmd) begin
          busy   <= 1'b1;
          ready  <= 1'b0;
          cycles <= 16'd1;
          idx    <= '0;
          for (int i = 0; i < 16; i++) dcin[i] <= '0;
          st     <= info[24] ? S_LDC : S_CDC;
          if (!info[24]) idx <= 5'd16;
        end
        S_LDC: begin                       // gather 16 luma DC levels
          dcin[idx[3:0]] <= lvl[{idx, 2'b00}][7:0];
          idx <= idx + 5'd1;
          if (idx == 5'd15) st <= S_LDCX;
        end
        S_LDCX: begin
          dcy <= dcy_n;
          st  <= S_CDC;
        end
        S_CDC: begin                       // gather 8 chroma DC levels into dcin[0..7]
          dcin[idx[3:0]] <= lvl[{idx, 2'b00}][7:0];
          idx <= idx + 5'd1;
          if (idx == 5'd23) st <= S_CDCX;
        end
        S_CDCX: begin
          dcc <= dcc_n;
          idx <= '0;
          row <= '0;
          st  <= S_RD;
        end
        S_RD: begin                        // read and dequantise, or skip
          if (blk_coded && blk_dconly) begin    // DC-only: first row only
            for (int c = 0; c < 4; c++) dq[0][c] <= dq_row[c];
            for (int i = 1; i < 4; i++)
              for (int j = 0; j < 4; j++) dq[i][j] <= '0;
            st <= S_XF;
          end else if (blk_coded) begin
            for (int c = 0; c < 4; c++) dq[row][c] <= dq_row[c];
            row <= row + 2'd1;
            if (row == 2'd3) st <= S_XF;
          end else begin
            for (int i = 0; i < 4; i++)
              for (int j = 0; j < 4; j++) dq[i][j] <= '0;
            st <= S_XF;
          end
        end
        S_XF: if (!wb_busy) begin          // transform, hand to write-back
          wb_buf  <= xf_rows;
          wb_blk  <= idx;
          wb_row  <= '0;
          wb_busy <= 1'b1;
          row     <= '0;
          if (idx == 5'(NBLK - 1)) st <= S_END;
          else begin
            idx <= idx + 5'd1;
            st  <= S_RD;
          end
        end
        default: begin                     // S_END: wait for the last rows
          if (!wb_busy) begin
            busy  <= 1'b0;
            ready <= 1'b1;
            st    <= S_IDLE;
          end
        end
      endcase

      if (wb_busy) begin                   // one result row per cycle
        wb_row <= wb_row + 2'd1;
        if (wb_row == 2'd3) wb_busy <= 1'b0;
      end
    end
  end

  // Memories.
  always_ff @(posedge clk) begin
    if (rb.we && rb.waddr < 12'd96)
      for (int l = 0; l < 4; l++)
        if (rb.wstrb[l]) lvl[rb.waddr[6:0]][8*l +: 8] <= rb.wdata[8*l +: 8];
    if (wb_busy) res[{wb_blk, wb_row}] <= wb_buf[wb_row];
  end

  always_comb begin
    logic [11:0] k;
    rdata = 32'h0;
    k     = rb.raddr - IQ_RES_W;
    if (rb.raddr < 12'd96)
      rdata = lvl[rb.raddr[6:0]];
    else if (rb.raddr >= IQ_RES_W && rb.raddr < IQ_RES_W + 12'd192)
      rdata = k[0] ? res[k[7:1]][63:32] : res[k[7:1]][31:0];
    else if (rb.raddr == IQ_STAT_W)
      rdata = {30'h0, busy, ready};
    else if (rb.raddr == IQ_INFO_W)
      rdata = {7'h0, info};
    else if (rb.raddr == IQ_QP_W)
      rdata = {18'h0, qpc, 2'b00, qpy};
    else if (rb.raddr == IQ_CYC_W)
      rdata = {16'h0, cycles};
    else if (rb.raddr == IQ_DCM_W)
      rdata = {8'h0, dcmask};
  end

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (rb.we && rb.waddr == IQ_CTRL_W && rb.wdata[0]) |-> !busy);
endmodule
