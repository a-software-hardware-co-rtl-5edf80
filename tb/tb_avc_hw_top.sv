// tb_avc_hw_top -- end-to-end test of the decoder hardware: decodes a QCIF
// picture (W x H = 11 x 9 macroblocks) through the MB-level pipeline.
//
// The CPU master model plays the software side of the decoder.  Entropy
// decoding is replaced by random syntax: for each MB a type (inter or
// intra), motion vectors (integer and fractional), a QP, a coded-block mask,
// a DC-only mask and coefficient levels.  Each pipeline step then does what the CPU does
// on the real system:
//   1. load MB n into the MC coprocessor (inter MBs: reference windows cut
//      from a reference picture, MV fractions) and into the Q^-1DCT^-1
//      coprocessor (levels, mask, QPs) and start both;
//   2. meanwhile load the loop filter with MB n-1 (the reconstructed MB,
//      4 rows above and 4 columns to the left from the picture, bS and QPs
//      computed in software) and start it;
//   3. poll the coprocessors, read prediction and residual, reconstruct
//      MB n (intra MBs use a flat software prediction) and store it in the
//      embedded SRAM; read back the filtered MB n-1 and the Cr component,
//      and put all of it into the picture.
// A software model does the same steps with the reference functions; at
// the end the CPU writes the decoded picture to the external memory, and
// the picture held there is compared pixel by pixel with the software one.
// Meanwhile the host bridge master writes a block of words into the SRAM
// (as when the host downloads a bitstream) and reads them back, and the
// CPU once reads an unmapped address.
// Counted mechanisms, each of which must happen: inter and intra MBs,
// fractional and integer luma MVs, Intra 16x16 DC transform, blocks skipped
// by the coded-block mask, DC-only blocks, strong and normal loop-filter lines, cycles with
// two or more coprocessors busy at once (pipelining), polls that found a
// coprocessor busy, host-bridge transfers while the CPU also uses the bus,
// wait states from the external memory, and the ERROR response.
// Per-MB cycle counts of the coprocessors are checked against the limits
// 1280 (MC), 210 (Q^-1DCT^-1) and 480 (loop filter), and the CPU's bus
// traffic during decoding against a per-MB budget.  A coprocessor that
// stays busy for 2000 status polls ends the test with a failure.
module tb_avc_hw_top;
  import avc_pkg::*;
  import avc_ref_pkg::*;

  localparam int W  = 11;    // picture width in MBs (QCIF)
  localparam int H  = 9;     // picture height in MBs (QCIF)
  localparam int PW = 16 * W;
  localparam int PH = 16 * H;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     cpu_req, cpu_gnt, host_req, host_gnt;
  ahb_m2s_t cpu_m, host_m, sram_m, emi_m;
  ahb_s2m_t cpu_s, host_s, sram_s, emi_s;
  logic     sram_sel, emi_sel, hready;
  logic     mc_ready, iq_ready, lf_ready;

  int checks = 0, failures = 0;

  avc_hw_top dut (.*);

  ahb_master_bfm cpu  (.clk, .gnt(cpu_gnt),  .s(cpu_s),  .req(cpu_req),  .m(cpu_m));
  ahb_master_bfm host (.clk, .gnt(host_gnt), .s(host_s), .req(host_req), .m(host_m));
  ahb_mem_model #(.WORDS(16384), .WAIT(0)) u_sram (.clk, .rst_n, .hsel(sram_sel), .m(sram_m), .hready, .s(sram_s));
  ahb_mem_model #(.WORDS(16384), .WAIT(1)) u_emi  (.clk, .rst_n, .hsel(emi_sel),  .m(emi_m),  .hready, .s(emi_s));

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------ mechanism counts
  int n_inter = 0, n_intra = 0, n_frac = 0, n_int = 0, n_intra16 = 0, n_skip = 0, n_dconly = 0;
  int n_strong = 0, n_normal = 0, n_overlap = 0, n_busy_poll = 0, n_host = 0;
  int n_host_conc = 0;
  bit host_done = 1'b0;
  int ref_strong = 0, ref_normal = 0;

  always @(posedge clk) if (rst_n) begin
    if (int'(dut.u_mc.busy) + int'(dut.u_iq.busy) + int'(dut.u_lf.busy) >= 2) n_overlap++;
    if (dut.u_lf.run && dut.u_lf.filt) begin
      if (dut.u_lf.bs == 3'd4) n_strong++; else n_normal++;
    end
  end

  // -------------------------------------------------------------- pictures
  int refy [PH][PW];
  int refc [2][PH/2][PW/2];
  int hy [PH][PW];             // picture as the hardware path decodes it
  int hc [2][PH/2][PW/2];
  int sy [PH][PW];             // picture as the software model decodes it
  int sc [2][PH/2][PW/2];

  function automatic int rpy(input int x, input int y);
    return refy[(y < 0) ? 0 : (y >= PH) ? PH - 1 : y][(x < 0) ? 0 : (x >= PW) ? PW - 1 : x];
  endfunction
  function automatic int rpc(input int k, input int x, input int y);
    return refc[k][(y < 0) ? 0 : (y >= PH/2) ? PH/2 - 1 : y][(x < 0) ? 0 : (x >= PW/2) ? PW/2 - 1 : x];
  endfunction

  // ------------------------------------------------------------ MB syntax
  typedef struct {
    bit       intra;
    bit       intra16;
    int       qpy, qpc;
    int       mask;
    int       dcmask;
    int       fx [16];
    int       fy [16];
    int       ix [16];
    int       iy [16];
    int       cdx [8];
    int       cdy [8];
    mb_coef_t lv;
  } mb_t;

  mb_t mbs [W*H];

  function automatic int chroma_qp(input int q);
    int t [22];
    t = '{29,30,31,32,32,33,34,34,35,35,36,36,37,37,37,38,38,38,39,39,39,39};
    return (q < 30) ? q : t[q - 30];
  endfunction

  function automatic mb_t make_mb(input int n);
    mb_t mb;
    mb.intra   = (n % 3 == 2);
    mb.intra16 = mb.intra && (n % 2 == 0);
    mb.qpy     = $urandom_range(26, 42);
    mb.qpc     = chroma_qp(mb.qpy);
    mb.mask    = int'($urandom) & 24'hFFFFFF;
    if (n == 0) mb.mask = 24'hFFFFFF;
    for (int b = 0; b < 16; b++) begin
      mb.fx[b] = (b % 5 == 4) ? 0 : $urandom_range(0, 3);
      mb.fy[b] = (b % 5 == 4) ? 0 : $urandom_range(0, 3);
      mb.ix[b] = int'($urandom_range(0, 8)) - 4;
      mb.iy[b] = int'($urandom_range(0, 8)) - 4;
    end
    for (int k = 0; k < 8; k++) begin
      mb.cdx[k] = $urandom_range(0, 7);
      mb.cdy[k] = $urandom_range(0, 7);
    end
    for (int b = 0; b < 24; b++)
      for (int i = 0; i < 16; i++)
        mb.lv[b][i] = ($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 8)) - 4 : 0;
    mb.dcmask = 0;
    for (int b = 0; b < 24; b++)
      if (mb.mask[b] && $urandom_range(0, 3) == 0) begin
        for (int i = 1; i < 16; i++) mb.lv[b][i] = 0;
        mb.dcmask |= 1 << b;
      end
    return mb;
  endfunction

  // windows of an inter MB
  function automatic void windows(input mb_t mb, input int mx, input int my,
                                  output win9_t wl [16], output win5_t wc [8]);
    for (int b = 0; b < 16; b++)
      for (int r = 0; r < 9; r++)
        for (int c = 0; c < 9; c++)
          wl[b][r][c] = rpy(16*mx + 4*(b % 4) + mb.ix[b] - 2 + c, 16*my + 4*(b / 4) + mb.iy[b] - 2 + r);
    for (int k = 0; k < 8; k++)
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++)
          wc[k][r][c] = rpc(k / 4, 8*mx + 4*(k % 2) + mb.ix[k] / 2 + c, 8*my + 4*((k % 4) / 2) + mb.iy[k] / 2 + r);
  endfunction

  // prediction of an MB: pred[plane 0 luma 16x16, 1/2 chroma 8x8]
  typedef int mbpix_t [3][16][16];

  function automatic mbpix_t predict(input mb_t mb, input int mx, input int my);
    mbpix_t p;
    win9_t wl [16];
    win5_t wc [8];
    for (int pl = 0; pl < 3; pl++) for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) p[pl][y][x] = 128;
    if (!mb.intra) begin
      windows(mb, mx, my, wl, wc);
      for (int b = 0; b < 16; b++) begin
        blk4_t e;
        e = ref_luma(wl[b], mb.fx[b], mb.fy[b]);
        for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) p[0][4*(b/4) + r][4*(b%4) + c] = e[r][c];
      end
      for (int k = 0; k < 8; k++) begin
        blk4_t e;
        e = ref_chroma(wc[k], mb.cdx[k], mb.cdy[k]);
        for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
          p[1 + k/4][4*((k%4)/2) + r][4*(k%2) + c] = e[r][c];
      end
    end
    return p;
  endfunction

  // residual block index of an MB pixel
  function automatic int res_of(input mb_coef_t res, input int pl, input int x, input int y);
    if (pl == 0) return res[4*(y/4) + x/4][4*(y%4) + x%4];
    return res[16 + 4*(pl-1) + 2*(y/4) + x/4][4*(y%4) + x%4];
  endfunction

  // ------------------------------------------------ boundary strengths, QP
  typedef struct {
    int bsv [4][4];
    int bsh [4][4];
    int qy [3];
    int qc [3];
  } lfpar_t;

  function automatic lfpar_t lf_params(input int n);
    lfpar_t lp;
    int mx, my;
    mb_t mb;
    mx = n % W; my = n / W;
    mb = mbs[n];
    for (int e = 0; e < 4; e++)
      for (int sg = 0; sg < 4; sg++)
        for (int dir = 0; dir < 2; dir++) begin
          int bs, qb, pb;
          bit p_intra, p_coded, q_coded;
          int xq, yq, xp, yp;
          // q block (inside this MB) and p block (left or above)
          xq = (dir == 0) ? e : sg;  yq = (dir == 0) ? sg : e;
          xp = xq - (dir == 0); yp = yq - (dir == 1);
          q_coded = mb.mask[4*yq + xq];
          if (e == 0) begin
            int nb;
            nb = (dir == 0) ? n - 1 : n - W;
            if ((dir == 0 && mx == 0) || (dir == 1 && my == 0)) begin
              bs = 0;
            end else begin
              p_intra = mbs[nb].intra;
              p_coded = mbs[nb].mask[4*((yp + 4) % 4) + (xp + 4) % 4];
              bs = (mb.intra || p_intra) ? 4 : (q_coded || p_coded) ? 2 : 1;
            end
          end else begin
            p_coded = mb.mask[4*yp + xp];
            bs = mb.intra ? 3 : (q_coded || p_coded) ? 2 :
                 (mb.ix[4*yq + xq] != mb.ix[4*yp + xp] || mb.iy[4*yq + xq] != mb.iy[4*yp + xp]) ? 1 : 0;
          end
          if (dir == 0) lp.bsv[e][sg] = bs; else lp.bsh[e][sg] = bs;
        end
    lp.qy[0] = mb.qpy;
    lp.qc[0] = mb.qpc;
    lp.qy[1] = (mx == 0) ? mb.qpy : (mb.qpy + mbs[n-1].qpy + 1) / 2;
    lp.qc[1] = (mx == 0) ? mb.qpc : (mb.qpc + mbs[n-1].qpc + 1) / 2;
    lp.qy[2] = (my == 0) ? mb.qpy : (mb.qpy + mbs[n-W].qpy + 1) / 2;
    lp.qc[2] = (my == 0) ? mb.qpc : (mb.qpc + mbs[n-W].qpc + 1) / 2;
    return lp;
  endfunction

  // --------------------------------------------------- software reference
  task automatic sw_decode(input int n);
    mbpix_t p;
    mb_coef_t res;
    int mx, my;
    mx = n % W; my = n / W;
    p   = predict(mbs[n], mx, my);
    res = ref_iqidct(mbs[n].lv, mbs[n].mask, mbs[n].intra16, mbs[n].qpy, mbs[n].qpc);
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++)
      sy[16*my + y][16*mx + x] = clip255(p[0][y][x] + res_of(res, 0, x, y));
    for (int k = 0; k < 2; k++) for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++)
      sc[k][8*my + y][8*mx + x] = clip255(p[1+k][y][x] + res_of(res, 1+k, x, y));
  endtask

  task automatic sw_filter(input int n);
    lfpar_t lp;
    plane_t pl;
    int mx, my;
    mx = n % W; my = n / W;
    lp = lf_params(n);
    for (int y = -4; y < 16; y++) for (int x = -4; x < 16; x++)
      pl[y+4][x+4] = (16*my + y >= 0 && 16*mx + x >= 0) ? sy[16*my + y][16*mx + x] : 0;
    ref_lf_plane(pl, lp.bsv, lp.bsh, lp.qy, 1'b0, ref_strong, ref_normal);
    for (int y = -4; y < 16; y++) for (int x = -4; x < 16; x++)
      if (16*my + y >= 0 && 16*mx + x >= 0 && (y >= 0 || x >= 0)) sy[16*my + y][16*mx + x] = pl[y+4][x+4];
    for (int k = 0; k < 2; k++) begin
      for (int y = -2; y < 8; y++) for (int x = -2; x < 8; x++)
        pl[y+2][x+2] = (8*my + y >= 0 && 8*mx + x >= 0) ? sc[k][8*my + y][8*mx + x] : 0;
      ref_lf_plane(pl, lp.bsv, lp.bsh, lp.qc, 1'b1, ref_strong, ref_normal);
      for (int y = -2; y < 8; y++) for (int x = -2; x < 8; x++)
        if (8*my + y >= 0 && 8*mx + x >= 0 && (y >= 0 || x >= 0)) sc[k][8*my + y][8*mx + x] = pl[y+2][x+2];
    end
  endtask

  // ------------------------------------------------------ CPU bus helpers
  logic [7:0] img [1536];

  task automatic wr_img(input logic [31:0] base, input int nwords);
    for (int w = 0; w < nwords; w++)
      cpu.write(base + 32'(4*w), {img[4*w+3], img[4*w+2], img[4*w+1], img[4*w]});
  endtask
  task automatic rd_img(input logic [31:0] base, input int nwords);
    logic [31:0] d;
    for (int w = 0; w < nwords; w++) begin
      cpu.read(base + 32'(4*w), d);
      for (int b = 0; b < 4; b++) img[4*w + b] = d[8*b +: 8];
    end
  endtask
  task automatic poll(input logic [31:0] stat_addr);
    logic [31:0] d;
    cpu.read(stat_addr, d);
    if (d[0] != 1'b1) n_busy_poll++;
    for (int i = 0; d[0] != 1'b1; i++) begin
      if (i == 2000) begin     // far beyond any coprocessor's MB time
        failures++;
        $display("coprocessor at %08h never became ready", stat_addr);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
      cpu.read(stat_addr, d);
    end
  endtask

  // ---------------------------------------------------- hardware path steps
  task automatic hw_start_mb(input int n);
    mb_t mb;
    int mx, my;
    mb = mbs[n];
    mx = n % W; my = n / W;
    if (!mb.intra) begin
      win9_t wl [16];
      win5_t wc [8];
      windows(mb, mx, my, wl, wc);
      for (int b = 0; b < 16; b++)
        for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) img[81*b + 9*r + c] = 8'(wl[b][r][c]);
      for (int k = 0; k < 8; k++)
        for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) img[1296 + 25*k + 5*r + c] = 8'(wc[k][r][c]);
      wr_img(BASE_MC, 374);
      for (int b = 0; b < 16; b++) begin
        cpu.write(BASE_MC + 32'h600 + 32'(4*b),
                  32'(mb.fx[b] | (mb.fy[b] << 2) | ((b < 8) ? (mb.cdx[b] << 8) | (mb.cdy[b] << 12) : 0)));
        if (mb.fx[b] == 0 && mb.fy[b] == 0) n_int++; else n_frac++;
      end
      cpu.write(BASE_MC + 32'h700, 32'h1);
      n_inter++;
    end else n_intra++;
    for (int b = 0; b < 24; b++)
      for (int i = 0; i < 16; i++) img[16*b + i] = 8'(mb.lv[b][i]);
    wr_img(BASE_IQ, 96);
    cpu.write(BASE_IQ + 32'h608, {7'h0, mb.intra16, 24'(mb.mask)});
    cpu.write(BASE_IQ + 32'h614, 32'(mb.dcmask & 24'hFFFFFF));
    cpu.write(BASE_IQ + 32'h60C, {18'h0, 6'(mb.qpc), 2'b00, 6'(mb.qpy)});
    cpu.write(BASE_IQ + 32'h600, 32'h1);
    if (mb.intra16) n_intra16++;
    for (int b = 0; b < 24; b++) if (!mb.mask[b]) n_skip++;
    for (int b = 0; b < 24; b++) if (mb.dcmask[b]) n_dconly++;
  endtask

  task automatic hw_finish_mb(input int n);
    mb_t mb;
    int mx, my;
    logic [31:0] d;
    mb_coef_t res;
    int p [3][16][16];
    mb = mbs[n];
    mx = n % W; my = n / W;
    for (int pl = 0; pl < 3; pl++) for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) p[pl][y][x] = 128;
    if (!mb.intra) begin
      poll(BASE_MC + 32'h704);
      cpu.read(BASE_MC + 32'h708, d);
      check(d <= 1280, $sformatf("MC took %0d cycles", d));
      rd_img(BASE_MC, 374);
      for (int b = 0; b < 16; b++)
        for (int i = 0; i < 16; i++) p[0][4*(b/4) + i/4][4*(b%4) + i%4] = img[81*b + i];
      for (int k = 0; k < 8; k++)
        for (int i = 0; i < 16; i++) p[1 + k/4][4*((k%4)/2) + i/4][4*(k%2) + i%4] = img[1296 + 25*k + i];
    end
    poll(BASE_IQ + 32'h604);
    cpu.read(BASE_IQ + 32'h610, d);
    check(d <= 210, $sformatf("IQ/IDCT took %0d cycles", d));
    for (int k = 0; k < 192; k++) begin
      cpu.read(BASE_IQ + 32'h200 + 32'(4*k), d);
      res[k/8][4*((k/2)%4) + 2*(k%2)]     = int'(signed'(d[15:0]));
      res[k/8][4*((k/2)%4) + 2*(k%2) + 1] = int'(signed'(d[31:16]));
    end
    // reconstruction (software), store the MB in the SRAM frame buffer
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++)
      hy[16*my + y][16*mx + x] = clip255(p[0][y][x] + res_of(res, 0, x, y));
    for (int k = 0; k < 2; k++) for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++)
      hc[k][8*my + y][8*mx + x] = clip255(p[1+k][y][x] + res_of(res, 1+k, x, y));
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x += 4)
        cpu.write(BASE_SRAM + 32'(PW*(16*my + y) + 16*mx + x),
                  {8'(hy[16*my+y][16*mx+x+3]), 8'(hy[16*my+y][16*mx+x+2]),
                   8'(hy[16*my+y][16*mx+x+1]), 8'(hy[16*my+y][16*mx+x])});
  endtask

  function automatic int yaddr(input int x, input int y);
    return (y < 0) ? (y + 4) * 16 + x : 64 + y * 20 + x + 4;
  endfunction
  function automatic int caddr(input int x, input int y);
    return (y < 0) ? 384 + (y + 2) * 8 + x : 400 + y * 10 + x + 2;
  endfunction

  task automatic lf_load(input int n, input int k, input bit with_luma);
    int mx, my;
    mx = n % W; my = n / W;
    for (int i = 0; i < 480; i++) img[i] = '0;
    if (with_luma)
      for (int y = -4; y < 16; y++) for (int x = -4; x < 16; x++)
        if ((y >= 0 || x >= 0) && 16*my + y >= 0 && 16*mx + x >= 0)
          img[yaddr(x, y)] = 8'(hy[16*my + y][16*mx + x]);
    for (int y = -2; y < 8; y++) for (int x = -2; x < 8; x++)
      if ((y >= 0 || x >= 0) && 8*my + y >= 0 && 8*mx + x >= 0)
        img[caddr(x, y)] = 8'(hc[k][8*my + y][8*mx + x]);
    wr_img(BASE_LF, with_luma ? 120 : 120);
  endtask

  task automatic lf_store(input int n, input int k, input bit with_luma);
    int mx, my;
    mx = n % W; my = n / W;
    rd_img(BASE_LF, 120);
    if (with_luma)
      for (int y = -4; y < 16; y++) for (int x = -4; x < 16; x++)
        if ((y >= 0 || x >= 0) && 16*my + y >= 0 && 16*mx + x >= 0)
          hy[16*my + y][16*mx + x] = img[yaddr(x, y)];
    for (int y = -2; y < 8; y++) for (int x = -2; x < 8; x++)
      if ((y >= 0 || x >= 0) && 8*my + y >= 0 && 8*mx + x >= 0)
        hc[k][8*my + y][8*mx + x] = img[caddr(x, y)];
  endtask

  task automatic hw_start_lf(input int n);
    lfpar_t lp;
    logic [31:0] bw [4];
    lp = lf_params(n);
    for (int k = 0; k < 4; k++) bw[k] = '0;
    for (int e = 0; e < 4; e++)
      for (int sg = 0; sg < 4; sg++) begin
        bw[e / 2][4*(4*(e % 2) + sg) +: 3]     = 3'(lp.bsv[e][sg]);
        bw[2 + e / 2][4*(4*(e % 2) + sg) +: 3] = 3'(lp.bsh[e][sg]);
      end
    for (int k = 0; k < 4; k++) cpu.write(BASE_LF + 32'h210 + 32'(4*k), bw[k]);
    cpu.write(BASE_LF + 32'h220, {10'h0, 6'(lp.qy[2]), 2'b0, 6'(lp.qy[1]), 2'b0, 6'(lp.qy[0])});
    cpu.write(BASE_LF + 32'h224, {10'h0, 6'(lp.qc[2]), 2'b0, 6'(lp.qc[1]), 2'b0, 6'(lp.qc[0])});
    lf_load(n, 0, 1'b1);
    cpu.write(BASE_LF + 32'h200, 32'h7);      // luma and Cb
  endtask

  task automatic hw_finish_lf(input int n);
    logic [31:0] d;
    int c1;
    poll(BASE_LF + 32'h204);
    cpu.read(BASE_LF + 32'h208, d);
    c1 = int'(d);
    lf_store(n, 0, 1'b1);
    lf_load(n, 1, 1'b0);
    cpu.write(BASE_LF + 32'h200, 32'h5);      // Cr
    poll(BASE_LF + 32'h204);
    cpu.read(BASE_LF + 32'h208, d);
    check(c1 + int'(d) <= 480, $sformatf("loop filter took %0d cycles", c1 + int'(d)));
    lf_store(n, 1, 1'b0);
  endtask

  // ---------------------------------------------------------- host bridge
  bit decoding = 1'b0;

  task automatic host_traffic();
    logic [31:0] d;
    repeat (50) @(posedge clk);
    for (int i = 0; i < 64; i++) begin
      if (i % 8 == 0) host.want_bus = 1'b1;
      host.write(BASE_SRAM + 32'h8000 + 32'(4*i), 32'hB175_0000 + 32'(i));
      n_host++;
      if (decoding) n_host_conc++;
      if (i % 8 == 7) begin
        host.want_bus = 1'b0;
        repeat (200) @(posedge clk);
      end
    end
    host.want_bus = 1'b1;
    for (int i = 0; i < 64; i++) begin
      host.read(BASE_SRAM + 32'h8000 + 32'(4*i), d);
      check(d == 32'hB175_0000 + 32'(i), "host read-back from SRAM");
      n_host++;
    end
    host.want_bus = 1'b0;
    host_done = 1'b1;
  endtask

  // The CPU leaves the bus while it parses the next MB in software.
  task automatic cpu_parse();
    cpu.want_bus = 1'b0;
    repeat (40) @(posedge clk);
    cpu.want_bus = 1'b1;
  endtask

  // ------------------------------------------------------------ main flow
  initial begin
    logic [31:0] d;
    int     x0, bus_bytes;
    longint t0;
    host.want_bus = 1'b0;
    init_tables();
    for (int y = 0; y < PH; y++) for (int x = 0; x < PW; x++)
      refy[y][x] = clip255(60 + 2 * x + y + int'($urandom_range(0, 30)));
    for (int k = 0; k < 2; k++) for (int y = 0; y < PH/2; y++) for (int x = 0; x < PW/2; x++)
      refc[k][y][x] = clip255(100 + 3 * x - y + 20 * k + int'($urandom_range(0, 20)));
    for (int n = 0; n < W*H; n++) mbs[n] = make_mb(n);
    for (int i = 0; i < 1536; i++) img[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    fork
      host_traffic();
    join_none
    // software reference of the whole picture
    for (int n = 0; n <= W*H; n++) begin
      if (n < W*H) sw_decode(n);
      if (n > 0) sw_filter(n - 1);
    end
    // hardware path: MB pipeline
    decoding = 1'b1;
    x0 = cpu.xfers;
    t0 = $time;
    for (int n = 0; n <= W*H; n++) begin
      cpu_parse();
      if (n < W*H) hw_start_mb(n);
      if (n > 0) hw_start_lf(n - 1);
      if (n < W*H) hw_finish_mb(n);
      if (n > 0) hw_finish_lf(n - 1);
    end
    decoding = 1'b0;
    bus_bytes = 4 * (cpu.xfers - x0);
    $display("CPU bus traffic while decoding %0d bytes (%0d per MB, %0d inter MBs); %0d cycles",
             bus_bytes, bus_bytes / (W*H), n_inter, ($time - t0) / 10);
    // A 32-bit word per transfer.  Per inter MB: MC 1564 bytes written and
    // its whole 1496-byte memory read back, Q^-1DCT^-1 400 written and 768
    // read, loop filter 2 x 480 + 32 written and 2 x 480 read, 256 bytes of
    // luma to the SRAM: about 6.4 KB, and 3.4 KB for an intra MB (no MC),
    // plus status polls while a coprocessor is busy (up to 0.6 KB).
    check(bus_bytes <= 7000 * n_inter + 4000 * n_intra, "bus traffic per MB within the budget");
    // an access to an unmapped address
    cpu.read(32'h6000_0000, d);
    check(cpu.errors == 1, "ERROR response for an unmapped address");
    // decoded picture to the external memory, then compare
    for (int y = 0; y < PH; y++)
      for (int x = 0; x < PW; x += 4)
        cpu.write(BASE_EMI + 32'(PW*y + x), {8'(hy[y][x+3]), 8'(hy[y][x+2]), 8'(hy[y][x+1]), 8'(hy[y][x])});
    for (int k = 0; k < 2; k++)
      for (int y = 0; y < PH/2; y++)
        for (int x = 0; x < PW/2; x += 4)
          cpu.write(BASE_EMI + 32'(PW*PH + k*PW*PH/4 + PW/2*y + x),
                    {8'(hc[k][y][x+3]), 8'(hc[k][y][x+2]), 8'(hc[k][y][x+1]), 8'(hc[k][y][x])});
    repeat (2) @(posedge clk);     // last write lands
    for (int y = 0; y < PH; y++)
      for (int x = 0; x < PW; x++)
        check(int'(u_emi.mem[(PW*y + x) / 4][8*(x%4) +: 8]) == sy[y][x],
              $sformatf("luma (%0d,%0d): got %0d expected %0d", x, y, u_emi.mem[(PW*y + x) / 4][8*(x%4) +: 8], sy[y][x]));
    for (int k = 0; k < 2; k++)
      for (int y = 0; y < PH/2; y++)
        for (int x = 0; x < PW/2; x++) begin
          int a;
          a = PW*PH + k*PW*PH/4 + PW/2*y + x;
          check(int'(u_emi.mem[a / 4][8*(a%4) +: 8]) == sc[k][y][x],
                $sformatf("chroma %0d (%0d,%0d): got %0d expected %0d", k, x, y, u_emi.mem[a / 4][8*(a%4) +: 8], sc[k][y][x]));
        end
    cpu.want_bus = 1'b0;
    wait (host_done);
    $display("MBs inter %0d intra %0d (Intra16x16 %0d); luma MVs fractional %0d integer %0d; skipped blocks %0d; DC-only blocks %0d",
             n_inter, n_intra, n_intra16, n_frac, n_int, n_skip, n_dconly);
    $display("loop filter lines strong %0d normal %0d (reference %0d %0d); pipelined cycles %0d; busy polls %0d",
             n_strong, n_normal, ref_strong, ref_normal, n_overlap, n_busy_poll);
    $display("host transfers %0d (%0d during decoding); EMI wait cycles %0d; errors %0d",
             n_host, n_host_conc, u_emi.wait_cycles, cpu.errors);
    check(n_strong == ref_strong && n_normal == ref_normal, "filtered line counts match");
    check(n_inter > 0,  "inter MB decoded");
    check(n_intra > 0,  "intra MB decoded");
    check(n_intra16 > 0, "Intra 16x16 DC transform used");
    check(n_frac > 0,   "fractional MV used");
    check(n_int > 0,    "integer MV used");
    check(n_skip > 0,   "blocks skipped by the coded-block mask");
    check(n_dconly > 0, "DC-only blocks");
    check(n_strong > 0, "strong loop filter used");
    check(n_normal > 0, "normal loop filter used");
    check(n_overlap > 0, "coprocessors worked in parallel");
    check(n_busy_poll > 0, "CPU polled a busy coprocessor");
    check(n_host > 0 && n_host_conc > 0, "host bridge used the bus alongside the CPU");
    check(u_emi.wait_cycles > 0, "external memory wait states");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
