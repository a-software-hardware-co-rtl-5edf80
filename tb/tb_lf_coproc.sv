// tb_lf_coproc -- self-checking test of the loop-filter coprocessor through
// its AHB slave port.
//
// For several macroblocks the test builds a luma plane and two chroma planes
// (MB plus the 4 (luma) or 2 (chroma) rows above and columns to the left)
// with smooth content and block-wise offsets, so that many lines pass the
// alpha/beta tests, picks random boundary strengths (bS 4 more often on the
// MB edges, as for intra MBs) and QPs, and filters them: one task for luma
// and Cb, one for Cr alone.  The whole local memory is read back and
// compared with the reference deblocking of the same planes.  The CYCLES
// register is checked: the luma task plus both chroma components must take
// at most 480 cycles per MB.  Strong and normal filtered lines are counted
// and each must occur.
module tb_lf_coproc;
  import avc_pkg::*;
  import avc_ref_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  ahb_m2s_t m;
  ahb_s2m_t s;
  logic     req, ready;

  int checks = 0, failures = 0;
  int n_strong = 0, n_normal = 0;

  lf_coproc dut (.clk, .rst_n, .hsel(1'b1), .m, .hready(s.hready), .s, .ready);
  ahb_master_bfm bfm (.clk, .gnt(1'b1), .s, .req, .m);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  logic [7:0] mem [480];

  // Address of a plane sample in the local memory (same layout as the RTL).
  function automatic int yaddr(input int x, input int y);
    return (y < 0) ? (y + 4) * 16 + x : 64 + y * 20 + x + 4;
  endfunction
  function automatic int caddr(input int x, input int y);
    return (y < 0) ? 384 + (y + 2) * 8 + x : 400 + y * 10 + x + 2;
  endfunction

  function automatic plane_t make_plane(input int n, input int off);
    plane_t pl;
    int base, blk [6][6];
    base = $urandom_range(40, 200);
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++) blk[i][j] = int'($urandom_range(0, 12)) - 6;
    for (int y = 0; y < 20; y++)
      for (int x = 0; x < 20; x++) begin
        int by, bx;
        by = (y - off + 4) / 4; bx = (x - off + 4) / 4;
        pl[y][x] = clip255(base + blk[by % 6][bx % 6] + int'($urandom_range(0, 4)) - 2 + (x + y) / 4);
      end
    return pl;
  endfunction

  task automatic load_luma(input plane_t pl);
    for (int y = -4; y < 16; y++)
      for (int x = -4; x < 16; x++)
        if (y >= 0 || x >= 0) mem[yaddr(x, y)] = 8'(pl[y + 4][x + 4]);
  endtask
  task automatic load_chroma(input plane_t pl);
    for (int y = -2; y < 8; y++)
      for (int x = -2; x < 8; x++)
        if (y >= 0 || x >= 0) mem[caddr(x, y)] = 8'(pl[y + 2][x + 2]);
  endtask

  task automatic write_mem();
    for (int w = 0; w < 120; w++)
      bfm.write(32'(4*w), {mem[4*w+3], mem[4*w+2], mem[4*w+1], mem[4*w]});
  endtask

  task automatic run_task(input logic [2:0] ctrl, output int cyc);
    logic [31:0] d;
    bfm.write(32'h200, {29'h0, ctrl});
    do bfm.read(32'h204, d); while (d[0] != 1'b1);
    bfm.read(32'h208, d);
    cyc = int'(d);
  endtask

  task automatic compare(input plane_t yp, input plane_t cp, input bit with_luma, input string what);
    logic [31:0] d;
    for (int w = 0; w < 120; w++) begin
      bfm.read(32'(4*w), d);
      for (int b = 0; b < 4; b++) mem[4*w + b] = d[8*b +: 8];
    end
    if (with_luma)
      for (int y = -4; y < 16; y++)
        for (int x = -4; x < 16; x++)
          if (y >= 0 || x >= 0)
            check(int'(mem[yaddr(x, y)]) == yp[y + 4][x + 4],
                  $sformatf("%s luma (%0d,%0d): got %0d expected %0d", what, x, y, mem[yaddr(x, y)], yp[y + 4][x + 4]));
    for (int y = -2; y < 8; y++)
      for (int x = -2; x < 8; x++)
        if (y >= 0 || x >= 0)
          check(int'(mem[caddr(x, y)]) == cp[y + 2][x + 2],
                $sformatf("%s chroma (%0d,%0d): got %0d expected %0d", what, x, y, mem[caddr(x, y)], cp[y + 2][x + 2]));
  endtask

  task automatic run_mb(input int qbase);
    plane_t yp, cb, cr;
    int bsv [4][4];
    int bsh [4][4];
    int qy [3];
    int qc [3];
    logic [31:0] bw [4];
    int c1, c2;
    for (int e = 0; e < 4; e++)
      for (int sg = 0; sg < 4; sg++) begin
        bsv[e][sg] = (e == 0 && $urandom_range(0, 1)) ? 4 : $urandom_range(0, 3);
        bsh[e][sg] = (e == 0 && $urandom_range(0, 1)) ? 4 : $urandom_range(0, 3);
      end
    for (int i = 0; i < 3; i++) begin
      qy[i] = qbase + int'($urandom_range(0, 6)) - 3;
      qc[i] = qbase - 4 + int'($urandom_range(0, 6)) - 3;
    end
    for (int k = 0; k < 4; k++) bw[k] = '0;
    for (int e = 0; e < 4; e++)
      for (int sg = 0; sg < 4; sg++) begin
        bw[e / 2][4*(4*(e % 2) + sg) +: 3]     = 3'(bsv[e][sg]);
        bw[2 + e / 2][4*(4*(e % 2) + sg) +: 3] = 3'(bsh[e][sg]);
      end
    yp = make_plane(16, 4);
    cb = make_plane(8, 2);
    cr = make_plane(8, 2);
    for (int k = 0; k < 4; k++) bfm.write(32'h210 + 32'(4*k), bw[k]);
    bfm.write(32'h220, {10'h0, 6'(qy[2]), 2'b0, 6'(qy[1]), 2'b0, 6'(qy[0])});
    bfm.write(32'h224, {10'h0, 6'(qc[2]), 2'b0, 6'(qc[1]), 2'b0, 6'(qc[0])});
    // luma and Cb
    load_luma(yp);
    load_chroma(cb);
    write_mem();
    run_task(3'b111, c1);
    ref_lf_plane(yp, bsv, bsh, qy, 1'b0, n_strong, n_normal);
    ref_lf_plane(cb, bsv, bsh, qc, 1'b1, n_strong, n_normal);
    compare(yp, cb, 1'b1, "Y/Cb");
    // Cr alone
    load_chroma(cr);
    write_mem();
    run_task(3'b101, c2);
    ref_lf_plane(cr, bsv, bsh, qc, 1'b1, n_strong, n_normal);
    compare(yp, cr, 1'b0, "Cr");
    $display("MB qp %0d: %0d + %0d cycles", qbase, c1, c2);
    check(c1 + c2 <= 480, $sformatf("MB takes %0d cycles, limit 480", c1 + c2));
  endtask

  initial begin
    logic [31:0] d;
    init_tables();
    for (int i = 0; i < 480; i++) mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    bfm.read(32'h204, d);
    check(d == 32'h0, "idle after reset");
    for (int t = 0; t < 8; t++) run_mb(20 + 4 * t);
    $display("filtered lines: strong %0d, normal %0d", n_strong, n_normal);
    check(n_strong > 0, "strong filter used");
    check(n_normal > 0, "normal filter used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
