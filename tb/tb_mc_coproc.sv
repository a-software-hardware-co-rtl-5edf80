// tb_mc_coproc -- self-checking test of the motion-compensation coprocessor
// through its AHB slave port.
//
// For three macroblocks (all MVs fractional, which is the worst case for
// time; all integer; a random mix) the test writes the 16 luma 9x9 and 8
// chroma 5x5 reference windows and the MV words over the bus, starts the
// coprocessor, polls STATUS until ready, reads back the 24 predicted 4x4
// blocks and compares them with the reference model.  It also checks the
// CYCLES register against the 1280-cycle-per-MB limit and that the MV
// registers read back as written.
module tb_mc_coproc;
  import avc_pkg::*;
  import avc_ref_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  ahb_m2s_t m;
  ahb_s2m_t s;
  logic     req, ready;

  int checks = 0, failures = 0;

  mc_coproc dut (.clk, .rst_n, .hsel(1'b1), .m, .hready(s.hready), .s, .ready);
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

  logic [7:0] img [1536];

  task automatic run_mb(input int mode);
    win9_t  wl [16];
    win5_t  wc [8];
    int     mv [16];
    logic [31:0] d;
    int polls;
    for (int b = 0; b < 16; b++) begin
      int fx, fy;
      case (mode)
        0: begin fx = 1 + (b % 3); fy = (b / 3) % 4; end
        1: begin fx = 0; fy = 0; end
        default: begin fx = $urandom_range(0, 3); fy = $urandom_range(0, 3); end
      endcase
      mv[b] = fx | (fy << 2);
      if (b < 8) mv[b] |= (mode == 1 ? 0 : ($urandom_range(0, 7) << 8) | ($urandom_range(0, 7) << 12));
      for (int r = 0; r < 9; r++)
        for (int c = 0; c < 9; c++) begin
          wl[b][r][c] = $urandom_range(0, 255);
          img[81*b + 9*r + c] = 8'(wl[b][r][c]);
        end
    end
    for (int k = 0; k < 8; k++)
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) begin
          wc[k][r][c] = $urandom_range(0, 255);
          img[1296 + 25*k + 5*r + c] = 8'(wc[k][r][c]);
        end
    for (int w = 0; w < 384; w++)
      bfm.write(32'(4*w), {img[4*w+3], img[4*w+2], img[4*w+1], img[4*w]});
    for (int b = 0; b < 16; b++) bfm.write(32'h600 + 32'(4*b), 32'(mv[b]));
    for (int b = 0; b < 16; b++) begin
      bfm.read(32'h600 + 32'(4*b), d);
      check(d == 32'(mv[b]), "MV register read-back");
    end
    bfm.write(32'h700, 32'h1);
    polls = 0;
    do begin
      bfm.read(32'h704, d);
      polls++;
    end while (d[0] != 1'b1);
    check(polls > 1, "coprocessor busy right after start");
    bfm.read(32'h708, d);
    $display("MB mode %0d: %0d cycles", mode, d);
    check(d <= 1280, "MB takes at most 1280 cycles");
    for (int b = 0; b < 24; b++) begin
      blk4_t e;
      int base;
      logic [7:0] got [16];
      if (b < 16) begin
        e    = ref_luma(wl[b], mv[b] & 3, (mv[b] >> 2) & 3);
        base = 81 * b;
      end else begin
        e    = ref_chroma(wc[b-16], (mv[b-16] >> 8) & 7, (mv[b-16] >> 12) & 7);
        base = 1296 + 25 * (b - 16);
      end
      for (int w = base / 4; w <= (base + 15) / 4; w++) begin
        bfm.read(32'(4*w), d);
        for (int l = 0; l < 4; l++)
          if (4*w + l >= base && 4*w + l < base + 16) got[4*w + l - base] = d[8*l +: 8];
      end
      for (int i = 0; i < 16; i++)
        check(int'(got[i]) == e[i/4][i%4],
              $sformatf("mode %0d block %0d pixel %0d: got %0d expected %0d", mode, b, i, got[i], e[i/4][i%4]));
      // bytes of the window beyond the prediction are untouched
      if (b < 16) begin
        bfm.read(32'(4*((base + 20) / 4)), d);
        check(d[8*((base + 20) % 4) +: 8] == img[4*((base + 20) / 4) + (base + 20) % 4]
              || (4*((base + 20) / 4) < base + 16), "window tail untouched");
      end
    end
  endtask

  initial begin
    logic [31:0] d;
    for (int i = 0; i < 1536; i++) img[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    bfm.read(32'h704, d);
    check(d == 32'h0, "idle after reset");
    run_mb(0);
    run_mb(1);
    run_mb(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
