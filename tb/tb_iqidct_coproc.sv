// tb_iqidct_coproc -- self-checking test of the Q^-1 DCT^-1 coprocessor
// through its AHB slave port.
//
// Each test macroblock gets random levels (their range shrinks with QP so the
// residuals stay in 16 bits), a random coded-block mask, random luma and
// chroma QPs, and is Intra 16x16 or not.  Fixed cases add a fully coded
// inter MB, a fully coded Intra 16x16 MB (the slowest case), an MB with no
// coded block and the lowest and highest QPs.  About a third of the coded
// blocks are made DC-only (levels 1..15 zero) and marked in DCMASK.  The
// 384 residuals are read back and compared with the reference model (dequantisation, luma and
// chroma DC Hadamard transforms, 4x4 inverse transform); the CYCLES register
// is checked against the 210-cycle-per-MB limit, and blocks that were
// skipped by the mask, DC-only blocks and MBs with a luma DC transform are
// counted, and each must occur.
module tb_iqidct_coproc;
  import avc_pkg::*;
  import avc_ref_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  ahb_m2s_t m;
  ahb_s2m_t s;
  logic     req, ready;

  int checks = 0, failures = 0;
  int n_skipped = 0, n_intra16 = 0, n_dconly = 0, max_cycles = 0;

  iqidct_coproc dut (.clk, .rst_n, .hsel(1'b1), .m, .hready(s.hready), .s, .ready);
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

  task automatic run_mb(input int mask, input bit intra16, input int qpy, input int qpc,
                        input bit dc_only_ok = 1'b1);
    mb_coef_t lv, e;
    logic [31:0] d;
    int amp, polls, dcm;
    amp = (qpy < 18 && qpc < 18) ? 127 : (qpy < 30 && qpc < 30) ? 20 : 4;
    for (int b = 0; b < 24; b++)
      for (int i = 0; i < 16; i++)
        lv[b][i] = ($urandom_range(0, 2) == 0) ? int'($urandom_range(0, 2*amp)) - amp : 0;
    dcm = 0;
    for (int b = 0; b < 24; b++)
      if (dc_only_ok && mask[b] && $urandom_range(0, 2) == 0) begin
        for (int i = 1; i < 16; i++) lv[b][i] = 0;
        dcm |= 1 << b;
        n_dconly++;
      end
    bfm.write(32'h614, 32'(dcm));
    for (int b = 0; b < 24; b++)
      for (int r = 0; r < 4; r++)
        bfm.write(32'(16*b + 4*r), {8'(lv[b][4*r+3]), 8'(lv[b][4*r+2]), 8'(lv[b][4*r+1]), 8'(lv[b][4*r])});
    bfm.write(32'h608, {7'h0, intra16, 24'(mask)});
    bfm.write(32'h60C, {18'h0, 6'(qpc), 2'b00, 6'(qpy)});
    bfm.read(32'h608, d);
    check(d == {7'h0, intra16, 24'(mask)}, "INFO read-back");
    bfm.write(32'h600, 32'h1);
    polls = 0;
    do begin
      bfm.read(32'h604, d);
      polls++;
    end while (d[0] != 1'b1);
    bfm.read(32'h610, d);
    if (int'(d) > max_cycles) max_cycles = int'(d);
    check(d <= 210, $sformatf("MB takes %0d cycles, limit 210", d));
    e = ref_iqidct(lv, mask, intra16, qpy, qpc);
    for (int b = 0; b < 24; b++)
      for (int r = 0; r < 4; r++)
        for (int h = 0; h < 2; h++) begin
          bfm.read(32'h200 + 32'(4*(2*(4*b + r) + h)), d);
          for (int c = 0; c < 2; c++)
            check(int'(signed'(d[16*c +: 16])) == e[b][4*r + 2*h + c],
                  $sformatf("qp %0d/%0d intra16 %0d block %0d (%0d,%0d): got %0d expected %0d",
                            qpy, qpc, intra16, b, r, 2*h + c, signed'(d[16*c +: 16]), e[b][4*r + 2*h + c]));
        end
    for (int b = 0; b < 24; b++) if (!mask[b]) n_skipped++;
    if (intra16) n_intra16++;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    bfm.read(32'h604, d);
    check(d == 32'h0, "idle after reset");
    run_mb(24'hFFFFFF, 1'b0, 28, 28, 1'b0);
    run_mb(24'hFFFFFF, 1'b1, 51, 39, 1'b0);
    run_mb(24'h000000, 1'b1, 0, 0);
    run_mb(24'h000000, 1'b0, 20, 20);
    run_mb(24'hFFFFFF, 1'b1, 0, 0, 1'b0);
    for (int t = 0; t < 20; t++)
      run_mb(int'($urandom) & 24'hFFFFFF, t[0], $urandom_range(0, 51), $urandom_range(0, 39));
    $display("max cycles per MB %0d, skipped blocks %0d, DC-only blocks %0d, intra 16x16 MBs %0d",
             max_cycles, n_skipped, n_dconly, n_intra16);
    check(n_skipped > 0 && n_dconly > 0 && n_intra16 > 0, "every block class occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
