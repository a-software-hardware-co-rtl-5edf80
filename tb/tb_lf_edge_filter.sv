// tb_lf_edge_filter -- self-checking test of the one-line deblocking unit.
//
// Lines of eight pixels are generated around a random level with small
// random steps (so that the alpha/beta conditions are met often, but not
// always), for every bS 0..4, every QP 0..51 and both luma and chroma, plus
// fully random lines.  Outputs and the `filtered` flag are compared with the
// integer reference.  The test counts how many lines took the strong filter,
// the normal filter and no filter, and fails if any of them never occurred.
module tb_lf_edge_filter;
  import avc_ref_pkg::*;

  logic [7:0] p_in [4];
  logic [7:0] q_in [4];
  logic [2:0] bs;
  logic [5:0] qp;
  logic       chroma;
  logic [7:0] p_out [3];
  logic [7:0] q_out [3];
  logic       filtered;

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int n_strong = 0, n_normal = 0, n_off = 0;

  lf_edge_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p [4];
    int q [4];
    bit f;
    init_tables();
    for (int i = 0; i < 4; i++) begin p_in[i] = '0; q_in[i] = '0; end
    bs = '0; qp = '0; chroma = 1'b0;
    for (int it = 0; it < 40000; it++) begin
      int lvl, step;
      lvl  = $urandom_range(0, 255);
      step = (it % 4 == 0) ? 255 : (it % 4 == 1) ? 3 : (it % 4 == 2) ? 12 : 40;
      for (int i = 0; i < 4; i++) begin
        p[i] = clip255(lvl + int'($urandom_range(0, 2*step)) - step);
        q[i] = clip255(lvl + ((it % 8 < 4) ? 0 : int'($urandom_range(0, 2*step)) - step)
                       + int'($urandom_range(0, 2*step)) - step);
      end
      @(posedge clk);
      for (int i = 0; i < 4; i++) begin p_in[i] = 8'(p[i]); q_in[i] = 8'(q[i]); end
      bs     = 3'(it % 5);
      qp     = 6'((it / 5) % 52);
      chroma = it[0] ^ it[5];
      #1;
      f = filt_line(p, q, int'(bs), int'(qp), chroma);
      checks++;
      if (filtered != f) begin
        failures++;
        if (failures < 10) $display("filtered flag: got %0d expected %0d (bs %0d qp %0d)", filtered, f, bs, qp);
      end
      for (int i = 0; i < 3; i++) begin
        checks += 2;
        if (int'(p_out[i]) != p[i] || int'(q_out[i]) != q[i]) begin
          failures++;
          if (failures < 10)
            $display("pixel %0d: got p=%0d q=%0d expected p=%0d q=%0d (bs %0d qp %0d chroma %0d)",
                     i, p_out[i], q_out[i], p[i], q[i], bs, qp, chroma);
        end
      end
      if (!f) n_off++;
      else if (bs == 3'd4) n_strong++;
      else n_normal++;
    end
    $display("lines: strong %0d, normal %0d, unfiltered %0d", n_strong, n_normal, n_off);
    checks += 3;
    if (n_strong == 0) failures++;
    if (n_normal == 0) failures++;
    if (n_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
