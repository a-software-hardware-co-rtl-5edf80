// tb_mc_chroma_interp -- self-checking test of the chroma interpolation
// engine.  All 64 eighth-sample positions are tried with random and extreme
// 5x5 windows; the 16 outputs are compared with the 2-D bilinear reference
// and the start-to-done latency (17 cycles, from the edge that samples start
// to the one that raises done) is checked.
module tb_mc_chroma_interp;
  import avc_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] ld_we = '0;
  logic [4:0] ld_idx [4];
  logic [7:0] ld_data [4];
  logic       start = 1'b0;
  logic [2:0] dx = '0, dy = '0;
  logic       busy, done;
  logic [7:0] pred [16];

  int checks = 0, failures = 0;

  mc_chroma_interp dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    win5_t w;
    blk4_t exp_o;
    int    lat;
    for (int l = 0; l < 4; l++) begin ld_idx[l] = '0; ld_data[l] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 64; f++)
      for (int t = 0; t < 3; t++) begin
        for (int r = 0; r < 5; r++)
          for (int c = 0; c < 5; c++)
            w[r][c] = (t == 0) ? 255 : $urandom_range(0, 255);
        for (int k = 0; k < 25; k += 4) begin
          @(posedge clk);
          for (int l = 0; l < 4; l++) begin
            ld_we[l]   <= (k + l < 25);
            ld_idx[l]  <= 5'(k + l);
            ld_data[l] <= 8'(w[(k + l) / 5 % 5][(k + l) % 5]);
          end
        end
        @(posedge clk);
        ld_we <= '0;
        start <= 1'b1;
        dx    <= 3'(f % 8);
        dy    <= 3'(f / 8);
        @(posedge clk);
        start <= 1'b0;
        lat = 0;
        do begin
          @(posedge clk);
          lat++;
        end while (!done);
        exp_o = ref_chroma(w, f % 8, f / 8);
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (int'(pred[i]) != exp_o[i/4][i%4]) begin
            failures++;
            if (failures < 10)
              $display("mismatch d=(%0d,%0d) pixel %0d: got %0d expected %0d",
                       f % 8, f / 8, i, pred[i], exp_o[i/4][i%4]);
          end
        end
        checks++;
        if (lat != 17) begin
          failures++;
          $display("latency %0d", lat);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
