// tb_mc_luma_interp -- self-checking test of the luma interpolation engine.
//
// For every one of the 16 quarter-sample positions, several random 9x9
// windows (and some flat and extreme ones, which exercise clipping) are
// loaded through the four load lanes, the engine is started, and the 16
// predicted pixels are compared with the reference model.  The start-to-done
// latency is checked: 38 cycles for a fractional MV, 2 for an integer MV
// (from the clock edge that samples start to the one that raises done).
module tb_mc_luma_interp;
  import avc_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] ld_we = '0;
  logic [6:0] ld_idx [4];
  logic [7:0] ld_data [4];
  logic       start = 1'b0;
  logic [1:0] xfrac = '0, yfrac = '0;
  logic       busy, done;
  logic [7:0] pred [16];

  int checks = 0, failures = 0;

  mc_luma_interp dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input win9_t w, input int fx, input int fy);
    blk4_t exp_o;
    int    lat;
    for (int k = 0; k < 81; k += 4) begin
      @(posedge clk);
      for (int l = 0; l < 4; l++) begin
        ld_we[l]   <= (k + l < 81);
        ld_idx[l]  <= 7'(k + l);
        ld_data[l] <= 8'(w[(k + l) / 9 % 9][(k + l) % 9]);
      end
    end
    @(posedge clk);
    ld_we <= '0;
    start <= 1'b1;
    xfrac <= 2'(fx);
    yfrac <= 2'(fy);
    @(posedge clk);
    start <= 1'b0;
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
    end while (!done);
    exp_o = ref_luma(w, fx, fy);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (int'(pred[i]) != exp_o[i/4][i%4]) begin
        failures++;
        if (failures < 10)
          $display("mismatch frac (%0d,%0d) pixel %0d: got %0d expected %0d",
                   fx, fy, i, pred[i], exp_o[i/4][i%4]);
      end
    end
    checks++;
    if (lat != ((fx == 0 && fy == 0) ? 2 : 38)) begin
      failures++;
      $display("latency %0d for frac (%0d,%0d)", lat, fx, fy);
    end
  endtask

  initial begin
    win9_t w;
    for (int l = 0; l < 4; l++) begin ld_idx[l] = '0; ld_data[l] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int fy = 0; fy < 4; fy++)
      for (int fx = 0; fx < 4; fx++)
        for (int t = 0; t < 6; t++) begin
          for (int r = 0; r < 9; r++)
            for (int c = 0; c < 9; c++)
              case (t)
                0: w[r][c] = 255;
                1: w[r][c] = ((r + c) % 2) ? 255 : 0;      // checkerboard: clips
                2: w[r][c] = (c == 4) ? 0 : 255;
                default: w[r][c] = $urandom_range(0, 255);
              endcase
          run_block(w, fx, fy);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
