// mc_chroma_interp -- eighth-sample chroma interpolation engine for one 4x4
// chroma block (the "interpolation engine for chroma" of the MC coprocessor).
//
// How it works.  The engine holds the 5x5 integer-pixel reference window of
// the block (window row 0 / column 0 is the block's top-left pixel).  After
// `start` it produces one predicted pixel per cycle, in raster order, with
// three 2-tap "Filter UV" units: UV1 filters row r horizontally with weights
// (8-dx, dx), UV2 does the same on row r+1, and UV3 filters those two
// results vertically with weights (8-dy, dy).  The mux/adder stage adds the
// rounding constant 32 and shifts right by 6, which is H.264's bilinear
// chroma prediction.  It is the separable "1-D filter applied twice" form.
//
// Interface.  Window bytes are written through four load lanes (index =
// row*5 + column) while the engine is idle.  `start` with dx/dy (eighth-pel
// fractions) begins a block; `done` pulses when all of `pred` (raster order)
// is valid; it stays valid until the next start.  Timing: done rises 17
// cycles after the clock edge that samples start (16 pixel cycles).
// The three Filter UV units and the mux/adder follow the design; how the
// three units split the work is this design's own reading.
module mc_chroma_interp (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] ld_we,
  input  logic [4:0] ld_idx  [4],
  input  logic [7:0] ld_data [4],
  input  logic       start,
  input  logic [2:0] dx,
  input  logic [2:0] dy,
  output logic       busy,
  output logic       done,
  output logic [7:0] pred [16]
);
  logic [7:0] win [25];
  logic [2:0] fx, fy;
  logic [3:0] k;
  logic       run;

  // Three Filter UV units and the mux/adder, for pixel k.
  logic [10:0] uv1, uv2;   // up to 8*255
  logic [13:0] uv3;        // up to 64*255
  logic [7:0]  pix;
  always_comb begin
    logic [2:0] r, c;
    r   = 3'(k[3:2]);
    c   = 3'(k[1:0]);
    uv1 = 11'((4'd8 - 4'(fx)) * win[r*5 + c])     + 11'(fx * win[r*5 + c + 1]);
    uv2 = 11'((4'd8 - 4'(fx)) * win[(r+1)*5 + c]) + 11'(fx * win[(r+1)*5 + c + 1]);
    uv3 = 14'((4'd8 - 4'(fy)) * uv1) + 14'(fy * uv2);
    pix = 8'((15'(uv3) + 15'd32) >> 6);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      k    <= '0;
      fx   <= '0;
      fy   <= '0;
      done <= 1'b0;
      for (int i = 0; i < 16; i++) pred[i] <= '0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run <= 1'b1;
          k   <= '0;
          fx  <= dx;
          fy  <= dy;
        end
      end else begin
        pred[k] <= pix;
        k       <= k + 4'd1;
        if (k == 4'd15) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!run)
      for (int l = 0; l < 4; l++)
        if (ld_we[l] && ld_idx[l] < 5'd25) win[ld_idx[l]] <= ld_data[l];
  end

  assign busy = run;
endmodule
