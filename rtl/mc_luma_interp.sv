// mc_luma_interp -- quarter-sample luma interpolation engine for one 4x4
// block (the "interpolation engine for luma" of the MC coprocessor).
//
// How it works.  The engine holds the 9x9 integer-pixel reference window of
// the block (window row 0 / column 0 is two pixels above / left of the
// block's top-left pixel).  After `start` it runs the filter schedule on two
// 6-tap filters, Y1 and Y2, one filter operation each per cycle (36 cycles):
//   ops  0..35  row filtering: horizontal half samples of all 9 window rows
//               (kept unrounded in hb1, the fed-back intermediate results);
//   ops 36..55  column filtering of integer columns: vertical half samples
//               at the block's 4 columns and the column to the right (vh1);
//   ops 56..71  column filtering of the row results: centre half samples (j1).
// One more cycle then forms all 16 predicted pixels: each is an integer
// pixel, one rounded half sample (Y1 path) or the rounded average of two
// samples (Y1 and Y2 paths through the adder), chosen by the fractional MV
// exactly as H.264 defines the quarter-sample positions.  A block whose MV is
// integer skips the filtering and takes 1 cycle.
//
// Interface.  Window bytes are written through four load lanes
// (ld_we/ld_idx/ld_data, index = row*9 + column) while the engine is idle.
// `start` with xfrac/yfrac (quarter-pel fractions) begins a block; `done`
// pulses for one cycle when `pred` (raster order) is valid; it stays valid
// until the next start.  Timing: done rises 38 cycles after the clock edge
// that samples start for a fractional MV (36 filter cycles), 2 for an
// integer MV.
// The two filters, the adder, the output mux and the feedback of row
// results follow the design; the schedule and the window layout are this
// design's own choices.
module mc_luma_interp (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] ld_we,
  input  logic [6:0] ld_idx  [4],
  input  logic [7:0] ld_data [4],
  input  logic       start,
  input  logic [1:0] xfrac,
  input  logic [1:0] yfrac,
  output logic       busy,
  output logic       done,
  output logic [7:0] pred [16]
);
  import avc_pkg::*;

  localparam int unsigned NOPS = 72;

  logic [7:0]         win [81];
  logic signed [15:0] hb1 [9][4];
  logic signed [15:0] vh1 [4][5];
  logic signed [21:0] j1  [4][4];
  logic [1:0]         fx, fy;
  logic [5:0]         step;
  typedef enum logic [1:0] {S_IDLE, S_FILT, S_OUT} state_e;
  state_e st;

  // ---------------------------------------------------- filter tap select
  logic signed [15:0] taps [2][6];
  logic signed [21:0] fout [2];
  logic [6:0]         opn  [2];

  assign opn[0] = {step, 1'b0};
  assign opn[1] = {step, 1'b1};

  always_comb begin
    for (int f = 0; f < 2; f++) begin
      logic [6:0] o, oc, oj;
      o  = opn[f];
      oc = o - 7'd36;
      oj = o - 7'd56;
      for (int t = 0; t < 6; t++) taps[f][t] = '0;
      if (o < 7'd36) begin
        for (int t = 0; t < 6; t++) taps[f][t] = {8'd0, win[(o / 4) * 9 + (o % 4) + t]};
      end else if (o < 7'd56) begin
        for (int t = 0; t < 6; t++) taps[f][t] = {8'd0, win[(oc / 5 + t) * 9 + (oc % 5) + 2]};
      end else begin
        for (int t = 0; t < 6; t++) taps[f][t] = hb1[oj / 4 + t][oj % 4];
      end
    end
  end

  mc_six_tap #(.IW(16), .OW(22)) u_y1 (.x(taps[0]), .y(fout[0]));
  mc_six_tap #(.IW(16), .OW(22)) u_y2 (.x(taps[1]), .y(fout[1]));

  // ------------------------------------------------------- output forming
  function automatic logic [7:0] rnd_half(input logic signed [21:0] v);
    return clip_pix(24'(v + 22'sd16) >>> 5);
  endfunction
  function automatic logic [7:0] rnd_centre(input logic signed [21:0] v);
    return clip_pix(24'(v + 22'sd512) >>> 10);
  endfunction
  function automatic logic [7:0] avg(input logic [7:0] a, input logic [7:0] b);
    return 8'((9'(a) + 9'(b) + 9'd1) >> 1);
  endfunction

  logic [7:0] pnext [16];
  always_comb begin
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) begin
        logic [7:0] g, h_, m_, sb, sh, sm, ss, sj;
        g  = win[(r+2)*9 + c + 2];
        h_ = win[(r+2)*9 + c + 3];
        m_ = win[(r+3)*9 + c + 2];
        sb = rnd_half(22'(hb1[r+2][c]));
        ss = rnd_half(22'(hb1[r+3][c]));
        sh = rnd_half(22'(vh1[r][c]));
        sm = rnd_half(22'(vh1[r][c+1]));
        sj = rnd_centre(j1[r][c]);
        case ({fx, fy})
          4'b00_00: pnext[r*4+c] = g;
          4'b01_00: pnext[r*4+c] = avg(g, sb);
          4'b10_00: pnext[r*4+c] = sb;
          4'b11_00: pnext[r*4+c] = avg(h_, sb);
          4'b00_01: pnext[r*4+c] = avg(g, sh);
          4'b00_10: pnext[r*4+c] = sh;
          4'b00_11: pnext[r*4+c] = avg(m_, sh);
          4'b01_01: pnext[r*4+c] = avg(sb, sh);
          4'b11_01: pnext[r*4+c] = avg(sb, sm);
          4'b01_11: pnext[r*4+c] = avg(sh, ss);
          4'b11_11: pnext[r*4+c] = avg(sm, ss);
          4'b10_01: pnext[r*4+c] = avg(sb, sj);
          4'b10_10: pnext[r*4+c] = sj;
          4'b10_11: pnext[r*4+c] = avg(sj, ss);
          4'b01_10: pnext[r*4+c] = avg(sh, sj);
          default:  pnext[r*4+c] = avg(sj, sm);   // 11_10
        endcase
      end
    end
  end

  // ------------------------------------------------------------ sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      step <= '0;
      fx   <= '0;
      fy   <= '0;
      done <= 1'b0;
      for (int i = 0; i < 16; i++) pred[i] <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          fx   <= xfrac;
          fy   <= yfrac;
          step <= '0;
          st   <= (xfrac == 2'd0 && yfrac == 2'd0) ? S_OUT : S_FILT;
        end
        S_FILT: begin
          step <= step + 6'd1;
          if (step == 6'(NOPS/2 - 1)) st <= S_OUT;
        end
        default: begin   // S_OUT
          pred <= pnext;
          done <= 1'b1;
          st   <= S_IDLE;
        end
      endcase
    end
  end

  // Filter results and window storage (no reset: written before use).
  always_ff @(posedge clk) begin
    if (st == S_IDLE) begin
      for (int l = 0; l < 4; l++)
        if (ld_we[l] && ld_idx[l] < 7'd81) win[ld_idx[l]] <= ld_data[l];
    end
    if (st == S_FILT) begin
      for (int f = 0; f < 2; f++) begin
        if (opn[f] < 7'd36)      hb1[opn[f] / 4][opn[f] % 4]                 <= 16'(fout[f]);
        else if (opn[f] < 7'd56) vh1[(opn[f] - 7'd36) / 5][(opn[f] - 7'd36) % 5] <= 16'(fout[f]);
        else                     j1[(opn[f] - 7'd56) / 4][(opn[f] - 7'd56) % 4]  <= fout[f];
      end
    end
  end

  assign busy = (st != S_IDLE);
endmodule
