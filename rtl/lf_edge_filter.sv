// lf_edge_filter -- one line of the H.264 deblocking filter across a block
// edge.
//
// Combinational.  Takes the four pixels on each side of the edge (p0..p3
// nearest-first on the left/top side, q0..q3 on the right/bottom side), the
// boundary strength bS (0..4), the average QP of the two blocks and a luma/
// chroma flag, and returns the filtered pixels p0..p2 and q0..q2 (pixels
// the filter does not change are passed through).
//   * The line is filtered only if bS != 0, |p0-q0| < alpha, |p1-p0| < beta
//     and |q1-q0| < beta, with alpha and beta looked up from QP.
//   * bS 1..3: normal filter; p0/q0 move by a clipped delta, and for luma
//     p1/q1 are also corrected when |p2-p0| (|q2-q0|) < beta.
//   * bS 4: strong filter; for luma, 3 pixels per side are smoothed when the
//     edge is flat enough, else one; for chroma, one pixel per side.
// The filter offsets of the slice header are taken as zero.  The equations
// are the H.264 ones; the coprocessor applies this unit once per line.
module lf_edge_filter
  import avc_pkg::*;
(
  input  logic [7:0] p_in  [4],
  input  logic [7:0] q_in  [4],
  input  logic [2:0] bs,
  input  logic [5:0] qp,
  input  logic       chroma,
  output logic [7:0] p_out [3],
  output logic [7:0] q_out [3],
  output logic       filtered
);
  typedef logic signed [11:0] s12;

  function automatic s12 absd(input s12 a, input s12 b);
    return (a > b) ? a - b : b - a;
  endfunction
  function automatic s12 clip3(input s12 lo, input s12 hi, input s12 v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction
  function automatic logic [7:0] clip1(input s12 v);
    return (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : v[7:0];
  endfunction

  always_comb begin
    s12 p0, p1, p2, p3, q0, q1, q2, q3, alpha, beta, tc0, tc, delta, ap, aq;
    logic ap_ok, aq_ok;
    p0 = s12'(p_in[0]); p1 = s12'(p_in[1]); p2 = s12'(p_in[2]); p3 = s12'(p_in[3]);
    q0 = s12'(q_in[0]); q1 = s12'(q_in[1]); q2 = s12'(q_in[2]); q3 = s12'(q_in[3]);
    alpha = s12'(lf_alpha(qp));
    beta  = s12'(lf_beta(qp));
    tc0   = s12'(lf_tc0(qp, bs));
    ap    = absd(p2, p0);
    aq    = absd(q2, q0);
    ap_ok = ap < beta;
    aq_ok = aq < beta;
    filtered = (bs != 3'd0) && (absd(p0, q0) < alpha) &&
               (absd(p1, p0) < beta) && (absd(q1, q0) < beta);
    for (int i = 0; i < 3; i++) begin
      p_out[i] = p_in[i];
      q_out[i] = q_in[i];
    end
    tc    = '0;
    delta = '0;
    if (filtered) begin
      if (bs < 3'd4) begin
        tc    = chroma ? tc0 + 12'sd1 : tc0 + s12'(ap_ok) + s12'(aq_ok);
        delta = clip3(-tc, tc, (((q0 - p0) <<< 2) + (p1 - q1) + 12'sd4) >>> 3);
        p_out[0] = clip1(p0 + delta);
        q_out[0] = clip1(q0 - delta);
        if (!chroma && ap_ok)
          p_out[1] = 8'(p1 + clip3(-tc0, tc0, (p2 + ((p0 + q0 + 12'sd1) >>> 1) - (p1 <<< 1)) >>> 1));
        if (!chroma && aq_ok)
          q_out[1] = 8'(q1 + clip3(-tc0, tc0, (q2 + ((p0 + q0 + 12'sd1) >>> 1) - (q1 <<< 1)) >>> 1));
      end else if (!chroma) begin
        if (ap_ok && absd(p0, q0) < ((alpha >>> 2) + 12'sd2)) begin
          p_out[0] = 8'((p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 12'sd4) >>> 3);
          p_out[1] = 8'((p2 + p1 + p0 + q0 + 12'sd2) >>> 2);
          p_out[2] = 8'((2*p3 + 3*p2 + p1 + p0 + q0 + 12'sd4) >>> 3);
        end else begin
          p_out[0] = 8'((2*p1 + p0 + q1 + 12'sd2) >>> 2);
        end
        if (aq_ok && absd(p0, q0) < ((alpha >>> 2) + 12'sd2)) begin
          q_out[0] = 8'((p1 + 2*p0 + 2*q0 + 2*q1 + q2 + 12'sd4) >>> 3);
          q_out[1] = 8'((p0 + q0 + q1 + q2 + 12'sd2) >>> 2);
          q_out[2] = 8'((2*q3 + 3*q2 + q1 + q0 + p0 + 12'sd4) >>> 3);
        end else begin
          q_out[0] = 8'((2*q1 + q0 + p1 + 12'sd2) >>> 2);
        end
      end else begin
        p_out[0] = 8'((2*p1 + p0 + q1 + 12'sd2) >>> 2);
        q_out[0] = 8'((2*q1 + q0 + p1 + 12'sd2) >>> 2);
      end
    end
  end
endmodule
