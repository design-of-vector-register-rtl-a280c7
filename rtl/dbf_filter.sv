// H.264 in-loop deblocking filter for one line of eight pixels across an edge.
//
// One call of this unit is one Filter_V or Filter_H operation: the pixels
// p3 p2 p1 p0 | q0 q1 q2 q3 of one line crossing a vertical or horizontal
// 4x4 sub-block edge are filtered according to the boundary strength (bs) and
// the thresholds alpha, beta and tc0. With the 2-D vector register file the
// same unit serves both edge directions: p comes from one register and q
// from another, read as rows for vertical edges and as columns for horizontal
// edges. Lane order in the words: p = {p3, p2, p1, p0}, q = {q0, q1, q2, q3},
// lane 0 in the most significant byte, so p0 and q0 sit next to the edge.
//
// Arithmetic (H.264 normal and strong filters):
//   filter the line only if bs != 0, |p0-q0| < alpha, |p1-p0| < beta and
//   |q1-q0| < beta.  ap = |p2-p0|, aq = |q2-q0|.
//   bs < 4: tc = tc0 + (ap<beta) + (aq<beta) for luma, tc0 + 1 for chroma;
//     d = clip(-tc, tc, (4*(q0-p0) + (p1-q1) + 4) >> 3); p0 += d; q0 -= d
//     (both clipped to 0..255); for luma p1 (if ap<beta) and q1 (if aq<beta)
//     move by clip(-tc0, tc0, (p2 + ((p0+q0+1)>>1) - 2*p1) >> 1) and mirror.
//   bs = 4: luma with ap<beta and |p0-q0| < (alpha>>2)+2 rewrites p0..p2 with
//     the 5/4/5-tap smoothing filters, otherwise only p0 = (2p1+p0+q1+2)>>2;
//     the q side mirrors this. Chroma always uses the short form.
// The document gives only the filter's inputs (pixels, BS, alpha, beta, the
// index values) and outputs; the equations are those of the H.264 standard.
// tc0 is taken as an input because the table that derives it lies outside
// this unit. Purely combinational.
module dbf_filter
  import vreg_pkg::*;
(
  input  vword_t    p_in,      // {p3, p2, p1, p0}
  input  vword_t    q_in,      // {q0, q1, q2, q3}
  input  dbf_ctrl_t ctrl,
  output vword_t    p_out,
  output vword_t    q_out,
  output logic      filtered,  // the edge condition held and bs != 0
  output logic      strong_used     // bs = 4 strong luma filter used on either side
);

  typedef logic signed [11:0] s12_t;

  function automatic s12_t absdiff(input s12_t a, input s12_t b);
    return (a > b) ? a - b : b - a;
  endfunction

  function automatic s12_t clip3(input s12_t lo, input s12_t hi, input s12_t v);
    return (v < lo) ? lo : ((v > hi) ? hi : v);
  endfunction

  function automatic elem_t clip1(input s12_t v);
    return (v < 0) ? 8'd0 : ((v > 255) ? 8'd255 : elem_t'(v));
  endfunction

  s12_t p0, p1, p2, p3, q0, q1, q2, q3;
  s12_t alpha, beta, tc0, tc, ap, aq, delta, dp1, dq1;
  logic ap_ok, aq_ok, strong_gate;

  always_comb begin
    p3 = s12_t'({4'd0, p_in[0]});
    p2 = s12_t'({4'd0, p_in[1]});
    p1 = s12_t'({4'd0, p_in[2]});
    p0 = s12_t'({4'd0, p_in[3]});
    q0 = s12_t'({4'd0, q_in[0]});
    q1 = s12_t'({4'd0, q_in[1]});
    q2 = s12_t'({4'd0, q_in[2]});
    q3 = s12_t'({4'd0, q_in[3]});
    alpha = s12_t'({4'd0, ctrl.alpha});
    beta  = s12_t'({4'd0, ctrl.beta});
    tc0   = s12_t'({7'd0, ctrl.tc0});

    ap    = absdiff(p2, p0);
    aq    = absdiff(q2, q0);
    ap_ok = ap < beta;
    aq_ok = aq < beta;

    filtered = (ctrl.bs != 3'd0) && (absdiff(p0, q0) < alpha) &&
               (absdiff(p1, p0) < beta) && (absdiff(q1, q0) < beta);

    tc = ctrl.chroma ? tc0 + 12'sd1
                     : tc0 + s12_t'({11'd0, ap_ok}) + s12_t'({11'd0, aq_ok});
    delta = clip3(-tc, tc, ((((q0 - p0) <<< 2) + (p1 - q1) + 12'sd4) >>> 3));
    dp1   = clip3(-tc0, tc0, (p2 + ((p0 + q0 + 12'sd1) >>> 1) - (p1 <<< 1)) >>> 1);
    dq1   = clip3(-tc0, tc0, (q2 + ((p0 + q0 + 12'sd1) >>> 1) - (q1 <<< 1)) >>> 1);
    strong_gate = absdiff(p0, q0) < ((alpha >>> 2) + 12'sd2);

    p_out  = p_in;
    q_out  = q_in;
    strong_used = 1'b0;

    if (filtered) begin
      if (ctrl.bs < 3'd4) begin
        p_out[3] = clip1(p0 + delta);
        q_out[0] = clip1(q0 - delta);
        if (!ctrl.chroma && ap_ok) p_out[2] = elem_t'(p1 + dp1);
        if (!ctrl.chroma && aq_ok) q_out[1] = elem_t'(q1 + dq1);
      end else begin
        if (!ctrl.chroma && ap_ok && strong_gate) begin
          p_out[3] = elem_t'((p2 + 12'sd2*p1 + 12'sd2*p0 + 12'sd2*q0 + q1 + 12'sd4) >>> 3);
          p_out[2] = elem_t'((p2 + p1 + p0 + q0 + 12'sd2) >>> 2);
          p_out[1] = elem_t'((12'sd2*p3 + 12'sd3*p2 + p1 + p0 + q0 + 12'sd4) >>> 3);
          strong_used   = 1'b1;
        end else begin
          p_out[3] = elem_t'((12'sd2*p1 + p0 + q1 + 12'sd2) >>> 2);
        end
        if (!ctrl.chroma && aq_ok && strong_gate) begin
          q_out[0] = elem_t'((p1 + 12'sd2*p0 + 12'sd2*q0 + 12'sd2*q1 + q2 + 12'sd4) >>> 3);
          q_out[1] = elem_t'((p0 + q0 + q1 + q2 + 12'sd2) >>> 2);
          q_out[2] = elem_t'((12'sd2*q3 + 12'sd3*q2 + q1 + q0 + p0 + 12'sd4) >>> 3);
          strong_used   = 1'b1;
        end else begin
          q_out[0] = elem_t'((12'sd2*q1 + q0 + p1 + 12'sd2) >>> 2);
        end
      end
    end
  end

endmodule
