// Reference models shared by the testbenches.
//
// ref_read / ref_write model the 2-D register file as a plain matrix of
// NUM_REGS x LANES bytes: a row-mode access at number n touches M[n][0..3];
// a column-mode access at number n touches M[4*(n/4) + k][n%4], k = 0..3.
// ref_filter is a straightforward integer version of the H.264 luma/chroma
// edge filter, written from the standard's equations independently of the
// RTL (arrays of int, no shared helpers).
package tb_ref_pkg;
  import vreg_pkg::*;

  typedef byte unsigned mat_t [NUM_REGS][LANES];

  function automatic vword_t ref_read(input mat_t m, input vreg_addr_t a);
    vword_t w;
    int n = int'(a.num);
    for (int k = 0; k < LANES; k++)
      w[k] = (a.mode == MODE_ROW) ? m[n][k] : m[(n / LANES) * LANES + k][n % LANES];
    return w;
  endfunction

  function automatic void ref_write(ref mat_t m, input vreg_addr_t a, input vword_t w);
    int n = int'(a.num);
    for (int k = 0; k < LANES; k++)
      if (a.mode == MODE_ROW) m[n][k] = w[k];
      else                    m[(n / LANES) * LANES + k][n % LANES] = w[k];
  endfunction

  function automatic vreg_addr_t mk_addr(input bit col, input int n);
    vreg_addr_t a;
    a.mode = col ? MODE_COL : MODE_ROW;
    a.num  = REG_AW'(n);
    return a;
  endfunction

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int iclip(input int lo, input int hi, input int v);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

  // floor division by 2**s for possibly negative v
  function automatic int fshr(input int v, input int s);
    int d = 1 << s;
    if (v >= 0) return v / d;
    return -((-v + d - 1) / d);
  endfunction

  // px[0..7] = p3 p2 p1 p0 q0 q1 q2 q3, filtered in place.
  function automatic void ref_filter(ref int px[8], input int bs, input bit chroma,
                                     input int alpha, input int beta, input int tc0);
    int p3 = px[0], p2 = px[1], p1 = px[2], p0 = px[3];
    int q0 = px[4], q1 = px[5], q2 = px[6], q3 = px[7];
    int ap, aq, tc, d;
    if (bs == 0) return;
    if (!(iabs(p0 - q0) < alpha && iabs(p1 - p0) < beta && iabs(q1 - q0) < beta)) return;
    ap = iabs(p2 - p0);
    aq = iabs(q2 - q0);
    if (bs < 4) begin
      tc = chroma ? tc0 + 1 : tc0 + (ap < beta) + (aq < beta);
      d  = iclip(-tc, tc, fshr(4 * (q0 - p0) + (p1 - q1) + 4, 3));
      px[3] = iclip(0, 255, p0 + d);
      px[4] = iclip(0, 255, q0 - d);
      if (!chroma && ap < beta) px[2] = p1 + iclip(-tc0, tc0, fshr(p2 + fshr(p0 + q0 + 1, 1) - 2 * p1, 1));
      if (!chroma && aq < beta) px[5] = q1 + iclip(-tc0, tc0, fshr(q2 + fshr(p0 + q0 + 1, 1) - 2 * q1, 1));
    end else begin
      if (!chroma && ap < beta && iabs(p0 - q0) < (alpha / 4 + 2)) begin
        px[3] = (p2 + 2 * p1 + 2 * p0 + 2 * q0 + q1 + 4) / 8;
        px[2] = (p2 + p1 + p0 + q0 + 2) / 4;
        px[1] = (2 * p3 + 3 * p2 + p1 + p0 + q0 + 4) / 8;
      end else
        px[3] = (2 * p1 + p0 + q1 + 2) / 4;
      if (!chroma && aq < beta && iabs(p0 - q0) < (alpha / 4 + 2)) begin
        px[4] = (p1 + 2 * p0 + 2 * q0 + 2 * q1 + q2 + 4) / 8;
        px[5] = (p0 + q0 + q1 + q2 + 2) / 4;
        px[6] = (2 * q3 + 3 * q2 + q1 + q0 + p0 + 4) / 8;
      end else
        px[4] = (2 * q1 + q0 + p1 + 2) / 4;
    end
  endfunction

endpackage
