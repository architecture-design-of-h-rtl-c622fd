// deblock_filter: the 1-D edge filter of the DEBLOCK engine -- parallel in,
// parallel out, one line of 8 pixels across an edge per evaluation.
//
// Combinational.  p[0..3] are the pixels on one side of the edge (p[0]
// nearest the edge), q[0..3] on the other.  From the average QP and the
// slice's filter offsets the standard's thresholds alpha, beta and tC0 are
// looked up; the line is filtered when bS > 0 and |p0-q0| < alpha,
// |p1-p0| < beta, |q1-q0| < beta.  bS 1..3 applies the clipped delta filter
// (and, for luma, the p1/q1 corrections); bS 4 applies the strong filter.
// For chroma only p0 and q0 change.  The outputs are p'[0..2] and q'[0..2];
// p3 and q3 never change.  The filter equations are the standard's; the
// document gives the unit's place (two of them share the 8x4 pixel array).
module deblock_filter
  import h264_pkg::*;
(
  input  pixel_t            p [4],
  input  pixel_t            q [4],
  input  logic [2:0]        bs,
  input  logic              chroma,
  input  logic [5:0]        qp_av,
  input  logic signed [4:0] off_a,
  input  logic signed [4:0] off_b,
  output pixel_t            pf [3],
  output pixel_t            qf [3],
  output logic              filtered
);
  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction
  function automatic int clip3(input int lo, input int hi, input int v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  always_comb begin
    int ia, ib, alpha, beta, tc0, tc, ap, aq, delta;
    int p0, p1, p2, p3, q0, q1, q2, q3;
    p0 = int'(p[0]); p1 = int'(p[1]); p2 = int'(p[2]); p3 = int'(p[3]);
    q0 = int'(q[0]); q1 = int'(q[1]); q2 = int'(q[2]); q3 = int'(q[3]);
    ia = clip3(0, 51, int'(qp_av) + int'(off_a));
    ib = clip3(0, 51, int'(qp_av) + int'(off_b));
    alpha = int'(db_alpha(6'(ia)));
    beta  = int'(db_beta(6'(ib)));
    tc0   = int'(db_tc0(6'(ia), bs));
    ap = iabs(p2 - p0);
    aq = iabs(q2 - q0);
    for (int i = 0; i < 3; i++) begin pf[i] = p[i]; qf[i] = q[i]; end
    tc = 0; delta = 0;
    filtered = (bs != 3'd0) && iabs(p0 - q0) < alpha && iabs(p1 - p0) < beta && iabs(q1 - q0) < beta;
    if (filtered) begin
      if (bs < 3'd4) begin
        tc = chroma ? tc0 + 1 : tc0 + int'(ap < beta) + int'(aq < beta);
        delta = clip3(-tc, tc, (((q0 - p0) * 4) + (p1 - q1) + 4) >>> 3);
        pf[0] = pixel_t'(clip3(0, 255, p0 + delta));
        qf[0] = pixel_t'(clip3(0, 255, q0 - delta));
        if (!chroma && ap < beta) pf[1] = pixel_t'(p1 + clip3(-tc0, tc0, (p2 + ((p0 + q0 + 1) >>> 1) - 2 * p1) >>> 1));
        if (!chroma && aq < beta) qf[1] = pixel_t'(q1 + clip3(-tc0, tc0, (q2 + ((p0 + q0 + 1) >>> 1) - 2 * q1) >>> 1));
      end else begin
        if (!chroma && ap < beta && iabs(p0 - q0) < ((alpha >>> 2) + 2)) begin
          pf[0] = pixel_t'((p2 + 2 * p1 + 2 * p0 + 2 * q0 + q1 + 4) >>> 3);
          pf[1] = pixel_t'((p2 + p1 + p0 + q0 + 2) >>> 2);
          pf[2] = pixel_t'((2 * p3 + 3 * p2 + p1 + p0 + q0 + 4) >>> 3);
        end else
          pf[0] = pixel_t'((2 * p1 + p0 + q1 + 2) >>> 2);
        if (!chroma && aq < beta && iabs(p0 - q0) < ((alpha >>> 2) + 2)) begin
          qf[0] = pixel_t'((p1 + 2 * p0 + 2 * q0 + 2 * q1 + q2 + 4) >>> 3);
          qf[1] = pixel_t'((p0 + q0 + q1 + q2 + 2) >>> 2);
          qf[2] = pixel_t'((2 * q3 + 3 * q2 + q1 + q0 + p0 + 4) >>> 3);
        end else
          qf[0] = pixel_t'((2 * q1 + q0 + p1 + 2) >>> 2);
      end
    end
  end
endmodule
