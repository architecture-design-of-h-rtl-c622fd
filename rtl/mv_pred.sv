// mv_pred: Motion Vector Prediction -- the standard's motion vector predictor
// for one partition from its neighbours A (left), B (above), C (above right)
// and D (above left, used when C is unavailable).
//
// Combinational.  A neighbour that is unavailable has refIdx -1 and a zero
// vector.  If B and C are both unavailable and A is available, A is used for
// all three.  16x8 and 8x16 partitions take the directional neighbour when its
// reference index matches (upper 16x8: B, lower 16x8: A, left 8x16: A,
// right 8x16: C).  Otherwise, if exactly one neighbour has the same reference
// index that vector is used; else the component-wise median.  P_Skip's
// zero-vector rule is not included.
module mv_pred
  import h264_pkg::*;
(
  input  mv_t              mv_a, mv_b, mv_c, mv_d,
  input  logic signed [4:0] ref_a, ref_b, ref_c, ref_d,  // -1: unavailable
  input  logic signed [4:0] ref_cur,
  input  logic [1:0]       shape,   // 0: other, 1: 16x8, 2: 8x16
  input  logic             part_idx, // 0: upper / left, 1: lower / right
  output mv_t              mvp
);
  function automatic logic signed [13:0] med3(input logic signed [13:0] a, b, c);
    if ((a >= b && a <= c) || (a <= b && a >= c)) return a;
    if ((b >= a && b <= c) || (b <= a && b >= c)) return b;
    return c;
  endfunction

  always_comb begin
    mv_t              a, b, c;
    logic signed [4:0] ra, rb, rc;
    int               nmatch;
    a = mv_a; b = mv_b; ra = ref_a; rb = ref_b;
    if (ref_c < 0) begin c = mv_d; rc = ref_d; end
    else begin c = mv_c; rc = ref_c; end
    if (ra < 0) a = '0;
    if (rb < 0) b = '0;
    if (rc < 0) c = '0;
    if (rb < 0 && rc < 0 && ra >= 0) begin b = a; c = a; rb = ra; rc = ra; end
    nmatch = int'(ra == ref_cur) + int'(rb == ref_cur) + int'(rc == ref_cur);
    if (shape == 2'd1 && !part_idx && rb == ref_cur)      mvp = b;
    else if (shape == 2'd1 && part_idx && ra == ref_cur)  mvp = a;
    else if (shape == 2'd2 && !part_idx && ra == ref_cur) mvp = a;
    else if (shape == 2'd2 && part_idx && rc == ref_cur)  mvp = c;
    else if (nmatch == 1)
      mvp = (ra == ref_cur) ? a : (rb == ref_cur) ? b : c;
    else begin
      mvp.x = med3(a.x, b.x, c.x);
      mvp.y = med3(a.y, b.y, c.y);
    end
  end
endmodule
