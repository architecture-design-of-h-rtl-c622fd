// tb_mv_pred: directed cases for each rule of the predictor (median, single
// matching reference, directional 16x8 / 8x16, C replaced by D, only A
// available) and random cases against a reference written here.
module tb_mv_pred;
  import h264_pkg::*;
  mv_t mv_a, mv_b, mv_c, mv_d, mvp;
  logic signed [4:0] ref_a, ref_b, ref_c, ref_d, ref_cur;
  logic [1:0] shape; logic part_idx;
  mv_pred dut (.*);
  int checks = 0, failures = 0;

  function automatic int med(int a, int b, int c);
    int lo, hi;
    lo = (a < b) ? a : b; hi = (a < b) ? b : a;
    return (c < lo) ? lo : (c > hi) ? hi : c;
  endfunction

  task automatic check(int ex, int ey, string what);
    #1; checks++;
    if (int'(mvp.x) != ex || int'(mvp.y) != ey) begin
      failures++; $display("FAIL %s: got (%0d,%0d) exp (%0d,%0d)", what, mvp.x, mvp.y, ex, ey);
    end
  endtask

  initial begin
    ref_cur = 0; shape = 0; part_idx = 0;
    mv_a = '{x: 14'sd4, y: -14'sd8}; mv_b = '{x: 14'sd10, y: 14'sd2}; mv_c = '{x: -14'sd3, y: 14'sd7};
    mv_d = '{x: 14'sd100, y: 14'sd100};
    ref_a = 0; ref_b = 0; ref_c = 0; ref_d = 0;
    check(4, 2, "median");
    ref_b = 1; ref_c = 1; check(4, -8, "only A matches");
    ref_a = 1; ref_b = 0; check(10, 2, "only B matches");
    ref_a = 0; ref_b = 0; ref_c = -1; check(10, 2, "C unavailable, D used");  // med(4,10,100), med(-8,2,100)
    ref_b = -1; ref_c = -1; ref_d = -1; check(4, -8, "only A available");
    ref_a = 0; ref_b = 1; ref_c = 1; ref_d = 0;
    shape = 1; part_idx = 0; ref_b = 0; ref_a = 1; check(10, 2, "16x8 upper uses B");
    part_idx = 1; ref_a = 0; ref_b = 1; check(4, -8, "16x8 lower uses A");
    shape = 2; part_idx = 0; check(4, -8, "8x16 left uses A");
    part_idx = 1; ref_a = 1; ref_c = 0; check(-3, 7, "8x16 right uses C");
    // random, rule: substitution then single match or median (shape 0)
    shape = 0;
    for (int i = 0; i < 3000; i++) begin
      int ax, ay, bx, by, cx, cy, ra, rb, rc, n, ex, ey;
      mv_a = '{x: 14'($urandom_range(0, 400) - 200), y: 14'($urandom_range(0, 400) - 200)};
      mv_b = '{x: 14'($urandom_range(0, 400) - 200), y: 14'($urandom_range(0, 400) - 200)};
      mv_c = '{x: 14'($urandom_range(0, 400) - 200), y: 14'($urandom_range(0, 400) - 200)};
      mv_d = '{x: 14'($urandom_range(0, 400) - 200), y: 14'($urandom_range(0, 400) - 200)};
      ref_a = 5'($urandom_range(0, 3) - 1); ref_b = 5'($urandom_range(0, 3) - 1);
      ref_c = 5'($urandom_range(0, 3) - 1); ref_d = 5'($urandom_range(0, 3) - 1);
      ref_cur = 5'($urandom_range(0, 2));
      ra = ref_a; rb = ref_b; rc = (ref_c >= 0) ? ref_c : ref_d;
      ax = (ra < 0) ? 0 : mv_a.x; ay = (ra < 0) ? 0 : mv_a.y;
      bx = (rb < 0) ? 0 : mv_b.x; by = (rb < 0) ? 0 : mv_b.y;
      cx = (ref_c >= 0) ? mv_c.x : mv_d.x; cy = (ref_c >= 0) ? mv_c.y : mv_d.y;
      if (rc < 0) begin cx = 0; cy = 0; end
      if (rb < 0 && rc < 0 && ra >= 0) begin bx = ax; by = ay; cx = ax; cy = ay; rb = ra; rc = ra; end
      n = (ra == ref_cur) + (rb == ref_cur) + (rc == ref_cur);
      if (n == 1) begin
        ex = (ra == ref_cur) ? ax : (rb == ref_cur) ? bx : cx;
        ey = (ra == ref_cur) ? ay : (rb == ref_cur) ? by : cy;
      end else begin ex = med(ax, bx, cx); ey = med(ay, by, cy); end
      check(ex, ey, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
