// tb_bs_calc: random macroblock neighbourhoods against a model of the
// boundary-strength rules.
//
// The model puts the current macroblock's 4x4 blocks and the neighbour
// blocks on a 5x5 grid (row 0 holds the upper neighbour's bottom row, column
// 0 the left neighbour's right column) and walks the edges over that grid,
// so it shares no indexing with the design.  Vectors are drawn close to each
// other (offsets of 0..5 quarter samples from a common vector, either sign) so that the
// threshold of 4 is exercised from both sides, and intra flags, coefficient
// flags and reference indices are sparse so that every strength 0..4 occurs.
// Each of the 32 segments of 3000 macroblocks is checked, and the testbench
// fails if some strength was never produced.
module tb_bs_calc;
  import h264_pkg::*;

  logic              cur_intra, left_intra, top_intra;
  logic [15:0]       nz_cur;
  logic [3:0]        nz_left, nz_top;
  mv_t               mv_cur [16], mv_left [4], mv_top [4];
  logic signed [4:0] ref_cur [16], ref_left [4], ref_top [4];
  logic [2:0]        bs_v [4][4], bs_h [4][4];

  bs_calc dut (.*);

  int checks = 0, failures = 0;
  int seen [5] = '{0, 0, 0, 0, 0};

  // grid model: g_* [row][col], row/col 0 = neighbour, 1..4 = current MB
  logic g_intra [5][5], g_nz [5][5];
  int   g_mx [5][5], g_my [5][5], g_ref [5][5];

  function automatic int model(int r0, int c0, int r1, int c1, bit mb_edge);
    int dx, dy;
    if (g_intra[r0][c0] || g_intra[r1][c1]) return mb_edge ? 4 : 3;
    if (g_nz[r0][c0] || g_nz[r1][c1]) return 2;
    dx = g_mx[r0][c0] - g_mx[r1][c1]; if (dx < 0) dx = -dx;
    dy = g_my[r0][c0] - g_my[r1][c1]; if (dy < 0) dy = -dy;
    if (g_ref[r0][c0] != g_ref[r1][c1] || dx >= 4 || dy >= 4) return 1;
    return 0;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int bx, by;
      bx = int'($urandom_range(0, 400)) - 200; by = int'($urandom_range(0, 400)) - 200;
      cur_intra = ($urandom_range(0, 7) == 0);
      left_intra = ($urandom_range(0, 5) == 0);
      top_intra = ($urandom_range(0, 5) == 0);
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) begin
          g_intra[r][c] = (r == 0 && c == 0) ? 1'b0 : (r == 0) ? top_intra : (c == 0) ? left_intra : cur_intra;
          g_nz[r][c]  = ($urandom_range(0, 4) == 0);
          g_ref[r][c] = ($urandom_range(0, 6) == 0) ? 1 : 0;
          g_mx[r][c]  = bx + (($urandom_range(0, 1) != 0) ? 1 : -1) * int'($urandom_range(0, 5));
          g_my[r][c]  = by + (($urandom_range(0, 1) != 0) ? 1 : -1) * int'($urandom_range(0, 5));
          if ($urandom_range(0, 3) == 0) g_mx[r][c] += ($urandom_range(0, 1) != 0) ? 4 : -4;
        end
      for (int i = 0; i < 16; i++) begin
        nz_cur[i] = g_nz[i / 4 + 1][i % 4 + 1];
        mv_cur[i].x = 14'(g_mx[i / 4 + 1][i % 4 + 1]); mv_cur[i].y = 14'(g_my[i / 4 + 1][i % 4 + 1]);
        ref_cur[i] = 5'(g_ref[i / 4 + 1][i % 4 + 1]);
      end
      for (int i = 0; i < 4; i++) begin
        nz_left[i] = g_nz[i + 1][0]; nz_top[i] = g_nz[0][i + 1];
        mv_left[i].x = 14'(g_mx[i + 1][0]); mv_left[i].y = 14'(g_my[i + 1][0]); ref_left[i] = 5'(g_ref[i + 1][0]);
        mv_top[i].x = 14'(g_mx[0][i + 1]);  mv_top[i].y = 14'(g_my[0][i + 1]);  ref_top[i] = 5'(g_ref[0][i + 1]);
      end
      #1;
      for (int e = 0; e < 4; e++)
        for (int s = 0; s < 4; s++) begin
          int ev, eh;
          ev = model(s + 1, e, s + 1, e + 1, e == 0);
          eh = model(e, s + 1, e + 1, s + 1, e == 0);
          checks += 2;
          seen[ev]++; seen[eh]++;
          if (bs_v[e][s] != 3'(ev)) begin
            failures++;
            if (failures < 10) $display("FAIL mb %0d vertical edge %0d band %0d: %0d exp %0d", t, e, s, bs_v[e][s], ev);
          end
          if (bs_h[e][s] != 3'(eh)) begin
            failures++;
            if (failures < 10) $display("FAIL mb %0d horizontal edge %0d column %0d: %0d exp %0d", t, e, s, bs_h[e][s], eh);
          end
        end
    end
    for (int b = 0; b < 5; b++) begin
      checks++;
      if (seen[b] == 0) begin failures++; $display("FAIL strength %0d never produced", b); end
    end
    $display("strengths 0..4 seen: %0d %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3], seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
