// tb_h264_decoder_top: end-to-end test of the decoder core at its default
// parameters.
//
// A sequence of macroblocks, intra and inter mixed, is generated first.  For
// each 4x4 luma block the testbench draws coefficients, a QP and an nC, and
// encodes the block with its own CAVLC encoder (some blocks preceded by an
// Exp-Golomb symbol); the whole stream is written into the Bitstream SRAM
// word by word as space frees up.  Intra blocks get a random mode, sent as
// the mode-prediction syntax (flag / remaining mode) with random neighbour
// modes, and their neighbour pixels from the reconstruction computed here;
// inter macroblocks are split into random partitions (16x16, 16x8, 8x16 or
// 8x8) with random reference positions and quarter-sample fractions in a
// 64x64 reference frame held here, served through a row-request memory model
// with random latency.
// The expected pixels come from models written here: the nine Intra4x4
// modes on the edge line, the 6-tap/bilinear interpolation on a half-sample
// grid, the dequantisation and the inverse transform as basis sums, and the
// clip.
//
// Every reconstructed row on rec_* is checked against the model.  After each
// macroblock the testbench reads its 64 luma words back from the DEBLOCK
// SRAMs through the bus port, runs the deblocking engine with random
// boundary strengths and checks the number of filtered segments; while that
// is going on rec_ready is held low, so the pipeline stalls.  rec_ready is also
// dropped at random.  Each mechanism of the design is counted and a failure
// is counted for any that never happened: intra and inter blocks, intra/inter
// switches between macroblocks, output stalls, a full Bitstream SRAM,
// Exp-Golomb symbols, blocks with several levels decoded per cycle, parsing
// overlapped with reconstruction, INTER_PRED of one macroblock overlapped
// with reconstruction of the previous one (ping-pong buffer), missing
// top-right neighbours, integer-vector partitions, partitions whose blocks
// share one fetched window, filtered and skipped deblocking segments and bS 4
// edges.  The number of reference pixels read must equal the sum of the
// partitions' union windows.  The intra-mode and motion-vector predictors are checked on random
// inputs each macroblock.
module tb_h264_decoder_top;
  import h264_pkg::*;

  localparam int NMB = 10;
  localparam int NSYM = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bs_wr_en, bs_full; logic [31:0] bs_wr_data;
  logic blk_valid, blk_ready, blk_intra, blk_buf, sym_valid;
  cavld_cmd_t blk_cmd; logic [5:0] blk_qp; logic [3:0] blk_idx;
  logic signed [17:0] sym_value; logic [4:0] blk_total_coeff;
  logic ip_valid, ip_ready, ip_a_avail, ip_a_is_i4, ip_b_avail, ip_b_is_i4, ip_prev_flag;
  i4_mode_e ip_a_mode, ip_b_mode, ip_mode; logic [2:0] ip_rem_mode;
  pixel_t ip_top [8]; pixel_t ip_left [4]; pixel_t ip_corner;
  logic ip_top_avail, ip_left_avail, ip_tr_avail;
  mv_t mv_nb [4]; logic signed [4:0] mv_ref_nb [4]; logic signed [4:0] mv_ref_cur;
  logic [1:0] mv_shape; logic mv_part_idx; mv_t mv_pred_out;
  logic rf_valid, rf_ready, rf_buf; logic [10:0] rf_ref_x; logic [9:0] rf_ref_y;
  logic [1:0] rf_dx, rf_dy; logic [2:0] rf_w4, rf_h4; logic [3:0] rf_pos;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid; logic [10:0] mem_req_x; logic [9:0] mem_req_y;
  logic [4:0] mem_req_len; pixel_t mem_rsp_pix [21]; logic [31:0] ref_fetched;
  logic rec_valid, rec_ready; pixel_t rec_pix [4]; logic [3:0] rec_pos; logic [1:0] rec_row;
  logic db_bus_en, db_bus_we, db_bus_bank, db_bus_gnt; logic [6:0] db_bus_addr;
  logic [31:0] db_bus_wdata, db_bus_rdata;
  logic db_start, db_left_avail, db_top_avail, db_busy, db_done;
  logic [2:0] db_bs_v [4][4]; logic [2:0] db_bs_h [4][4];
  logic [5:0] db_qp [3]; logic [5:0] db_qpc [3]; logic signed [4:0] db_off_a, db_off_b;
  logic [15:0] db_seg_filtered;

  h264_decoder_top dut (.*);

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ CAVLC encoder
  int unsigned L0 [68] = '{1,0,0,0,6,2,0,0,8,6,3,0,9,8,7,5,10,9,8,6,11,10,9,7,13,11,10,8,13,13,11,9,13,13,13,10,14,14,13,11,14,14,14,13,15,15,14,14,15,15,15,14,16,15,15,15,16,16,16,15,16,16,16,16,16,16,16,16};
  int unsigned B0 [68] = '{1,0,0,0,5,1,0,0,7,4,1,0,7,6,5,3,7,6,5,3,7,6,5,4,15,6,5,4,11,14,5,4,8,10,13,4,15,14,9,4,11,10,13,12,15,14,9,12,11,10,13,8,15,1,9,12,11,14,13,8,7,10,9,12,4,6,5,8};
  int unsigned L1 [68] = '{2,0,0,0,6,2,0,0,6,5,3,0,7,6,6,4,8,6,6,4,8,7,7,5,9,8,8,6,11,9,9,6,11,11,11,7,12,11,11,9,12,12,12,11,12,12,12,11,13,13,13,12,13,13,13,13,13,14,13,13,14,14,14,13,14,14,14,14};
  int unsigned B1 [68] = '{3,0,0,0,11,2,0,0,7,7,3,0,7,10,9,5,7,6,5,4,4,6,5,6,7,6,5,8,15,6,5,4,11,14,13,4,15,10,9,4,11,14,13,12,8,10,9,8,15,14,13,12,11,10,9,12,7,11,6,8,9,8,10,1,7,6,5,4};
  int unsigned L2 [68] = '{4,0,0,0,6,4,0,0,6,5,4,0,6,5,5,4,7,5,5,4,7,5,5,4,7,6,6,4,7,6,6,4,8,7,7,5,8,8,7,6,9,8,8,7,9,9,8,8,9,9,9,8,10,9,9,9,10,10,10,10,10,10,10,10,10,10,10,10};
  int unsigned B2 [68] = '{15,0,0,0,15,14,0,0,11,15,13,0,8,12,14,12,15,10,11,11,11,8,9,10,9,14,13,9,8,10,9,8,15,14,13,13,11,14,10,12,15,10,13,12,11,14,9,12,8,10,13,8,13,7,9,12,9,12,11,10,5,8,7,6,1,4,3,2};
  bit bits [$];

  task automatic put(int unsigned v, int n);
    for (int i = n - 1; i >= 0; i--) bits.push_back(v[i]);
  endtask

  function automatic int rb_code(int zl, int run, output int code);
    int len;
    if (zl > 6) begin
      if (run < 7) begin code = 7 - run; len = 3; end
      else begin code = 1; len = run - 3; end
    end else case (zl)
      1: begin code = (run == 0) ? 1 : 0; len = 1; end
      2: begin code = (run == 0) ? 1 : (run == 1) ? 1 : 0; len = (run == 0) ? 1 : 2; end
      3: begin code = 3 - run; len = 2; end
      4: begin if (run < 3) begin code = 3 - run; len = 2; end else begin code = (run == 3) ? 1 : 0; len = 3; end end
      5: begin if (run < 2) begin code = 3 - run; len = 2; end else begin code = 5 - run; len = 3; end end
      default: begin
        int c6 [7] = '{3, 0, 1, 3, 2, 5, 4};
        code = c6[run]; len = (run == 0) ? 2 : 3;
      end
    endcase
    return len;
  endfunction

  // encodes one 16-coefficient luma block (raster order); returns the number
  // of levels that are not trailing ones
  task automatic encode_blk(input int nc, input int c [16], output int nl);
    int n, tc, t1, tz, sl, zl, lc, ti;
    int s [16];
    int nz [$];
    for (int i = 0; i < 16; i++) s[i] = c[zigzag4x4(4'(i))];
    for (int i = 15; i >= 0; i--) if (s[i] != 0) nz.push_back(i);
    tc = nz.size();
    t1 = 0;
    for (int i = 0; i < tc && t1 < 3; i++) begin
      if (s[nz[i]] == 1 || s[nz[i]] == -1) t1++; else break;
    end
    ti = tc * 4 + t1;
    if (nc < 2)      put(B0[ti], L0[ti]);
    else if (nc < 4) put(B1[ti], L1[ti]);
    else if (nc < 8) put(B2[ti], L2[ti]);
    else             put((tc == 0) ? 3 : ((tc - 1) << 2) | t1, 6);
    nl = 0;
    if (tc == 0) return;
    for (int i = 0; i < t1; i++) put((s[nz[i]] < 0) ? 1 : 0, 1);
    sl = (tc > 10 && t1 < 3) ? 1 : 0;
    for (int i = t1; i < tc; i++) begin
      int v, mag;
      v = s[nz[i]];
      mag = (v < 0) ? -v : v;
      lc = (v > 0) ? 2 * v - 2 : -2 * v - 1;
      if (i == t1 && t1 < 3) lc -= 2;
      if (sl == 0) begin
        if (lc < 14)      put(1, lc + 1);
        else if (lc < 30) begin put(1, 15); put(lc - 14, 4); end
        else              begin put(1, 16); put(lc - 30, 12); end
      end else begin
        if (lc < (15 << sl)) begin put(1, (lc >> sl) + 1); put(lc & ((1 << sl) - 1), sl); end
        else                 begin put(1, 16); put(lc - (15 << sl), 12); end
      end
      if (sl == 0) sl = 1;
      if (mag > (3 << (sl - 1)) && sl < 6) sl++;
    end
    tz = nz[0] + 1 - tc;
    if (tc < 16) begin
      logic [7:0] r;
      bit found;
      found = 0;
      for (int l = 1; l <= 9 && !found; l++)
        for (int cv = 0; cv < (1 << l) && !found; cv++) begin
          r = total_zeros_lut(4'(tc), 16'(cv << (16 - l)));
          if (int'(r[7:4]) == l && int'(r[3:0]) == tz) begin put(cv, l); found = 1; end
        end
    end
    zl = tz;
    for (int i = 0; i < tc - 1 && zl > 0; i++) begin
      int run, code, len;
      run = nz[i] - nz[i + 1] - 1;
      len = rb_code(zl > 6 ? 7 : zl, run, code);
      put(code, len);
      zl -= run;
    end
    nl = tc - t1;
  endtask

  task automatic put_eg(int cn);
    int m;
    m = 0;
    while (((cn + 1) >> (m + 1)) != 0) m++;
    put(0, m); put(cn + 1, m + 1);
  endtask

  // ------------------------------------------------------------ pixel models
  function automatic int clip(int v); return (v < 0) ? 0 : (v > 255) ? 255 : v; endfunction

  int e [-5:8];
  function automatic int t3(int c); return (e[c - 1] + 2 * e[c] + e[c + 1] + 2) >> 2; endfunction
  function automatic int t2(int a); return (e[a] + e[a + 1] + 1) >> 1; endfunction
  // Intra4x4 sample (x, y) of mode m, top and left available
  function automatic int intra_px(int m, int x, int y);
    int z;
    case (m)
      0: return e[x];
      1: return e[-2 - y];
      2: return (e[0] + e[1] + e[2] + e[3] + e[-2] + e[-3] + e[-4] + e[-5] + 4) >> 3;
      3: return t3(x + y + 1);
      4: return t3(x - y - 1);
      5: begin
        z = 2 * x - y;
        if (z >= 0 && z % 2 == 0) return t2(x - (y >> 1) - 1);
        if (z > 0) return t3(x - (y >> 1) - 1);
        if (z == -1) return t3(-1);
        return t3(-y);
      end
      6: begin
        z = 2 * y - x;
        if (z >= 0 && z % 2 == 0) return t2((x >> 1) - y - 2);
        if (z > 0) return t3((x >> 1) - y - 1);
        if (z == -1) return t3(-1);
        return t3(x - 2);
      end
      7: return (y % 2 == 0) ? t2(x + (y >> 1)) : t3(x + (y >> 1) + 1);
      default: begin
        z = x + 2 * y;
        if (z > 5) return e[-5];
        if (z == 5) return (e[-4] + 3 * e[-5] + 2) >> 2;
        if (z % 2 == 0) return (e[-2 - y - (x >> 1)] + e[-3 - y - (x >> 1)] + 1) >> 1;
        return t3(-3 - y - (x >> 1));
      end
    endcase
  endfunction

  int W [9][9];
  int H2 [18][18];
  function automatic int t6(int a, int b, int c, int d, int f, int g); return a - 5*b + 20*c + 20*d - 5*f + g; endfunction
  task automatic half_grid();
    int hb [9][9];
    for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) H2[2*r][2*c] = W[r][c];
    for (int r = 0; r < 9; r++) for (int c = 2; c < 6; c++) hb[r][c] = t6(W[r][c-2], W[r][c-1], W[r][c], W[r][c+1], W[r][c+2], W[r][c+3]);
    for (int r = 2; r < 7; r++) for (int c = 2; c < 7; c++) begin
      if (c < 6) H2[2*r][2*c+1] = clip((hb[r][c] + 16) >>> 5);
      if (r < 6) H2[2*r+1][2*c] = clip((t6(W[r-2][c], W[r-1][c], W[r][c], W[r+1][c], W[r+2][c], W[r+3][c]) + 16) >>> 5);
      if (r < 6 && c < 6) H2[2*r+1][2*c+1] = clip((t6(hb[r-2][c], hb[r-1][c], hb[r][c], hb[r+1][c], hb[r+2][c], hb[r+3][c]) + 512) >>> 10);
    end
  endtask
  function automatic int quarter(int Y, int X);
    int fy, fx, y0, x0;
    fy = Y % 4; fx = X % 4; y0 = Y / 4; x0 = X / 4;
    if (fx % 2 == 0 && fy % 2 == 0) return H2[2*y0 + fy/2][2*x0 + fx/2];
    if (fy % 2 == 0) return (H2[2*y0 + fy/2][2*x0 + fx/2] + H2[2*y0 + fy/2][2*x0 + fx/2 + 1] + 1) >> 1;
    if (fx % 2 == 0) return (H2[2*y0 + fy/2][2*x0 + fx/2] + H2[2*y0 + fy/2 + 1][2*x0 + fx/2] + 1) >> 1;
    return (H2[2*y0 + (fy == 3 ? 2 : 0)][2*x0 + 1] + H2[2*y0 + 1][2*x0 + (fx == 3 ? 2 : 0)] + 1) >> 1;
  endfunction

  function automatic int vtab(int qm, int i);
    int t [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16}, '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};
    int r, c;
    r = i / 4; c = i % 4;
    if (r % 2 == 0 && c % 2 == 0) return t[qm][0];
    if (r % 2 == 1 && c % 2 == 1) return t[qm][1];
    return t[qm][2];
  endfunction
  function automatic int basis(int k, int n);
    int b [4][4] = '{'{2, 2, 2, 2}, '{2, 1, -1, -2}, '{2, -2, -2, 2}, '{1, -2, 2, -1}};
    return b[k][n];
  endfunction
  // residue of one block: dequantisation then rows and columns of the inverse transform
  task automatic residue(input int c [16], input int qp, output int res [16]);
    int q [16], h [16];
    for (int i = 0; i < 16; i++) q[i] = (c[i] * vtab(qp % 6, i)) <<< (qp / 6);
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
      int s, bk;
      s = 0;
      for (int k = 0; k < 4; k++) begin
        bk = basis(k, x);
        s += (bk == 1 || bk == -1) ? bk * (q[4*y+k] >>> 1) : (bk / 2) * q[4*y+k];
      end
      h[4*y+x] = s;
    end
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
      int s, bk;
      s = 0;
      for (int k = 0; k < 4; k++) begin
        bk = basis(k, y);
        s += (bk == 1 || bk == -1) ? bk * (h[4*k+x] >>> 1) : (bk / 2) * h[4*k+x];
      end
      res[4*y+x] = (s + 32) >>> 6;
    end
  endtask

  // --------------------------------------------------------- stimulus store
  bit   mb_intra [NMB];
  int   rec_exp [NMB][16][16];     // [mb][row][col] reconstructed luma
  // per block, in decoding order
  int   b_qp [NMB][16], b_nc [NMB][16], b_eg [NMB][16], b_mode [NMB][16];
  int   b_dx [NMB][16], b_dy [NMB][16], b_tra [NMB][16];
  int   b_am [NMB][16], b_bm [NMB][16], b_flag [NMB][16], b_rem [NMB][16];
  // inter partitions: count, size in 4x4 blocks, top-left block, reference position, fraction
  int   p_n [NMB], p_w4 [NMB][4], p_h4 [NMB][4], p_bx [NMB][4], p_by [NMB][4];
  int   p_rx [NMB][4], p_ry [NMB][4], p_dx [NMB][4], p_dy [NMB][4];
  localparam int FW = 64, FH = 64;
  int   F [FH][FW];                  // reference frame
  int   exp_fetched = 0, naive_fetched = 0, n_int_mv = 0, n_reuse = 0;
  int   b_top [NMB][16][8], b_left [NMB][16][4], b_corner [NMB][16];
  int   b_multi [NMB][16];
  int   eg_exp [$];
  int   n_multi = 0, n_tr_sub = 0;

  task automatic gen_parts(int m);
    int shape;
    shape = $urandom_range(0, 3);   // 16x16, 16x8, 8x16, four 8x8
    p_n[m] = (shape == 0) ? 1 : (shape == 3) ? 4 : 2;
    for (int i = 0; i < p_n[m]; i++) begin
      p_w4[m][i] = (shape == 0 || shape == 1) ? 4 : 2;
      p_h4[m][i] = (shape == 0 || shape == 2) ? 4 : 2;
      p_bx[m][i] = (shape == 2) ? 2 * i : (shape == 3) ? 2 * (i % 2) : 0;
      p_by[m][i] = (shape == 1) ? 2 * i : (shape == 3) ? 2 * (i / 2) : 0;
      p_rx[m][i] = $urandom_range(2, FW - 4 * p_w4[m][i] - 4);
      p_ry[m][i] = $urandom_range(2, FH - 4 * p_h4[m][i] - 4);
      p_dx[m][i] = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, 3);
      p_dy[m][i] = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, 3);
      if (p_dx[m][i] == 0 && p_dy[m][i] == 0) n_int_mv++;
      if (p_w4[m][i] * p_h4[m][i] > 1) n_reuse++;
      exp_fetched += (4 * p_w4[m][i] + (p_dx[m][i] != 0 ? 5 : 0)) * (4 * p_h4[m][i] + (p_dy[m][i] != 0 ? 5 : 0));
      naive_fetched += 81 * p_w4[m][i] * p_h4[m][i];
    end
  endtask

  task automatic gen_mb(int m);
    int ct [-1:23], cl [16], ctx_tr;
    int R [16][16];
    if (!mb_intra[m]) gen_parts(m);
    ctx_tr = $urandom_range(0, 1);
    for (int i = -1; i < 24; i++) ct[i] = $urandom_range(40, 210);
    for (int i = 0; i < 16; i++) cl[i] = $urandom_range(40, 210);
    for (int k = 0; k < 16; k++) begin
      int pos, bx, by, x0, y0, c [16], res [16], pred [16], qp, nl;
      pos = int'(blk_pos(4'(k))); bx = pos % 4; by = pos / 4; x0 = 4 * bx; y0 = 4 * by;
      qp = $urandom_range(0, 51);
      b_qp[m][k] = qp; b_nc[m][k] = $urandom_range(0, 16);
      for (int i = 0; i < 16; i++) begin
        int r;
        r = $urandom_range(0, 9);
        c[i] = (r < 5) ? 0 : (r < 8) ? int'($urandom_range(0, 6)) - 3 : int'($urandom_range(0, 200)) - 100;
        if (qp > 30) c[i] = c[i] >>> 3;
      end
      // optional Exp-Golomb symbol before the block
      b_eg[m][k] = ($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 2)) : 0;  // 0 none, 1 ue, 2 se
      if (b_eg[m][k] == 1) begin
        int v; v = $urandom_range(0, 700); put_eg(v); eg_exp.push_back(v);
      end else if (b_eg[m][k] == 2) begin
        int v; v = int'($urandom_range(0, 200)) - 100; put_eg((v > 0) ? 2 * v - 1 : -2 * v); eg_exp.push_back(v);
      end
      encode_blk(b_nc[m][k], c, nl);
      b_multi[m][k] = (nl >= NSYM);
      if (nl >= NSYM) n_multi++;
      residue(c, qp, res);
      if (mb_intra[m]) begin
        int md, am, bm, pm;
        for (int i = 0; i < 8; i++)
          b_top[m][k][i] = (y0 == 0) ? ct[x0 + i] : (x0 + i < 16) ? R[y0 - 1][x0 + i] : 0;
        for (int j = 0; j < 4; j++) b_left[m][k][j] = (x0 == 0) ? cl[y0 + j] : R[y0 + j][x0 - 1];
        b_corner[m][k] = (y0 == 0) ? ct[x0 - 1] : (x0 == 0) ? cl[y0 - 1] : R[y0 - 1][x0 - 1];
        if (y0 == 0) b_tra[m][k] = (x0 < 12) ? 1 : ctx_tr;
        else begin
          // block above-right already decoded?  decoding index of raster (bx+1, by-1)
          int ar;
          ar = ((by - 1) / 2) * 8 + ((bx + 1) / 2) * 4 + ((by - 1) % 2) * 2 + (bx + 1) % 2;
          b_tra[m][k] = (bx < 3) && (ar < k);
        end
        if (!b_tra[m][k]) n_tr_sub++;
        for (int i = 0; i < 4; i++) e[i] = b_top[m][k][i];
        for (int i = 4; i < 8; i++) e[i] = b_tra[m][k] ? b_top[m][k][i] : b_top[m][k][3];
        e[8] = e[7]; e[-1] = b_corner[m][k];
        for (int j = 0; j < 4; j++) e[-2 - j] = b_left[m][k][j];
        md = $urandom_range(0, 8);
        am = $urandom_range(0, 8); bm = $urandom_range(0, 8);
        pm = (am < bm) ? am : bm;
        b_mode[m][k] = md; b_am[m][k] = am; b_bm[m][k] = bm;
        b_flag[m][k] = (md == pm);
        b_rem[m][k] = (md < pm) ? md : md - 1;
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) pred[4*y+x] = intra_px(md, x, y);
      end else begin
        int pi, wy, wx;
        pi = 0;
        for (int i = 0; i < p_n[m]; i++)
          if (bx >= p_bx[m][i] && bx < p_bx[m][i] + p_w4[m][i] && by >= p_by[m][i] && by < p_by[m][i] + p_h4[m][i]) pi = i;
        // 9x9 window of this block in the reference frame
        wy = p_ry[m][pi] + 4 * (by - p_by[m][pi]) - 2; wx = p_rx[m][pi] + 4 * (bx - p_bx[m][pi]) - 2;
        for (int r = 0; r < 9; r++) for (int cc = 0; cc < 9; cc++) W[r][cc] = F[wy + r][wx + cc];
        b_dx[m][pos] = p_dx[m][pi]; b_dy[m][pos] = p_dy[m][pi];
        half_grid();
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
          pred[4*y+x] = quarter(4 * (y + 2) + b_dy[m][pos], 4 * (x + 2) + b_dx[m][pos]);
      end
      for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
        R[y0 + y][x0 + x] = clip(pred[4*y+x] + res[4*y+x]);
        rec_exp[m][y0 + y][x0 + x] = R[y0 + y][x0 + x];
      end
    end
  endtask

  // ------------------------------------------------------ mechanism counters
  int n_intra_blk = 0, n_inter_blk = 0, n_switch = 0, n_stall = 0, n_bs_full = 0;
  int n_eg = 0, n_overlap = 0, n_pingpong = 0, n_db_filt = 0, n_db_skip = 0, n_bs4 = 0;
  int rec_rows [NMB];
  int rec_mb = 0;          // macroblock whose rows are arriving
  int mb_done = -1;        // last macroblock whose rows are all out
  int inter_done = -1;     // last macroblock whose INTER_PRED has finished
  int inter_mb = -1;       // macroblock INTER_PRED is working on
  bit db_phase = 0;
  bit stream_left = 1;

  // output checker (pre-edge values)
  always @(posedge clk) if (rst_n) begin
    if (rec_valid && !rec_ready) n_stall++;
    if (bs_full && stream_left) n_bs_full++;
    if (blk_valid && blk_ready && rec_valid && rec_ready) n_overlap++;
    if (mem_req_valid && mem_req_ready && rec_valid && rec_mb < NMB && rec_mb != inter_mb) n_pingpong++;
    if (sym_valid) begin
      n_eg++;
      checks++;
      if (eg_exp.size() == 0 || int'(sym_value) != eg_exp[0]) begin
        failures++; $display("FAIL symbol %0d", sym_value);
      end
      if (eg_exp.size() != 0) void'(eg_exp.pop_front());
    end
    if (rec_valid && rec_ready) begin
      int y0, x0;
      y0 = 4 * int'(rec_pos[3:2]) + int'(rec_row); x0 = 4 * int'(rec_pos[1:0]);
      for (int x = 0; x < 4; x++) begin
        checks++;
        if (int'(rec_pix[x]) != rec_exp[rec_mb][y0][x0 + x]) begin
          failures++;
          if (failures < 30) $display("FAIL mb %0d pos %0d row %0d x %0d: got %0d exp %0d", rec_mb, rec_pos, rec_row, x, rec_pix[x], rec_exp[rec_mb][y0][x0 + x]);
        end
      end
      if (mb_intra[rec_mb]) n_intra_blk++; else n_inter_blk++;
      rec_rows[rec_mb]++;
      if (rec_rows[rec_mb] == 64) begin mb_done = rec_mb; rec_mb++; end
    end
  end

  // frame memory model: in-order row responses after 1..3 cycles
  int mq_x [$], mq_y [$], mq_l [$], mq_t [$];
  int mcyc = 0;
  always @(posedge clk) begin
    mcyc++;
    if (mem_req_valid && mem_req_ready) begin
      mq_x.push_back(int'(mem_req_x)); mq_y.push_back(int'(mem_req_y)); mq_l.push_back(int'(mem_req_len));
      mq_t.push_back(mcyc + int'($urandom_range(1, 3)));
    end
  end
  always @(negedge clk) if (rst_n) begin
    mem_req_ready = ($urandom_range(0, 3) != 0);
    mem_rsp_valid = 0;
    if (mq_t.size() != 0 && mq_t[0] <= mcyc) begin
      for (int c = 0; c < 21; c++) mem_rsp_pix[c] = (c < mq_l[0]) ? 8'(F[mq_y[0]][mq_x[0] + c]) : 8'd0;
      mem_rsp_valid = 1;
      void'(mq_x.pop_front()); void'(mq_y.pop_front()); void'(mq_l.pop_front()); void'(mq_t.pop_front());
    end
  end

  // handshake observers
  logic blk_acc, ip_acc, rf_acc;
  always @(posedge clk) begin
    blk_acc <= blk_valid && blk_ready;
    ip_acc  <= ip_valid && ip_ready;
    rf_acc  <= rf_valid && rf_ready;
  end

  // ---------------------------------------------------------------- main
  initial begin
    for (int y = 0; y < FH; y++) for (int x = 0; x < FW; x++)
      F[y][x] = ((x / 8 + y / 8) % 3 == 0) ? int'($urandom_range(0, 255)) : 50 + 2 * x + y + int'($urandom_range(0, 12));
    for (int m = 0; m < NMB; m++) begin
      mb_intra[m] = (m % 3 != 2) ^ (m >= 6);
      rec_rows[m] = 0;
      gen_mb(m);
      if (m > 0 && mb_intra[m] != mb_intra[m - 1]) n_switch++;
    end
    for (int i = 0; i < 512; i++) bits.push_back(0);
    bs_wr_en = 0; bs_wr_data = 0; blk_valid = 0; blk_cmd = '0; blk_qp = 0; blk_idx = 0; blk_intra = 0; blk_buf = 0;
    ip_valid = 0; ip_a_avail = 1; ip_a_is_i4 = 1; ip_b_avail = 1; ip_b_is_i4 = 1; ip_a_mode = I4_VERTICAL; ip_b_mode = I4_VERTICAL;
    ip_prev_flag = 0; ip_rem_mode = 0; ip_corner = 0; ip_top_avail = 1; ip_left_avail = 1; ip_tr_avail = 0;
    for (int i = 0; i < 8; i++) ip_top[i] = 0;
    for (int i = 0; i < 4; i++) ip_left[i] = 0;
    for (int i = 0; i < 4; i++) begin mv_nb[i] = '0; mv_ref_nb[i] = 0; end
    mv_ref_cur = 0; mv_shape = 0; mv_part_idx = 0;
    rf_valid = 0; rf_buf = 0; rf_dx = 0; rf_dy = 0; rf_pos = 0; rf_ref_x = 0; rf_ref_y = 0; rf_w4 = 1; rf_h4 = 1;
    mem_req_ready = 0; mem_rsp_valid = 0;
    for (int c = 0; c < 21; c++) mem_rsp_pix[c] = 0;
    rec_ready = 0;
    db_bus_en = 0; db_bus_we = 0; db_bus_bank = 0; db_bus_addr = 0; db_bus_wdata = 0; db_start = 0;
    db_left_avail = 1; db_top_avail = 1; db_off_a = 0; db_off_b = 0;
    for (int i = 0; i < 3; i++) begin db_qp[i] = 6'd36; db_qpc[i] = 6'd34; end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin db_bs_v[i][j] = 0; db_bs_h[i][j] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      // system bus: stream words into the Bitstream SRAM
      begin
        for (int p = 0; p < bits.size(); p += 32) begin
          logic [31:0] w;
          for (int i = 0; i < 32; i++) w[31 - i] = (p + i < bits.size()) ? bits[p + i] : 1'b0;
          while (bs_full) @(negedge clk);
          bs_wr_en = 1; bs_wr_data = w;
          @(negedge clk);
          bs_wr_en = 0;
          if ($urandom_range(0, 3) == 0) @(negedge clk);
        end
        stream_left = 0;
      end
      // parser commands
      begin
        for (int m = 0; m < NMB; m++) begin
          if (!mb_intra[m]) while (inter_done < m) @(negedge clk);
          for (int k = 0; k < 16; k++) begin
            if (b_eg[m][k] != 0) begin
              blk_cmd.kind = (b_eg[m][k] == 1) ? CMD_UE : CMD_SE; blk_cmd.nc = '0; blk_valid = 1;
              do @(negedge clk); while (!blk_acc);
              blk_valid = 0;
            end
            blk_cmd.kind = CMD_BLK; blk_cmd.nc = 6'(b_nc[m][k]); blk_qp = 6'(b_qp[m][k]);
            blk_idx = 4'(k); blk_intra = mb_intra[m]; blk_buf = 1'(m % 2); blk_valid = 1;
            do @(negedge clk); while (!blk_acc);
            blk_valid = 0;
          end
        end
      end
      // intra neighbours and mode syntax
      begin
        for (int m = 0; m < NMB; m++) if (mb_intra[m]) begin
          for (int k = 0; k < 16; k++) begin
            ip_a_mode = i4_mode_e'(b_am[m][k]); ip_b_mode = i4_mode_e'(b_bm[m][k]);
            ip_prev_flag = b_flag[m][k][0]; ip_rem_mode = 3'(b_rem[m][k]);
            for (int i = 0; i < 8; i++) ip_top[i] = 8'(b_top[m][k][i]);
            for (int j = 0; j < 4; j++) ip_left[j] = 8'(b_left[m][k][j]);
            ip_corner = 8'(b_corner[m][k]); ip_tr_avail = b_tra[m][k][0];
            #1;
            checks++;
            if (int'(ip_mode) != b_mode[m][k]) begin failures++; $display("FAIL intra mode mb %0d blk %0d: %0d exp %0d", m, k, ip_mode, b_mode[m][k]); end
            ip_valid = 1;
            do @(negedge clk); while (!ip_acc);
            ip_valid = 0;
          end
        end
      end
      // INTER_PRED windows, one macroblock ahead of reconstruction
      begin
        for (int m = 0; m < NMB; m++) if (!mb_intra[m]) begin
          while (mb_done < m - 2) @(negedge clk);   // ping-pong half of m-2 is free
          inter_mb = m;
          for (int i = 0; i < p_n[m]; i++) begin
            rf_ref_x = 11'(p_rx[m][i]); rf_ref_y = 10'(p_ry[m][i]); rf_dx = 2'(p_dx[m][i]); rf_dy = 2'(p_dy[m][i]);
            rf_w4 = 3'(p_w4[m][i]); rf_h4 = 3'(p_h4[m][i]); rf_pos = 4'(4 * p_by[m][i] + p_bx[m][i]); rf_buf = 1'(m % 2);
            rf_valid = 1;
            do @(negedge clk); while (!rf_acc);
            rf_valid = 0;
          end
          while (!rf_ready) @(negedge clk);
          repeat (8) @(negedge clk);
          inter_done = m;
        end
        inter_done = NMB;
      end
      // output back-pressure and the DEBLOCK phase after each macroblock
      begin
        int seen;
        seen = -1;
        while (seen < NMB - 1) begin
          @(negedge clk);
          rec_ready = ($urandom_range(0, 9) < 8);
          if (mb_done > seen) begin
            seen = mb_done;
            rec_ready = 0;
            deblock_mb(seen);
          end
        end
      end
      // motion vector and intra mode predictors on random inputs
      begin
        for (int t = 0; t < 300; t++) begin
          int ax, bx_, cx, ay, by_, cy, ra, rb, rc, ec, ex, ey, match, sel;
          @(negedge clk);
          ax = int'($urandom_range(0, 200)) - 100; bx_ = int'($urandom_range(0, 200)) - 100; cx = int'($urandom_range(0, 200)) - 100;
          ay = int'($urandom_range(0, 200)) - 100; by_ = int'($urandom_range(0, 200)) - 100; cy = int'($urandom_range(0, 200)) - 100;
          ra = $urandom_range(0, 2); rb = $urandom_range(0, 2); rc = $urandom_range(0, 2); ec = $urandom_range(0, 2);
          mv_nb[0] = '{x: 14'(ax), y: 14'(ay)}; mv_nb[1] = '{x: 14'(bx_), y: 14'(by_)};
          mv_nb[2] = '{x: 14'(cx), y: 14'(cy)}; mv_nb[3] = '0;
          mv_ref_nb[0] = 5'(ra); mv_ref_nb[1] = 5'(rb); mv_ref_nb[2] = 5'(rc); mv_ref_nb[3] = 5'(0);
          mv_ref_cur = 5'(ec); mv_shape = 0; mv_part_idx = 0;
          match = (ra == ec) + (rb == ec) + (rc == ec);
          if (match == 1) begin
            sel = (ra == ec) ? 0 : (rb == ec) ? 1 : 2;
            ex = (sel == 0) ? ax : (sel == 1) ? bx_ : cx; ey = (sel == 0) ? ay : (sel == 1) ? by_ : cy;
          end else begin
            ex = ax + bx_ + cx - ((ax > bx_ ? (ax > cx ? ax : cx) : (bx_ > cx ? bx_ : cx))) - ((ax < bx_ ? (ax < cx ? ax : cx) : (bx_ < cx ? bx_ : cx)));
            ey = ay + by_ + cy - ((ay > by_ ? (ay > cy ? ay : cy) : (by_ > cy ? by_ : cy))) - ((ay < by_ ? (ay < cy ? ay : cy) : (by_ < cy ? by_ : cy)));
          end
          #1;
          checks++;
          if (int'(mv_pred_out.x) != ex || int'(mv_pred_out.y) != ey) begin
            failures++; $display("FAIL mv pred (%0d,%0d) exp (%0d,%0d)", mv_pred_out.x, mv_pred_out.y, ex, ey);
          end
        end
      end
    join
    // every mechanism must have happened
    check_seen("intra rows", n_intra_blk);
    check_seen("inter rows", n_inter_blk);
    check_seen("intra/inter switches", n_switch);
    check_seen("output stalls", n_stall);
    check_seen("Bitstream SRAM full", n_bs_full);
    check_seen("Exp-Golomb symbols", n_eg);
    check_seen("multi-level blocks", n_multi);
    check_seen("parse/reconstruct overlap", n_overlap);
    check_seen("ping-pong overlap", n_pingpong);
    check_seen("top-right substitution", n_tr_sub);
    check_seen("integer-vector partitions", n_int_mv);
    check_seen("partitions sharing one fetched window", n_reuse);
    $display("  reference pixels read %0d, separate 9x9 windows would read %0d", ref_fetched, naive_fetched);
    checks++;
    if (int'(ref_fetched) != exp_fetched) begin failures++; $display("FAIL reference pixels read %0d exp %0d", ref_fetched, exp_fetched); end
    check_seen("filtered segments", n_db_filt);
    check_seen("skipped segments", n_db_skip);
    check_seen("bS 4 edges", n_bs4);
    checks++;
    if (rec_mb != NMB || eg_exp.size() != 0) begin failures++; $display("FAIL %0d macroblocks out, %0d symbols left", rec_mb, eg_exp.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_seen(string what, int n);
    $display("  %s: %0d", what, n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  // read the macroblock back from the DEBLOCK SRAMs, then filter it
  task automatic deblock_mb(int m);
    int exp_segs, visited, cyc;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 16; r++) begin
      logic [31:0] ew;
      for (int x = 0; x < 4; x++) ew[8*x +: 8] = 8'(rec_exp[m][r][4*c + x]);
      db_bus_en = 1; db_bus_we = 0; db_bus_bank = 1'(c % 2); db_bus_addr = 7'((c / 2) * 20 + r + 4);
      @(negedge clk);
      checks++;
      if (!db_bus_gnt || db_bus_rdata != ew) begin
        failures++; $display("FAIL mb %0d deblock SRAM column %0d row %0d: %h exp %h", m, c, r, db_bus_rdata, ew);
      end
    end
    db_bus_en = 0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      db_bs_v[i][j] = 3'($urandom_range(0, (i == 0) ? 4 : 3));
      db_bs_h[i][j] = 3'($urandom_range(0, (i == 0) ? 4 : 3));
      if ($urandom_range(0, 2) == 0) db_bs_h[i][j] = 0;
    end
    db_left_avail = (m % 4 != 1); db_top_avail = (m % 3 != 1);
    // segments the engine must filter: luma 4 edges x 4 segments, chroma 2 x 2,
    // per direction; a chroma line takes the bS of the luma line beside it
    exp_segs = 0; visited = 0;
    for (int k = 0; k < 3; k++) for (int dir = 0; dir < 2; dir++) begin
      int n;
      n = (k == 0) ? 4 : 2;
      for (int ed = 0; ed < n; ed++) begin
        if (ed == 0 && !(dir ? db_top_avail : db_left_avail)) continue;
        for (int s = 0; s < n; s++) begin
          bit any;
          any = 0;
          for (int l = 0; l < 4; l++) begin
            int b, t;
            t = 4 * s + l;
            b = (k == 0) ? (dir ? db_bs_h[ed][s] : db_bs_v[ed][s]) : (dir ? db_bs_h[2*ed][(t*2)/4] : db_bs_v[2*ed][(t*2)/4]);
            if (b != 0) any = 1;
            if (b == 4 && k == 0 && l == 0) n_bs4++;
          end
          visited++;
          if (any) exp_segs++;
        end
      end
    end
    db_start = 1; @(negedge clk); db_start = 0;
    cyc = 0;
    while (!db_done) begin @(negedge clk); cyc++; end
    checks++;
    if (int'(db_seg_filtered) != exp_segs) begin failures++; $display("FAIL mb %0d filtered %0d exp %0d", m, db_seg_filtered, exp_segs); end
    n_db_filt += exp_segs; n_db_skip += visited - exp_segs;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: %0d macroblocks out", rec_mb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
