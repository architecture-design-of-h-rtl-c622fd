// tb_deblock_engine: loads random macroblocks (with their upper and left
// neighbours) into the engine's SRAMs over the bus port, runs the engine and
// reads every word back.  The reference filters pixel planes in the
// standard's edge order (luma vertical edges left to right, then horizontal
// top to bottom, then Cb and Cr) with a 1-D filter written here, using its own
// copy of the word layout.  Checks all 160 words, the number of filtered
// segments and the cycle budget of 11 cycles per filtered segment plus one per
// visited segment.
module tb_deblock_engine;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic bus_en, bus_we, bus_bank; logic [6:0] bus_addr; logic [31:0] bus_wdata, bus_rdata;
  logic start, left_avail, top_avail, busy, done;
  logic [2:0] bs_v [4][4]; logic [2:0] bs_h [4][4];
  logic [5:0] qp_cur, qp_left, qp_top, qpc_cur, qpc_left, qpc_top;
  logic signed [4:0] off_a, off_b; logic [15:0] seg_filtered;
  deblock_engine dut (.*);
  int checks = 0, failures = 0;

  // planes: index [row+4][col+4]
  int Y [20][20]; int C [2][12][12];

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic int c3(int lo, int hi, int v); return v < lo ? lo : v > hi ? hi : v; endfunction
  int AL [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,32,36,40,45,50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
  int BE [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,9,9,10,10,11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
  int T1 [35] = '{0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13};
  int T2 [35] = '{0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,5,5,6,7,8,8,10,11,12,13,15,17};
  int T3 [35] = '{1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13,14,16,18,20,23,25};

  // filter one line L[0..7] = p3 p2 p1 p0 q0 q1 q2 q3 in place
  task automatic fline(ref int L [8], input int b, input int ch, input int qa);
    int ia, ib, al, be, ap, aq, tc0, tc, d, P [4], Q [4];
    for (int i = 0; i < 4; i++) begin P[i] = L[3 - i]; Q[i] = L[4 + i]; end
    ia = c3(0, 51, qa + int'(off_a)); ib = c3(0, 51, qa + int'(off_b)); al = AL[ia]; be = BE[ib];
    if (b == 0 || iabs(P[0] - Q[0]) >= al || iabs(P[1] - P[0]) >= be || iabs(Q[1] - Q[0]) >= be) return;
    ap = iabs(P[2] - P[0]); aq = iabs(Q[2] - Q[0]);
    if (b < 4) begin
      tc0 = (ia < 17) ? 0 : (b == 1) ? T1[ia - 17] : (b == 2) ? T2[ia - 17] : T3[ia - 17];
      tc = ch ? tc0 + 1 : tc0 + (ap < be) + (aq < be);
      d = c3(-tc, tc, ((Q[0] - P[0]) * 4 + (P[1] - Q[1]) + 4) >>> 3);
      L[3] = c3(0, 255, P[0] + d); L[4] = c3(0, 255, Q[0] - d);
      if (!ch && ap < be) L[2] = P[1] + c3(-tc0, tc0, (P[2] + ((P[0] + Q[0] + 1) >>> 1) - 2 * P[1]) >>> 1);
      if (!ch && aq < be) L[5] = Q[1] + c3(-tc0, tc0, (Q[2] + ((P[0] + Q[0] + 1) >>> 1) - 2 * Q[1]) >>> 1);
    end else begin
      if (!ch && ap < be && iabs(P[0] - Q[0]) < (al / 4 + 2)) begin
        L[3] = (P[2] + 2*P[1] + 2*P[0] + 2*Q[0] + Q[1] + 4) / 8;
        L[2] = (P[2] + P[1] + P[0] + Q[0] + 2) / 4;
        L[1] = (2*P[3] + 3*P[2] + P[1] + P[0] + Q[0] + 4) / 8;
      end else L[3] = (2*P[1] + P[0] + Q[1] + 2) / 4;
      if (!ch && aq < be && iabs(P[0] - Q[0]) < (al / 4 + 2)) begin
        L[4] = (P[1] + 2*P[0] + 2*Q[0] + 2*Q[1] + Q[2] + 4) / 8;
        L[5] = (P[0] + Q[0] + Q[1] + Q[2] + 2) / 4;
        L[6] = (2*Q[3] + 3*Q[2] + Q[1] + Q[0] + P[0] + 4) / 8;
      end else L[4] = (2*Q[1] + Q[0] + P[1] + 2) / 4;
    end
  endtask

  int exp_segs;
  task automatic reference();
    int L [8];
    exp_segs = 0;
    for (int k = 0; k < 3; k++) begin
      int n, nb;
      n = (k == 0) ? 16 : 8;
      for (int dir = 0; dir < 2; dir++)
        for (int e = 0; e < n / 4; e++) begin
          if (e == 0 && !(dir ? top_avail : left_avail)) continue;
          for (int s = 0; s < n / 4; s++) begin
            bit any = 0;
            for (int l = 0; l < 4; l++) begin
              int t, b, qa, qp_p, qp_q;
              t = 4 * s + l;  // line position along the edge
              b = (k == 0) ? (dir ? bs_h[e][s] : bs_v[e][s]) : (dir ? bs_h[2*e][(t * 2) / 4] : bs_v[2*e][(t * 2) / 4]);
              if (b != 0) any = 1;
              qp_q = (k == 0) ? qp_cur : qpc_cur;
              qp_p = (e != 0) ? qp_q : (k == 0) ? (dir ? qp_top : qp_left) : (dir ? qpc_top : qpc_left);
              qa = (qp_p + qp_q + 1) / 2;
              for (int i = 0; i < 8; i++) begin
                int pos;
                pos = 4 * e - 4 + i;
                if (k == 0) L[i] = dir ? Y[pos + 4][t + 4] : Y[t + 4][pos + 4];
                else        L[i] = dir ? C[k-1][pos + 4][t + 4] : C[k-1][t + 4][pos + 4];
              end
              fline(L, b, k != 0, qa);
              for (int i = 0; i < 8; i++) begin
                int pos;
                pos = 4 * e - 4 + i;
                if (k == 0) begin if (dir) Y[pos + 4][t + 4] = L[i]; else Y[t + 4][pos + 4] = L[i]; end
                else begin if (dir) C[k-1][pos + 4][t + 4] = L[i]; else C[k-1][t + 4][pos + 4] = L[i]; end
              end
            end
            if (any) exp_segs++;
          end
        end
    end
  endtask

  // word layout (bank, index) -> pixel positions, independent copy
  task automatic word_of(input int bank, input int idx, output int k, output int c, output int r, output bit ok);
    ok = 1;
    if (idx < 40)      begin k = 0; c = bank + 2 * (idx / 20); r = idx % 20 - 4; end
    else if (idx < 48) begin k = 0; c = -1; r = bank * 8 + idx - 40; end
    else if (idx < 72) begin k = 1 + bank; c = (idx - 48) / 12; r = (idx - 48) % 12 - 4; end
    else               begin k = 1 + bank; c = -1; r = idx - 72; end
  endtask
  function automatic int pix(int k, int c, int r, int x);
    if (k == 0) return Y[r + 4][4 * c + x + 4];
    return C[k - 1][r + 4][4 * c + x + 4];
  endfunction

  initial begin
    bus_en = 0; bus_we = 0; bus_bank = 0; bus_addr = 0; bus_wdata = 0; start = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int mb = 0; mb < 40; mb++) begin
      int base, sp, cyc;
      base = $urandom_range(30, 220); sp = (mb % 4 == 0) ? 2 : $urandom_range(1, 12);
      for (int r = 0; r < 20; r++) for (int c = 0; c < 20; c++)
        Y[r][c] = c3(0, 255, base + int'($urandom_range(0, 2 * sp)) - sp + ((c >= 12) ? 6 : 0));
      for (int k = 0; k < 2; k++) for (int r = 0; r < 12; r++) for (int c = 0; c < 12; c++)
        C[k][r][c] = c3(0, 255, base / 2 + int'($urandom_range(0, 2 * sp)) - sp);
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        bs_v[i][j] = 3'($urandom_range(0, (i == 0) ? 4 : 3));
        bs_h[i][j] = 3'($urandom_range(0, (i == 0) ? 4 : 3));
        if ($urandom_range(0, 3) == 0) bs_v[i][j] = 0;
      end
      qp_cur = 6'($urandom_range(20, 51)); qp_left = 6'($urandom_range(20, 51)); qp_top = 6'($urandom_range(20, 51));
      qpc_cur = 6'($urandom_range(20, 39)); qpc_left = 6'($urandom_range(20, 39)); qpc_top = 6'($urandom_range(20, 39));
      off_a = 5'(2 * (int'($urandom_range(0, 6)) - 3)); off_b = 5'(2 * (int'($urandom_range(0, 6)) - 3));
      left_avail = (mb % 5 != 1); top_avail = (mb % 7 != 2);
      // load
      for (int bank = 0; bank < 2; bank++)
        for (int idx = 0; idx < 80; idx++) begin
          int k, c, r; bit ok;
          word_of(bank, idx, k, c, r, ok);
          @(negedge clk);
          bus_en = 1; bus_we = 1; bus_bank = bank[0]; bus_addr = 7'(idx);
          for (int x = 0; x < 4; x++) bus_wdata[8*x +: 8] = 8'(pix(k, c, r, x));
        end
      @(negedge clk); bus_en = 0; bus_we = 0;
      reference();
      start = 1; @(negedge clk); start = 0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (int'(seg_filtered) != exp_segs) begin failures++; $display("FAIL mb %0d segments %0d exp %0d", mb, seg_filtered, exp_segs); end
      checks++;
      if (cyc > 48 + 11 * exp_segs + 2) begin failures++; $display("FAIL mb %0d cycles %0d for %0d segments", mb, cyc, exp_segs); end
      // read back and compare
      for (int bank = 0; bank < 2; bank++)
        for (int idx = 0; idx < 80; idx++) begin
          int k, c, r; bit ok;
          logic [31:0] ew;
          word_of(bank, idx, k, c, r, ok);
          for (int x = 0; x < 4; x++) ew[8*x +: 8] = 8'(pix(k, c, r, x));
          bus_en = 1; bus_we = 0; bus_bank = bank[0]; bus_addr = 7'(idx);
          @(negedge clk);
          checks++;
          if (bus_rdata !== ew) begin
            failures++;
            if (failures < 20) $display("FAIL mb %0d word bank %0d idx %0d (k %0d c %0d r %0d): %h exp %h", mb, bank, idx, k, c, r, bus_rdata, ew);
          end
        end
      bus_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
