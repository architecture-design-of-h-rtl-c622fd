// tb_deblock_filter: hand-worked lines for the strong (bS 4) and normal
// (bS 2) luma filters and the chroma filter, the alpha/beta/tC0 corner
// values, then random lines against a reference written from the standard's
// equations.
module tb_deblock_filter;
  import h264_pkg::*;
  pixel_t p [4], q [4], pf [3], qf [3]; logic [2:0] bs; logic chroma; logic [5:0] qp_av;
  logic signed [4:0] off_a, off_b; logic filtered;
  deblock_filter dut (.*);
  int checks = 0, failures = 0;

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic int c3(int lo, int hi, int v); return v < lo ? lo : v > hi ? hi : v; endfunction
  int AL [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,32,36,40,45,50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
  int BE [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,9,9,10,10,11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
  int TC [52][3];
  initial begin
    int t1 [35] = '{0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13};
    int t2 [35] = '{0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,5,5,6,7,8,8,10,11,12,13,15,17};
    int t3 [35] = '{1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13,14,16,18,20,23,25};
    for (int i = 0; i < 52; i++) for (int b = 0; b < 3; b++) TC[i][b] = 0;
    for (int i = 17; i < 52; i++) begin TC[i][0] = t1[i-17]; TC[i][1] = t2[i-17]; TC[i][2] = t3[i-17]; end
  end

  task automatic refline(input int P [4], input int Q [4], input int b, input int ch, input int qa, input int oa, input int ob,
                         output int PO [3], output int QO [3]);
    int ia, ib, al, be, ap, aq, tc0, tc, d;
    ia = c3(0, 51, qa + oa); ib = c3(0, 51, qa + ob); al = AL[ia]; be = BE[ib];
    for (int i = 0; i < 3; i++) begin PO[i] = P[i]; QO[i] = Q[i]; end
    if (b == 0 || iabs(P[0] - Q[0]) >= al || iabs(P[1] - P[0]) >= be || iabs(Q[1] - Q[0]) >= be) return;
    ap = iabs(P[2] - P[0]); aq = iabs(Q[2] - Q[0]);
    if (b < 4) begin
      tc0 = TC[ia][b - 1];
      tc = ch ? tc0 + 1 : tc0 + (ap < be) + (aq < be);
      d = c3(-tc, tc, ((Q[0] - P[0]) * 4 + (P[1] - Q[1]) + 4) >>> 3);
      PO[0] = c3(0, 255, P[0] + d); QO[0] = c3(0, 255, Q[0] - d);
      if (!ch && ap < be) PO[1] = P[1] + c3(-tc0, tc0, (P[2] + ((P[0] + Q[0] + 1) >>> 1) - 2 * P[1]) >>> 1);
      if (!ch && aq < be) QO[1] = Q[1] + c3(-tc0, tc0, (Q[2] + ((P[0] + Q[0] + 1) >>> 1) - 2 * Q[1]) >>> 1);
    end else begin
      if (!ch && ap < be && iabs(P[0] - Q[0]) < (al / 4 + 2)) begin
        PO[0] = (P[2] + 2*P[1] + 2*P[0] + 2*Q[0] + Q[1] + 4) / 8;
        PO[1] = (P[2] + P[1] + P[0] + Q[0] + 2) / 4;
        PO[2] = (2*P[3] + 3*P[2] + P[1] + P[0] + Q[0] + 4) / 8;
      end else PO[0] = (2*P[1] + P[0] + Q[1] + 2) / 4;
      if (!ch && aq < be && iabs(P[0] - Q[0]) < (al / 4 + 2)) begin
        QO[0] = (P[1] + 2*P[0] + 2*Q[0] + 2*Q[1] + Q[2] + 4) / 8;
        QO[1] = (P[0] + Q[0] + Q[1] + Q[2] + 2) / 4;
        QO[2] = (2*Q[3] + 3*Q[2] + Q[1] + Q[0] + P[0] + 4) / 8;
      end else QO[0] = (2*Q[1] + Q[0] + P[1] + 2) / 4;
    end
  endtask

  task automatic apply(int P [4], int Q [4], int b, int ch, int qa, int oa, int ob, int ep [3], int eq [3], string what);
    for (int i = 0; i < 4; i++) begin p[i] = 8'(P[i]); q[i] = 8'(Q[i]); end
    bs = 3'(b); chroma = ch[0]; qp_av = 6'(qa); off_a = 5'(oa); off_b = 5'(ob);
    #1;
    for (int i = 0; i < 3; i++) begin
      checks += 2;
      if (int'(pf[i]) != ep[i] || int'(qf[i]) != eq[i]) begin
        failures++; $display("FAIL %s i %0d: p' %0d exp %0d, q' %0d exp %0d", what, i, pf[i], ep[i], qf[i], eq[i]);
      end
    end
  endtask

  initial begin
    int P [4], Q [4], ep [3], eq [3];
    #1;
    // strong luma filter, qp 40 (alpha 80, beta 13): p = 60,60,60,60 q = 70,70,70,70
    P = '{60, 60, 60, 60}; Q = '{70, 70, 70, 70};
    // p0' = (60+120+120+140+70+4)/8 = 554/8 = 69? -> (60+2*60+2*60+2*70+70+4)>>3 = 514>>3 = 64
    ep = '{64, 63, 61}; eq = '{66, 68, 69};
    apply(P, Q, 4, 0, 40, 0, 0, ep, eq, "bS4 hand");
    // bS 2 at qp 30 (alpha 25, beta 8, tc0 1): tc = 1+1+1 = 3, delta = clip(-3,3,(40+0+4)>>3=5) = 3
    P = '{50, 50, 50, 50}; Q = '{60, 60, 60, 60};
    ep = '{53, 51, 50}; eq = '{57, 59, 60};
    apply(P, Q, 2, 0, 30, 0, 0, ep, eq, "bS2 hand");
    // chroma bS 2 qp 30: tc = 2 -> delta 2
    ep = '{52, 50, 50}; eq = '{58, 60, 60};
    apply(P, Q, 2, 1, 30, 0, 0, ep, eq, "chroma hand");
    // below the thresholds at qp 15: untouched
    ep = '{50, 50, 50}; eq = '{60, 60, 60};
    apply(P, Q, 4, 0, 15, 0, 0, ep, eq, "alpha 0");
    for (int n = 0; n < 20000; n++) begin
      int b, ch, qa, oa, ob, base, sp;
      b = $urandom_range(0, 4); ch = $urandom_range(0, 1); qa = $urandom_range(0, 51);
      oa = 2 * (int'($urandom_range(0, 12)) - 6); ob = 2 * (int'($urandom_range(0, 12)) - 6);
      base = $urandom_range(0, 255); sp = $urandom_range(1, 40);
      for (int i = 0; i < 4; i++) begin
        P[i] = c3(0, 255, base + int'($urandom_range(0, 2 * sp)) - sp);
        Q[i] = c3(0, 255, base + int'($urandom_range(0, 2 * sp)) - sp + ((n % 3 == 0) ? 20 : 0));
      end
      refline(P, Q, b, ch, qa, oa, ob, ep, eq);
      apply(P, Q, b, ch, qa, oa, ob, ep, eq, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
