// tb_cavld: self-checking testbench of the CAVLD symbol decoder.
//
// A CAVLC encoder written here (forward tables for coeff_token and run_before,
// the level escape rules) turns random coefficient blocks of every kind, mixed
// with ue(v)/se(v) symbols, into one bitstream.  The decoder reads it through its
// word port; each result is compared with the block that was encoded, and the
// cycles per block are compared with the multi-symbol cycle formula.  The
// total_zeros codes are found by searching the shared table function, so that
// table is exercised only for consistency, not checked independently.
module tb_cavld;
  import h264_pkg::*;
  import cavld_tab_pkg::*;

  localparam int NSYM = 2;
  localparam int NBLK = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] bs_data; logic bs_valid, bs_ready;
  logic cmd_valid, cmd_ready, out_valid, out_ready;
  cavld_cmd_t cmd;
  coef_t coef [16];
  logic [4:0] total_coeff;
  logic signed [17:0] value;

  cavld #(.NSYM(NSYM)) dut (.*);

  int checks = 0, failures = 0;

  int unsigned L0 [68] = '{1,0,0,0,6,2,0,0,8,6,3,0,9,8,7,5,10,9,8,6,11,10,9,7,13,11,10,8,13,13,11,9,13,13,13,10,14,14,13,11,14,14,14,13,15,15,14,14,15,15,15,14,16,15,15,15,16,16,16,15,16,16,16,16,16,16,16,16};
  int unsigned B0 [68] = '{1,0,0,0,5,1,0,0,7,4,1,0,7,6,5,3,7,6,5,3,7,6,5,4,15,6,5,4,11,14,5,4,8,10,13,4,15,14,9,4,11,10,13,12,15,14,9,12,11,10,13,8,15,1,9,12,11,14,13,8,7,10,9,12,4,6,5,8};
  int unsigned L1 [68] = '{2,0,0,0,6,2,0,0,6,5,3,0,7,6,6,4,8,6,6,4,8,7,7,5,9,8,8,6,11,9,9,6,11,11,11,7,12,11,11,9,12,12,12,11,12,12,12,11,13,13,13,12,13,13,13,13,13,14,13,13,14,14,14,13,14,14,14,14};
  int unsigned B1 [68] = '{3,0,0,0,11,2,0,0,7,7,3,0,7,10,9,5,7,6,5,4,4,6,5,6,7,6,5,8,15,6,5,4,11,14,13,4,15,10,9,4,11,14,13,12,8,10,9,8,15,14,13,12,11,10,9,12,7,11,6,8,9,8,10,1,7,6,5,4};
  int unsigned L2 [68] = '{4,0,0,0,6,4,0,0,6,5,4,0,6,5,5,4,7,5,5,4,7,5,5,4,7,6,6,4,7,6,6,4,8,7,7,5,8,8,7,6,9,8,8,7,9,9,8,8,9,9,9,8,10,9,9,9,10,10,10,10,10,10,10,10,10,10,10,10};
  int unsigned B2 [68] = '{15,0,0,0,15,14,0,0,11,15,13,0,8,12,14,12,15,10,11,11,11,8,9,10,9,14,13,9,8,10,9,8,15,14,13,13,11,14,10,12,15,10,13,12,11,14,9,12,8,10,13,8,13,7,9,12,9,12,11,10,5,8,7,6,1,4,3,2};
  int unsigned LC [20] = '{2,0,0,0,6,1,0,0,6,6,3,0,6,7,7,6,6,8,8,7};
  int unsigned BC [20] = '{1,0,0,0,7,1,0,0,4,6,1,0,3,3,2,5,2,3,2,0};
  bit bits [$];
  cavld_cmd_t cmds [$];
  coef_t exp_coef [$][16];
  int exp_val [$];
  int exp_cyc [$];
  int exp_tc [$];

  task automatic put(int unsigned v, int n);
    for (int i = n - 1; i >= 0; i--) bits.push_back(v[i]);
  endtask

  function automatic int lz_run_len(int zl, int run, output int code);
    // run_before forward table
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

  task automatic encode_block(cmd_kind_e k, int nc, ref coef_t c [16], output int cyc);
    int maxn, n, tc, t1, tz, sl, zl, lc, prefix, ncode_runs;
    int s [16];
    int nz_pos [$];
    int ti, code, len;
    maxn = (k == CMD_CDC) ? 4 : (k == CMD_AC) ? 15 : 16;
    for (int i = 0; i < maxn; i++)
      s[i] = (k == CMD_CDC) ? c[i] : (k == CMD_AC) ? c[zigzag4x4(4'(i + 1))] : c[zigzag4x4(4'(i))];
    for (int i = maxn - 1; i >= 0; i--) if (s[i] != 0) nz_pos.push_back(i);  // high to low
    tc = nz_pos.size();
    t1 = 0;
    for (int i = 0; i < tc && t1 < 3; i++) begin
      if (s[nz_pos[i]] == 1 || s[nz_pos[i]] == -1) t1++; else break;
    end
    ti = tc * 4 + t1;
    if (k == CMD_CDC)   put(BC[ti], LC[ti]);
    else if (nc < 2)    put(B0[ti], L0[ti]);
    else if (nc < 4)    put(B1[ti], L1[ti]);
    else if (nc < 8)    put(B2[ti], L2[ti]);
    else                put((tc == 0) ? 3 : ((tc - 1) << 2) | t1, 6);
    cyc = 1;
    if (tc == 0) return;
    for (int i = 0; i < t1; i++) put((s[nz_pos[i]] < 0) ? 1 : 0, 1);
    if (t1 > 0) cyc++;
    sl = (tc > 10 && t1 < 3) ? 1 : 0;
    for (int i = t1; i < tc; i++) begin
      int v, mag;
      v = s[nz_pos[i]];
      mag = (v < 0) ? -v : v;
      lc = (v > 0) ? 2 * v - 2 : -2 * v - 1;
      if (i == t1 && t1 < 3) lc -= 2;
      if (sl == 0) begin
        if (lc < 14)      begin put(1, lc + 1); end
        else if (lc < 30) begin put(1, 15); put(lc - 14, 4); end
        else              begin put(1, 16); put(lc - 30, 12); end
      end else begin
        if (lc < (15 << sl)) begin put(1, (lc >> sl) + 1); put(lc & ((1 << sl) - 1), sl); end
        else                 begin put(1, 16); put(lc - (15 << sl), 12); end
      end
      if (sl == 0) sl = 1;
      if (mag > (3 << (sl - 1)) && sl < 6) sl++;
    end
    cyc += (tc - t1 + NSYM - 1) / NSYM;
    tz = nz_pos[0] + 1 - tc;
    if (tc < maxn) begin
      logic [7:0] r;
      bit found = 0;
      for (int l = 1; l <= 9 && !found; l++)
        for (int cv = 0; cv < (1 << l) && !found; cv++) begin
          logic [15:0] w;
          w = 16'(cv << (16 - l));
          r = (k == CMD_CDC) ? total_zeros_cdc(2'(tc), w) : total_zeros_lut(4'(tc), w);
          if (int'(r[7:4]) == l && int'(r[3:0]) == tz) begin put(cv, l); found = 1; end
        end
      cyc++;
    end
    zl = tz; ncode_runs = 0;
    for (int i = 0; i < tc - 1 && zl > 0; i++) begin
      int run;
      run = nz_pos[i] - nz_pos[i + 1] - 1;
      len = lz_run_len(zl > 6 ? 7 : zl, run, code);
      put(code, len);
      zl -= run;
      ncode_runs++;
    end
    cyc += (ncode_runs + NSYM - 1) / NSYM;
    if (ncode_runs == 0) cyc += 1;  // the placing cycle with no run codes
    exp_tc.push_back(tc);
  endtask

  function automatic int rnd_level();
    int r, m;
    r = $urandom_range(0, 99);
    if (r < 45)      m = 1;
    else if (r < 75) m = $urandom_range(2, 4);
    else if (r < 95) m = $urandom_range(5, 40);
    else             m = $urandom_range(41, 2000);
    return ($urandom_range(0, 1) != 0) ? -m : m;
  endfunction

  initial begin
    int cycles, k, nstart, cyc;
    coef_t c [16];
    cavld_cmd_t cm;
    for (int b = 0; b < NBLK; b++) begin
      k = $urandom_range(0, 9);
      if (k < 2) begin
        int v;
        v = $urandom_range(0, 3000);
        cm.kind = (k == 0) ? CMD_UE : CMD_SE;
        cm.nc = '0;
        if (k == 0) put(v + 1, 2 * $clog2(v + 2) - 1 + ((v + 1) == (1 << $clog2(v + 2)) ? 0 : 0));
        cmds.push_back(cm);
        begin
          // explicit Exp-Golomb encoding: M zeros, then codeNum+1 in M+1 bits
          int m, cn, sv;
          if (k == 0) begin
            // remove the bits put above and re-encode explicitly
            for (int q = 0; q < 2 * $clog2(v + 2) - 1; q++) void'(bits.pop_back());
            cn = v; sv = v;
          end else begin
            sv = v - 1500;
            cn = (sv > 0) ? 2 * sv - 1 : -2 * sv;
          end
          m = 0; while (((cn + 1) >> (m + 1)) != 0) m++;
          put(0, m); put(cn + 1, m + 1);
          exp_val.push_back(sv);
        end
        exp_coef.push_back(c);
        exp_cyc.push_back(1);
        exp_tc.push_back(-1);
      end else begin
        int dens, maxn;
        cm.kind = (k < 6) ? CMD_BLK : (k < 8) ? CMD_AC : CMD_CDC;
        cm.nc = 6'($urandom_range(0, 16));
        dens = $urandom_range(0, 100);
        maxn = (cm.kind == CMD_CDC) ? 4 : 16;
        for (int i = 0; i < 16; i++) c[i] = '0;
        for (int i = 0; i < maxn; i++)
          if ($urandom_range(0, 99) < dens && !(cm.kind == CMD_AC && i == 0)) c[i] = 16'(rnd_level());
        cmds.push_back(cm);
        exp_coef.push_back(c);
        exp_val.push_back(0);
        encode_block(cm.kind, int'(cm.nc), c, cyc);
        if (exp_tc.size() < exp_coef.size()) exp_tc.push_back(0);
        exp_cyc.push_back(cyc);
      end
    end
    for (int i = 0; i < 256; i++) bits.push_back(0);  // padding

    cmd_valid = 0; out_ready = 1; cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      while (!cmd_ready) @(posedge clk);
      cmd <= cmds[b]; cmd_valid <= 1;
      @(posedge clk);
      cmd_valid <= 0;
      nstart = 0; cycles = 0;
      #1;
      while (!out_valid) begin
        if (dut.have) cycles++;  // cycles waiting for stream words are not decode cycles
        @(posedge clk); #1;
      end
      checks++;
      if (cmds[b].kind == CMD_UE || cmds[b].kind == CMD_SE) begin
        if (int'(value) != exp_val[b]) begin
          failures++; $display("FAIL blk %0d eg value %0d exp %0d", b, value, exp_val[b]);
        end
      end else begin
        bit bad = 0;
        for (int i = 0; i < 16; i++) if (coef[i] != exp_coef[b][i]) bad = 1;
        if (bad) begin
          failures++;
          $display("FAIL blk %0d kind %0d nc %0d", b, cmds[b].kind, cmds[b].nc);
          for (int i = 0; i < 16; i++) $display("  %0d: got %0d exp %0d", i, coef[i], exp_coef[b][i]);
        end
        checks++;
        if (cycles != exp_cyc[b]) begin
          failures++; $display("FAIL blk %0d cycles %0d exp %0d", b, cycles, exp_cyc[b]);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word feeder
  int bp = 0;
  always_comb begin
    for (int i = 0; i < 32; i++) bs_data[31 - i] = (bp + i < bits.size()) ? bits[bp + i] : 1'b0;
    bs_valid = rst_n;
  end
  always @(posedge clk) if (rst_n && bs_valid && bs_ready) bp <= bp + 32;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
