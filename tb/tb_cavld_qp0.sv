// tb_cavld_qp0: cycles per macroblock of the CAVLD at QP 0 for the single-,
// two- and three-symbol engines.
//
// At QP 0 almost every coefficient survives quantisation, so the residual
// blocks are long runs of large levels: the case where decoding several
// levels or runs per cycle pays off.  The testbench builds such macroblocks
// (16 luma 4x4 blocks, 2 chroma DC and 8 chroma AC blocks, about 90% of the
// coefficients non-zero, magnitudes up to 60), encodes them with its own
// CAVLC encoder and decodes the same stream with three decoders built with
// NSYM = 1, 2 and 3.  Each decoded block is compared with the one that was
// encoded; each block's cycle count is compared with
//   1 + (T>0) + ceil((n-T)/N) + (n<max) + max(1, ceil(R/N));
// and the cycles per macroblock of the two- and three-symbol engines,
// relative to the single-symbol one, are compared with the ratios of the
// published figures for such engines (276/471 and 212/471), within 0.08.
module tb_cavld_qp0;
  import h264_pkg::*;
  import cavld_tab_pkg::*;

  localparam int NMB = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] bs_data [3]; logic bs_valid [3], bs_ready [3];
  logic cmd_valid [3], cmd_ready [3], out_valid [3], out_ready [3];
  cavld_cmd_t cmd [3];
  coef_t coef [3][16];
  logic [4:0] total_coeff [3];
  logic signed [17:0] value [3];

  cavld #(.NSYM(1)) u1 (.clk, .rst_n, .bs_data(bs_data[0]), .bs_valid(bs_valid[0]), .bs_ready(bs_ready[0]),
    .cmd_valid(cmd_valid[0]), .cmd_ready(cmd_ready[0]), .cmd(cmd[0]), .out_valid(out_valid[0]), .out_ready(out_ready[0]),
    .coef(coef[0]), .total_coeff(total_coeff[0]), .value(value[0]));
  cavld #(.NSYM(2)) u2 (.clk, .rst_n, .bs_data(bs_data[1]), .bs_valid(bs_valid[1]), .bs_ready(bs_ready[1]),
    .cmd_valid(cmd_valid[1]), .cmd_ready(cmd_ready[1]), .cmd(cmd[1]), .out_valid(out_valid[1]), .out_ready(out_ready[1]),
    .coef(coef[1]), .total_coeff(total_coeff[1]), .value(value[1]));
  cavld #(.NSYM(3)) u3 (.clk, .rst_n, .bs_data(bs_data[2]), .bs_valid(bs_valid[2]), .bs_ready(bs_ready[2]),
    .cmd_valid(cmd_valid[2]), .cmd_ready(cmd_ready[2]), .cmd(cmd[2]), .out_valid(out_valid[2]), .out_ready(out_ready[2]),
    .coef(coef[2]), .total_coeff(total_coeff[2]), .value(value[2]));

  int unsigned L0 [68] = '{1,0,0,0,6,2,0,0,8,6,3,0,9,8,7,5,10,9,8,6,11,10,9,7,13,11,10,8,13,13,11,9,13,13,13,10,14,14,13,11,14,14,14,13,15,15,14,14,15,15,15,14,16,15,15,15,16,16,16,15,16,16,16,16,16,16,16,16};
  int unsigned B0 [68] = '{1,0,0,0,5,1,0,0,7,4,1,0,7,6,5,3,7,6,5,3,7,6,5,4,15,6,5,4,11,14,5,4,8,10,13,4,15,14,9,4,11,10,13,12,15,14,9,12,11,10,13,8,15,1,9,12,11,14,13,8,7,10,9,12,4,6,5,8};
  int unsigned L1 [68] = '{2,0,0,0,6,2,0,0,6,5,3,0,7,6,6,4,8,6,6,4,8,7,7,5,9,8,8,6,11,9,9,6,11,11,11,7,12,11,11,9,12,12,12,11,12,12,12,11,13,13,13,12,13,13,13,13,13,14,13,13,14,14,14,13,14,14,14,14};
  int unsigned B1 [68] = '{3,0,0,0,11,2,0,0,7,7,3,0,7,10,9,5,7,6,5,4,4,6,5,6,7,6,5,8,15,6,5,4,11,14,13,4,15,10,9,4,11,14,13,12,8,10,9,8,15,14,13,12,11,10,9,12,7,11,6,8,9,8,10,1,7,6,5,4};
  int unsigned L2 [68] = '{4,0,0,0,6,4,0,0,6,5,4,0,6,5,5,4,7,5,5,4,7,5,5,4,7,6,6,4,7,6,6,4,8,7,7,5,8,8,7,6,9,8,8,7,9,9,8,8,9,9,9,8,10,9,9,9,10,10,10,10,10,10,10,10,10,10,10,10};
  int unsigned B2 [68] = '{15,0,0,0,15,14,0,0,11,15,13,0,8,12,14,12,15,10,11,11,11,8,9,10,9,14,13,9,8,10,9,8,15,14,13,13,11,14,10,12,15,10,13,12,11,14,9,12,8,10,13,8,13,7,9,12,9,12,11,10,5,8,7,6,1,4,3,2};
  int unsigned LC [20] = '{2,0,0,0,6,1,0,0,6,6,3,0,6,7,7,6,6,8,8,7};
  int unsigned BC [20] = '{1,0,0,0,7,1,0,0,4,6,1,0,3,3,2,5,2,3,2,0};
  bit bits [$];

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

  task automatic encode_block(cmd_kind_e k, int nc, ref coef_t c [16], output int info [4]);
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
    info[0] = tc; info[1] = t1; info[2] = 0; info[3] = 0;
    if (tc == 0) return;
    for (int i = 0; i < t1; i++) put((s[nz_pos[i]] < 0) ? 1 : 0, 1);
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
      info[2] = 1;
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
    info[3] = ncode_runs;
  endtask


  cavld_cmd_t cmds [$];
  coef_t exp_coef [$][16];
  int info_q [$][4];
  int maxn_q [$];

  function automatic int cdiv(int a, int b); return (a + b - 1) / b; endfunction
  function automatic int blk_cycles(int i, int n);
    int tc, t1, tzc, nr;
    tc = info_q[i][0]; t1 = info_q[i][1]; tzc = info_q[i][2]; nr = info_q[i][3];
    if (tc == 0) return 1;
    return 1 + (t1 > 0) + cdiv(tc - t1, n) + tzc + ((nr == 0) ? 1 : cdiv(nr, n));
  endfunction

  // word feeders, one read pointer per decoder
  int bp [3] = '{0, 0, 0};
  always_comb
    for (int d = 0; d < 3; d++) begin
      for (int i = 0; i < 32; i++) bs_data[d][31 - i] = (bp[d] + i < bits.size()) ? bits[bp[d] + i] : 1'b0;
      bs_valid[d] = rst_n;
    end
  always @(posedge clk) for (int d = 0; d < 3; d++) if (rst_n && bs_valid[d] && bs_ready[d]) bp[d] <= bp[d] + 32;

  int mb_cycles [3][NMB];

  task automatic run_dec(int d);
    int cycles, b;
    b = 0;
    for (int m = 0; m < NMB; m++) begin
      mb_cycles[d][m] = 0;
      for (int k = 0; k < 26; k++) begin
        while (!cmd_ready[d]) @(posedge clk);
        cmd[d] <= cmds[b]; cmd_valid[d] <= 1;
        @(posedge clk);
        cmd_valid[d] <= 0;
        cycles = 0;
        #1;
        while (!out_valid[d]) begin
          if (d == 0 ? u1.have : d == 1 ? u2.have : u3.have) cycles++;
          @(posedge clk); #1;
        end
        checks++;
        for (int i = 0; i < 16; i++)
          if (coef[d][i] != exp_coef[b][i]) begin
            failures++; $display("FAIL NSYM %0d block %0d coef %0d: %0d exp %0d", d + 1, b, i, coef[d][i], exp_coef[b][i]); break;
          end
        checks++;
        if (cycles != blk_cycles(b, d + 1)) begin
          failures++; $display("FAIL NSYM %0d block %0d: %0d cycles exp %0d", d + 1, b, cycles, blk_cycles(b, d + 1));
        end
        mb_cycles[d][m] += cycles;
        b++;
      end
    end
  endtask

  initial begin
    coef_t c [16];
    cavld_cmd_t cm;
    int info [4];
    for (int m = 0; m < NMB; m++)
      for (int k = 0; k < 26; k++) begin
        int maxn;
        cm.kind = (k < 16) ? CMD_BLK : (k < 18) ? CMD_CDC : CMD_AC;
        cm.nc = (cm.kind == CMD_CDC) ? -6'sd1 : 6'($urandom_range(8, 16));
        maxn = (cm.kind == CMD_CDC) ? 4 : 16;
        for (int i = 0; i < 16; i++) c[i] = '0;
        for (int i = 0; i < maxn; i++)
          if ($urandom_range(0, 9) != 0 && !(cm.kind == CMD_AC && i == 0)) begin
            int mag;
            mag = ($urandom_range(0, 3) == 0) ? 1 : $urandom_range(2, 60);
            c[i] = 16'(($urandom_range(0, 1) != 0) ? -mag : mag);
          end
        cmds.push_back(cm);
        exp_coef.push_back(c);
        encode_block(cm.kind, int'(cm.nc), c, info);
        info_q.push_back(info);
      end
    for (int i = 0; i < 256; i++) bits.push_back(0);
    for (int d = 0; d < 3; d++) begin cmd_valid[d] = 0; out_ready[d] = 1; cmd[d] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      run_dec(0);
      run_dec(1);
      run_dec(2);
    join
    begin
      real s [3];
      for (int d = 0; d < 3; d++) begin
        s[d] = 0;
        for (int m = 0; m < NMB; m++) s[d] += mb_cycles[d][m];
        s[d] = s[d] / NMB;
        $display("NSYM %0d: %0.1f cycles per macroblock", d + 1, s[d]);
      end
      checks++;
      if (s[1] / s[0] < 276.0 / 471.0 - 0.08 || s[1] / s[0] > 276.0 / 471.0 + 0.08) begin
        failures++; $display("FAIL two-symbol ratio %0.3f", s[1] / s[0]);
      end
      checks++;
      if (s[2] / s[0] < 212.0 / 471.0 - 0.08 || s[2] / s[0] > 212.0 / 471.0 + 0.08) begin
        failures++; $display("FAIL three-symbol ratio %0.3f", s[2] / s[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
