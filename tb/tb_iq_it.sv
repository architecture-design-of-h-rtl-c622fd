// tb_iq_it: self-checking testbench of the IQ/IT engine.
//
// Random blocks at random qP are sent back to back.  The reference scales with
// the standard's LevelScale4x4 form (16*v, with the rounding offset for
// qP < 24) and applies the inverse transform as the matrix product
// Ci^T * D * Ci with the half-coefficient rows, independently of the block's
// butterflies.  Checks every residue and the 4-cycles-per-block throughput.
module tb_iq_it;
  import h264_pkg::*;
  localparam int NBLK = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_dc_pre, out_valid, out_ready;
  coef_t in_coef [16];
  logic [5:0] in_qp;
  resid_t out_row [4];
  logic [1:0] out_y;
  iq_it dut (.*);

  int checks = 0, failures = 0;
  int exp_q [$][16];

  function automatic int vtab(int qm, int i);
    int t [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16}, '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};
    int r, c;
    r = i / 4; c = i % 4;
    if (r % 2 == 0 && c % 2 == 0) return t[qm][0];
    if (r % 2 == 1 && c % 2 == 1) return t[qm][1];
    return t[qm][2];
  endfunction

  // 1-D inverse transform as a sum of products with the basis (x2 to stay integer on halves)
  function automatic int basis(int k, int n); // value*2 of the inverse-transform basis
    int b [4][4] = '{'{2, 2, 2, 2}, '{2, 1, -1, -2}, '{2, -2, -2, 2}, '{1, -2, 2, -1}};
    return b[k][n];
  endfunction

  initial begin
    int nout = 0, first_out = -1, last_out = 0, cyc = 0;
    int q [16];
    coef_t c [16];
    in_valid = 0; out_ready = 1; in_dc_pre = 0; in_qp = 0;
    for (int i = 0; i < 16; i++) in_coef[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        for (int b = 0; b < NBLK; b++) begin
          int qp, dc_pre, h [16];
          qp = $urandom_range(0, 51);
          dc_pre = ($urandom_range(0, 3) == 0);
          for (int i = 0; i < 16; i++) begin
            int r;
            r = $urandom_range(0, 9);
            c[i] = (r < 5) ? 16'sd0 : (r < 8) ? 16'(int'($urandom_range(0, 6)) - 3) : 16'(int'($urandom_range(0, 200)) - 100);
            if (qp > 30) c[i] = c[i] >>> 3;
          end
          // reference dequantisation
          for (int i = 0; i < 16; i++) begin
            int ls;
            ls = 16 * vtab(qp % 6, i);
            if (qp >= 24) q[i] = (int'(c[i]) * ls) <<< (qp / 6 - 4);
            else          q[i] = (int'(c[i]) * ls + (1 <<< (3 - qp / 6))) >>> (4 - qp / 6);
          end
          if (dc_pre) begin c[0] = 16'(int'($urandom_range(0, 4000)) - 2000); q[0] = c[0]; end
          // reference transform: rows then columns, each as a basis sum (basis x2, exact for >>1 terms)
          for (int y = 0; y < 4; y++)
            for (int x = 0; x < 4; x++) begin
              int s;
              s = 0;
              for (int k = 0; k < 4; k++) begin
                int bk;
                bk = basis(k, x);
                s += (bk == 1 || bk == -1) ? bk * (q[4*y+k] >>> 1) : (bk / 2) * q[4*y+k];
              end
              h[4*y+x] = s;
            end
          for (int y = 0; y < 4; y++)
            for (int x = 0; x < 4; x++) begin
              int s;
              s = 0;
              for (int k = 0; k < 4; k++) begin
                int bk;
                bk = basis(k, y);
                s += (bk == 1 || bk == -1) ? bk * (h[4*k+x] >>> 1) : (bk / 2) * h[4*k+x];
              end
              q[4*y+x] = (s + 32) >>> 6;
            end
          exp_q.push_back(q);
          for (int i = 0; i < 16; i++) in_coef[i] <= c[i];
          in_qp <= 6'(qp); in_dc_pre <= dc_pre[0]; in_valid <= 1;
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
        in_valid <= 0;
      end
      begin
        int blk = 0;
        while (blk < NBLK) begin
          @(posedge clk); cyc++;
          if (out_valid && out_ready) begin
            if (first_out < 0) first_out = cyc;
            last_out = cyc;
            for (int x = 0; x < 4; x++) begin
              checks++;
              if (int'(out_row[x]) != exp_q[blk][4*out_y+x]) begin
                failures++;
                $display("FAIL blk %0d y %0d x %0d got %0d exp %0d", blk, out_y, x, out_row[x], exp_q[blk][4*out_y+x]);
              end
            end
            nout++;
            if (out_y == 2'd3) blk++;
          end
        end
      end
    join
    // 4 rows per block, one row per cycle once the pipeline is full
    checks++;
    if (last_out - first_out + 1 != 4 * NBLK) begin
      failures++; $display("FAIL throughput: %0d cycles for %0d blocks", last_out - first_out + 1, NBLK);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
