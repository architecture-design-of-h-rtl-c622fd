// tb_intra_pred4x4: every mode with random neighbours and every availability
// the mode allows; the reference is written on the standard's edge array
// (left column, corner and top row as one line e[-5..8]), so that the
// diagonal modes are one filter along that line rather than the block's
// case analysis.  Also checks one row per cycle (4 cycles per block) and
// a few hand-computed DC values.
module tb_intra_pred4x4;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic in_valid, in_ready, in_top_avail, in_left_avail, in_tr_avail, out_valid, out_ready;
  i4_mode_e in_mode; pixel_t in_top [8]; pixel_t in_left [4]; pixel_t in_corner;
  pixel_t out_row [4]; logic [1:0] out_y;
  intra_pred4x4 dut (.*);
  int checks = 0, failures = 0;

  int e [-5:8];
  function automatic int t3(int c); return (e[c - 1] + 2 * e[c] + e[c + 1] + 2) >> 2; endfunction
  function automatic int t2(int a); return (e[a] + e[a + 1] + 1) >> 1; endfunction

  function automatic int ref_px(int m, int x, int y, int ta, int la);
    int z, st, sl;
    case (m)
      0: return e[x];
      1: return e[-2 - y];
      2: begin
        st = e[0] + e[1] + e[2] + e[3]; sl = e[-2] + e[-3] + e[-4] + e[-5];
        if (ta && la) return (st + sl + 4) >> 3;
        if (la) return (sl + 2) >> 2;
        if (ta) return (st + 2) >> 2;
        return 128;
      end
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

  task automatic run(int m, int ta, int la, int tra, int fixed);
    int t0, cyc;
    in_mode = i4_mode_e'(m); in_top_avail = ta[0]; in_left_avail = la[0]; in_tr_avail = tra[0];
    for (int i = 0; i < 8; i++) in_top[i] = (fixed >= 0) ? 8'(fixed) : 8'($urandom_range(0, 255));
    for (int i = 0; i < 4; i++) in_left[i] = (fixed >= 0) ? 8'(fixed / 2) : 8'($urandom_range(0, 255));
    in_corner = 8'($urandom_range(0, 255));
    for (int i = 0; i < 4; i++) e[i] = in_top[i];
    for (int i = 4; i < 8; i++) e[i] = tra ? in_top[i] : in_top[3];
    e[8] = e[7];
    e[-1] = in_corner;
    for (int i = 0; i < 4; i++) e[-2 - i] = in_left[i];
    in_valid = 1;
    @(posedge clk); #1; in_valid = 0;
    for (int y = 0; y < 4; y++) begin
      if (!out_valid || out_y != 2'(y)) begin failures++; $display("FAIL timing mode %0d row %0d", m, y); end
      for (int x = 0; x < 4; x++) begin
        checks++;
        if (int'(out_row[x]) != ref_px(m, x, y, ta, la)) begin
          failures++; $display("FAIL mode %0d ta %0d la %0d (%0d,%0d) got %0d exp %0d", m, ta, la, x, y, out_row[x], ref_px(m, x, y, ta, la));
        end
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    in_valid = 0; out_ready = 1;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    for (int n = 0; n < 200; n++)
      for (int m = 0; m < 9; m++) begin
        int ta, la;
        ta = 1; la = 1;
        if (m == 2) begin ta = $urandom_range(0, 1); la = $urandom_range(0, 1); end
        if (m == 0 || m == 3 || m == 7) la = $urandom_range(0, 1);
        if (m == 1 || m == 8) ta = $urandom_range(0, 1);
        run(m, ta, la, $urandom_range(0, 1), -1);
      end
    // hand-computed DC: top 100, left 50 -> (400 + 200 + 4) >> 3 = 75
    run(2, 1, 1, 1, 100);
    checks++; if (ref_px(2, 0, 0, 1, 1) != 75) begin failures++; $display("FAIL reference DC"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
