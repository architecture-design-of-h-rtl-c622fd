// tb_inter_pred_luma: random 9x9 windows at all 16 fractional positions.
// The reference first builds the whole quarter-pel plane of the window the way
// the standard describes it (integer samples, six-tap half samples b, h and j
// on a 2x grid, then averaging of neighbouring samples on a 4x grid) and reads
// the 4x4 result from it.  Checks the values and one row per cycle.
module tb_inter_pred_luma;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready; pixel_t in_win [9][9]; logic [1:0] in_dx, in_dy;
  pixel_t out_row [4]; logic [1:0] out_y;
  inter_pred_luma dut (.*);
  int checks = 0, failures = 0;

  int W [9][9];
  function automatic int clip(int v); return (v < 0) ? 0 : (v > 255) ? 255 : v; endfunction
  function automatic int t6(int a, int b, int c, int d, int e, int f); return a - 5*b + 20*c + 20*d - 5*e + f; endfunction
  // half-pel grid: H2[2r][2c] integer, [2r][2c+1] b, [2r+1][2c] h, [2r+1][2c+1] j; r,c in 2..6
  int H2 [18][18];
  task automatic build();
    int hb [9][9];
    for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) H2[2*r][2*c] = W[r][c];
    for (int r = 0; r < 9; r++) for (int c = 2; c < 6; c++) hb[r][c] = t6(W[r][c-2], W[r][c-1], W[r][c], W[r][c+1], W[r][c+2], W[r][c+3]);
    for (int r = 2; r < 7; r++) for (int c = 2; c < 7; c++) begin
      if (c < 6) H2[2*r][2*c+1] = clip((hb[r][c] + 16) >>> 5);
      if (r < 6) H2[2*r+1][2*c] = clip((t6(W[r-2][c], W[r-1][c], W[r][c], W[r+1][c], W[r+2][c], W[r+3][c]) + 16) >>> 5);
      if (r < 6 && c < 6) H2[2*r+1][2*c+1] = clip((t6(hb[r-2][c], hb[r-1][c], hb[r][c], hb[r+1][c], hb[r+2][c], hb[r+3][c]) + 512) >>> 10);
    end
  endtask
  // quarter sample at 4x-grid position (Y, X) relative to window origin
  function automatic int qs(int Y, int X);
    int fy, fx, y0, x0;
    fy = Y % 4; fx = X % 4; y0 = Y / 4; x0 = X / 4;
    if (fx % 2 == 0 && fy % 2 == 0) return H2[2*y0 + fy/2][2*x0 + fx/2];
    // quarter positions: average of the two nearest half/integer samples
    if (fy % 2 == 0) return (H2[2*y0 + fy/2][2*x0 + fx/2] + H2[2*y0 + fy/2][2*x0 + fx/2 + 1] + 1) >> 1;
    if (fx % 2 == 0) return (H2[2*y0 + fy/2][2*x0 + fx/2] + H2[2*y0 + fy/2 + 1][2*x0 + fx/2] + 1) >> 1;
    // diagonal quarter positions (e, g, p, r): b/s and h/m
    return (H2[2*y0 + (fy == 3 ? 2 : 0)][2*x0 + 1] + H2[2*y0 + 1][2*x0 + (fx == 3 ? 2 : 0)] + 1) >> 1;
  endfunction

  initial begin
    in_valid = 0; out_ready = 1; in_dx = 0; in_dy = 0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    for (int n = 0; n < 800; n++) begin
      int mode;
      mode = $urandom_range(0, 2);
      for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) begin
        W[r][c] = (mode == 0) ? $urandom_range(0, 255) : (mode == 1) ? (($urandom_range(0, 1) != 0) ? 255 : 0) : 100 + r * 3 + c;
        in_win[r][c] = 8'(W[r][c]);
      end
      build();
      in_dx = 2'(n % 4); in_dy = 2'((n / 4) % 4);
      in_valid = 1; @(posedge clk); #1; in_valid = 0;
      for (int y = 0; y < 4; y++) begin
        if (!out_valid || out_y != 2'(y)) begin failures++; $display("FAIL timing"); end
        for (int x = 0; x < 4; x++) begin
          int ex;
          ex = qs(4 * (y + 2) + in_dy, 4 * (x + 2) + in_dx);
          checks++;
          if (int'(out_row[x]) != ex) begin failures++; $display("FAIL dx %0d dy %0d (%0d,%0d) got %0d exp %0d", in_dx, in_dy, x, y, out_row[x], ex); end
        end
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
