// inter_pred_luma: luma interpolation unit of the INTER_PRED engine -- the
// quarter-pel prediction of one 4x4 block from a 9x9 window of integer
// reference pixels, four predicted pixels per cycle.
//
// The window holds rows/columns -2..+6 around the block's integer position,
// so the integer pixel for output (x,y) is win[y+2][x+2].  Half-pel samples use
// the six-tap filter (1,-5,20,20,-5,1): b horizontally, h vertically, j from
// the unclipped horizontal sums.  Quarter-pel samples average the two nearest
// integer/half samples, as in the standard.  For output row y the unit
// evaluates the 24 horizontal sums of window rows y..y+5 and the five
// vertical sums of columns x+2, x+3, so one row of four pixels leaves every
// cycle; a block takes 4 cycles.  Windows larger than 9x9 (reused between the
// 4x4 blocks of a larger partition) are cut into 9x9 views by the caller.
// The 9x9 window and the 4x4 processing element follow the document; the
// row-per-cycle organisation is this design's choice.
module inter_pred_luma
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  pixel_t     in_win [9][9],
  input  logic [1:0] in_dx,
  input  logic [1:0] in_dy,
  output logic       out_valid,
  input  logic       out_ready,
  output pixel_t     out_row [4],
  output logic [1:0] out_y
);
  pixel_t     w [9][9];
  logic [1:0] dx, dy;
  logic       busy;
  logic [1:0] cnt;

  function automatic int tap6(input int a, input int b, input int c, input int d, input int e, input int f);
    return a - 5 * b + 20 * c + 20 * d - 5 * e + f;
  endfunction
  function automatic int clip255(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction
  function automatic int avg(input int a, input int b);
    return (a + b + 1) >>> 1;
  endfunction

  always_comb begin
    int y;
    int b1 [6][4];   // horizontal sums, window rows y..y+5, output columns 0..3
    int hh [5];      // vertical half-pel h at window columns x+2, x = 0..4
    y = int'(cnt);
    for (int r = 0; r < 6; r++)
      for (int x = 0; x < 4; x++)
        b1[r][x] = tap6(int'(w[y + r][x]), int'(w[y + r][x + 1]), int'(w[y + r][x + 2]),
                        int'(w[y + r][x + 3]), int'(w[y + r][x + 4]), int'(w[y + r][x + 5]));
    for (int x = 0; x < 5; x++)
      hh[x] = clip255((tap6(int'(w[y][x + 2]), int'(w[y + 1][x + 2]), int'(w[y + 2][x + 2]),
                            int'(w[y + 3][x + 2]), int'(w[y + 4][x + 2]), int'(w[y + 5][x + 2])) + 16) >>> 5);
    for (int x = 0; x < 4; x++) begin
      int G, H, M, b, s, h, m, j, v;
      G = int'(w[y + 2][x + 2]);
      H = int'(w[y + 2][x + 3]);
      M = int'(w[y + 3][x + 2]);
      b = clip255((b1[2][x] + 16) >>> 5);
      s = clip255((b1[3][x] + 16) >>> 5);
      h = hh[x];
      m = hh[x + 1];
      j = clip255((tap6(b1[0][x], b1[1][x], b1[2][x], b1[3][x], b1[4][x], b1[5][x]) + 512) >>> 10);
      case ({dx, dy})
        4'b00_00: v = G;
        4'b00_01: v = avg(G, h);
        4'b00_10: v = h;
        4'b00_11: v = avg(M, h);
        4'b01_00: v = avg(G, b);
        4'b10_00: v = b;
        4'b11_00: v = avg(H, b);
        4'b01_01: v = avg(b, h);
        4'b11_01: v = avg(b, m);
        4'b01_11: v = avg(h, s);
        4'b11_11: v = avg(m, s);
        4'b10_01: v = avg(b, j);
        4'b10_11: v = avg(j, s);
        4'b01_10: v = avg(h, j);
        4'b11_10: v = avg(j, m);
        default:  v = j;
      endcase
      out_row[x] = pixel_t'(v);
    end
  end

  assign out_valid = busy;
  assign out_y     = cnt;
  assign in_ready  = !busy || (out_ready && cnt == 2'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0; dx <= '0; dy <= '0;
      for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) w[r][c] <= '0;
    end else begin
      if (busy && out_ready) begin
        cnt <= cnt + 2'd1;
        if (cnt == 2'd3) busy <= 1'b0;
      end
      if (in_valid && in_ready) begin
        busy <= 1'b1; cnt <= 2'd0; dx <= in_dx; dy <= in_dy;
        w <= in_win;
      end
    end
  end
endmodule
