// intra_pred4x4: Intra 4x4 prediction engine, four predicted pixels per cycle.
//
// All nine Intra4x4 modes of the standard are computed from the 13 neighbour
// pixels: top[0..7] (the row above and above-right), left[0..3] and the corner.
// A block request is taken when in_ready is high; the predicted block is then
// emitted as four rows, one per cycle (out_y = 0..3), which matches the IQ/IT
// engine's rate so that the two can run side by side in the 4x4-block
// pipeline.  When the above-right pixels are not available the standard's
// substitution is applied here (top[3] copied into top[4..7]); unavailable top
// or left neighbours only change the DC mode, other modes must not be asked for
// without their neighbours (a rule of the bitstream, checked by assertion).
// The throughput of 4 pixels per cycle follows the document; the interface and
// the one-block latency are this design's choices.
module intra_pred4x4
  import h264_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  i4_mode_e in_mode,
  input  pixel_t   in_top [8],
  input  pixel_t   in_left [4],
  input  pixel_t   in_corner,
  input  logic     in_top_avail,
  input  logic     in_left_avail,
  input  logic     in_tr_avail,
  output logic     out_valid,
  input  logic     out_ready,
  output pixel_t   out_row [4],
  output logic [1:0] out_y
);
  pixel_t     t [8];
  pixel_t     l [4];
  pixel_t     q;
  i4_mode_e   mode;
  logic       ta, la;
  logic       busy;
  logic [1:0] cnt;
  pixel_t     pred [16];

  // neighbour p[x,-1] for x = -1..7 and p[-1,y] for y = -1..3
  function automatic int unsigned P(input int x, input int y);
    if (y < 0) return (x < 0) ? int'(q) : int'(t[x]);
    return int'(l[y]);
  endfunction
  function automatic pixel_t f3(input int unsigned a, input int unsigned b, input int unsigned c);
    return pixel_t'((a + 2 * b + c + 2) >> 2);
  endfunction
  function automatic pixel_t f2(input int unsigned a, input int unsigned b);
    return pixel_t'((a + b + 1) >> 1);
  endfunction

  always_comb begin
    int unsigned st, sl;
    pixel_t dc;
    st = 0; sl = 0;
    for (int i = 0; i < 4; i++) begin st += int'(t[i]); sl += int'(l[i]); end
    if (ta && la)  dc = pixel_t'((st + sl + 4) >> 3);
    else if (la)   dc = pixel_t'((sl + 2) >> 2);
    else if (ta)   dc = pixel_t'((st + 2) >> 2);
    else           dc = 8'd128;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        pixel_t v;
        int z;
        v = '0; z = 0;
        case (mode)
          I4_VERTICAL:   v = t[x];
          I4_HORIZONTAL: v = l[y];
          I4_DC:         v = dc;
          I4_DIAG_DL:    v = (x == 3 && y == 3) ? f3(P(6, -1), P(7, -1), P(7, -1))
                                                : f3(P(x + y, -1), P(x + y + 1, -1), P(x + y + 2, -1));
          I4_DIAG_DR: begin
            if (x > y)      v = f3(P(x - y - 2, -1), P(x - y - 1, -1), P(x - y, -1));
            else if (x < y) v = f3(P(-1, y - x - 2), P(-1, y - x - 1), P(-1, y - x));
            else            v = f3(P(0, -1), P(-1, -1), P(-1, 0));
          end
          I4_VERT_R: begin
            z = 2 * x - y;
            if (z >= 0 && z % 2 == 0) v = f2(P(x - (y >> 1) - 1, -1), P(x - (y >> 1), -1));
            else if (z > 0)           v = f3(P(x - (y >> 1) - 2, -1), P(x - (y >> 1) - 1, -1), P(x - (y >> 1), -1));
            else if (z == -1)         v = f3(P(-1, 0), P(-1, -1), P(0, -1));
            else                      v = f3(P(-1, y - 1), P(-1, y - 2), P(-1, y - 3));
          end
          I4_HORIZ_D: begin
            z = 2 * y - x;
            if (z >= 0 && z % 2 == 0) v = f2(P(-1, y - (x >> 1) - 1), P(-1, y - (x >> 1)));
            else if (z > 0)           v = f3(P(-1, y - (x >> 1) - 2), P(-1, y - (x >> 1) - 1), P(-1, y - (x >> 1)));
            else if (z == -1)         v = f3(P(-1, 0), P(-1, -1), P(0, -1));
            else                      v = f3(P(x - 1, -1), P(x - 2, -1), P(x - 3, -1));
          end
          I4_VERT_L: begin
            if (y % 2 == 0) v = f2(P(x + (y >> 1), -1), P(x + (y >> 1) + 1, -1));
            else            v = f3(P(x + (y >> 1), -1), P(x + (y >> 1) + 1, -1), P(x + (y >> 1) + 2, -1));
          end
          default: begin // I4_HORIZ_U
            z = x + 2 * y;
            if (z > 5)                v = l[3];
            else if (z == 5)          v = pixel_t'((P(-1, 2) + 3 * P(-1, 3) + 2) >> 2);
            else if (z % 2 == 0)      v = f2(P(-1, y + (x >> 1)), P(-1, y + (x >> 1) + 1));
            else                      v = f3(P(-1, y + (x >> 1)), P(-1, y + (x >> 1) + 1), P(-1, y + (x >> 1) + 2));
          end
        endcase
        pred[4 * y + x] = v;
      end
  end

  assign out_valid = busy;
  assign out_y     = cnt;
  assign in_ready  = !busy || (out_ready && cnt == 2'd3);
  always_comb for (int x = 0; x < 4; x++) out_row[x] = pred[4 * int'(cnt) + x];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0; mode <= I4_DC; ta <= 1'b0; la <= 1'b0; q <= '0;
      for (int i = 0; i < 8; i++) t[i] <= '0;
      for (int i = 0; i < 4; i++) l[i] <= '0;
    end else begin
      if (busy && out_ready) begin
        cnt <= cnt + 2'd1;
        if (cnt == 2'd3) busy <= 1'b0;
      end
      if (in_valid && in_ready) begin
        busy <= 1'b1; cnt <= 2'd0;
        mode <= in_mode; ta <= in_top_avail; la <= in_left_avail; q <= in_corner;
        for (int i = 0; i < 4; i++) begin
          t[i]     <= in_top[i];
          t[i + 4] <= in_tr_avail ? in_top[i + 4] : in_top[3];
          l[i]     <= in_left[i];
        end
      end
    end
  end

  // modes other than DC need their neighbours
  assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && in_ready && in_mode != I4_DC |->
      ((in_mode == I4_HORIZONTAL || in_mode == I4_HORIZ_U) ? in_left_avail :
       (in_mode == I4_VERTICAL   || in_mode == I4_DIAG_DL || in_mode == I4_VERT_L) ? in_top_avail :
       (in_top_avail && in_left_avail)));
endmodule
