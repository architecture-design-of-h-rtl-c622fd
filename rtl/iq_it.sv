// iq_it: inverse quantisation and 4x4 inverse integer transform, four residue
// pixels per cycle.
//
// A block of 16 coefficients (raster order) is taken in one cycle and scaled:
// d = (c * v(qP%6, position)) << (qP/6), the flat-matrix form of the standard's
// dequantisation.  When dc_pre is set, coefficient 0 is taken as an already
// scaled DC value (Intra16x16 luma and chroma blocks, whose DC comes from the
// separate DC transform).  Stage A then applies the horizontal 1-D transform,
// one row per cycle; stage B applies the vertical transform and emits one row
// of 4 residues per cycle, r = (x + 32) >> 6.  Stage A can take the next block
// in the cycle it finishes, so a block is processed every 4 cycles and the
// first row appears 5 cycles after the block is accepted.
//
// The degree of parallelism (4 pixels per cycle) is the document's; the
// two-stage organisation and the handshakes are this design's choices.
module iq_it
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  coef_t      in_coef [16],
  input  logic [5:0] in_qp,
  input  logic       in_dc_pre,
  output logic       out_valid,
  input  logic       out_ready,
  output resid_t     out_row [4],
  output logic [1:0] out_y
);
  typedef logic signed [31:0] w_t;

  w_t         dq [16];       // dequantised block
  w_t         th [16];       // after the horizontal pass (filled row by row)
  w_t         tv [16];       // block being emitted by stage B
  logic       a_busy, b_busy;
  logic [1:0] a_cnt, b_cnt;
  logic       a_last, b_take;

  function automatic void idct1(input w_t x0, input w_t x1, input w_t x2, input w_t x3,
                                output w_t y0, output w_t y1, output w_t y2, output w_t y3);
    w_t e0, e1, e2, e3;
    e0 = x0 + x2;
    e1 = x0 - x2;
    e2 = (x1 >>> 1) - x3;
    e3 = x1 + (x3 >>> 1);
    y0 = e0 + e3;
    y1 = e1 + e2;
    y2 = e1 - e2;
    y3 = e0 - e3;
  endfunction

  // stage A: horizontal transform of row a_cnt
  w_t hr [4];
  always_comb idct1(dq[4*a_cnt], dq[4*a_cnt+1], dq[4*a_cnt+2], dq[4*a_cnt+3], hr[0], hr[1], hr[2], hr[3]);

  // stage B: vertical transform, row b_cnt of the result
  always_comb begin
    for (int x = 0; x < 4; x++) begin
      w_t y [4];
      idct1(tv[x], tv[4+x], tv[8+x], tv[12+x], y[0], y[1], y[2], y[3]);
      out_row[x] = resid_t'((y[b_cnt] + 32'sd32) >>> 6);
    end
  end

  assign a_last    = a_busy && (a_cnt == 2'd3);
  assign out_valid = b_busy;
  assign out_y     = b_cnt;
  // stage B can take a block when it is empty or emits its last row now
  assign b_take    = !b_busy || (out_ready && b_cnt == 2'd3);
  assign in_ready  = !a_busy || (a_last && b_take);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_busy <= 1'b0; b_busy <= 1'b0; a_cnt <= '0; b_cnt <= '0;
      for (int i = 0; i < 16; i++) begin dq[i] <= '0; th[i] <= '0; tv[i] <= '0; end
    end else begin
      // stage B
      if (b_busy && out_ready) begin
        b_cnt <= b_cnt + 2'd1;
        if (b_cnt == 2'd3) b_busy <= 1'b0;
      end
      // stage A
      if (a_busy && (!a_last || b_take)) begin
        for (int x = 0; x < 4; x++) th[4*a_cnt+x] <= hr[x];
        a_cnt <= a_cnt + 2'd1;
        if (a_last) begin
          a_busy <= 1'b0;
          for (int i = 0; i < 12; i++) tv[i] <= th[i];
          for (int x = 0; x < 4; x++) tv[12+x] <= hr[x];
          b_busy <= 1'b1;
          b_cnt  <= 2'd0;
        end
      end
      if (in_valid && in_ready) begin
        for (int i = 0; i < 16; i++) begin
          logic [1:0] cls;
          cls = (i[0] == 1'b0 && i[2] == 1'b0) ? 2'd0 : (i[0] == 1'b1 && i[2] == 1'b1) ? 2'd1 : 2'd2;
          dq[i] <= (32'(signed'(in_coef[i])) * signed'({27'd0, dequant_v(3'(in_qp % 6), cls)}))
                   <<< (in_qp / 6);
        end
        if (in_dc_pre) dq[0] <= 32'(signed'(in_coef[0]));
        a_busy <= 1'b1;
        a_cnt  <= 2'd0;
      end
    end
  end
endmodule
