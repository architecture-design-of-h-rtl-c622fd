// bs_calc: boundary strength of every luma 4x4 edge segment of one macroblock,
// for the deblocking engine.
//
// Each of the 32 segments (4 vertical edges x 4 row bands, 4 horizontal edges
// x 4 column blocks) gets the standard's strength from the two 4x4 blocks p
// and q on either side, first rule that applies:
//   4  macroblock edge (edge 0) and p or q is in an intra macroblock
//   3  inner edge and the macroblock is intra
//   2  p or q has non-zero coefficients
//   1  p and q use different reference pictures, or a vector component
//      differs by 4 quarter samples or more
//   0  otherwise
// Block p of edge 0 lies in the left (vertical) or upper (horizontal)
// neighbour macroblock, described by its column 3 or row 3 blocks on the
// *_left / *_top inputs.  Chroma segments reuse the luma strength of the same
// position, as the deblocking engine does.  Whether a macroblock edge is
// filtered at all (picture border, slice) is the engine's left/top_avail, not
// this unit's.
//
// Interface: all inputs are per 4x4 block in raster order (4*row + col);
// ref_* is the reference index, which in a frame with one reference list
// names the reference picture.  bs_v[e][r] and bs_h[e][c] are in the
// engine's layout.  Timing: combinational; the engine registers the values
// when it starts.
//
// From the document: the deblocking engine contains boundary-strength
// calculating logic.  Its rules are the standard's (frame pictures, baseline
// profile); the port layout is this design's own.
module bs_calc
  import h264_pkg::*;
(
  input  logic              cur_intra,        // current MB is intra
  input  logic              left_intra,       // left neighbour MB is intra
  input  logic              top_intra,        // upper neighbour MB is intra
  input  logic [15:0]       nz_cur,           // block has non-zero coefficients
  input  logic [3:0]        nz_left,          // left MB's column 3, rows 0..3
  input  logic [3:0]        nz_top,           // upper MB's row 3, columns 0..3
  input  mv_t               mv_cur   [16],    // vector of each block (quarter samples)
  input  logic signed [4:0] ref_cur  [16],    // reference index of each block
  input  mv_t               mv_left  [4],     // left MB's column 3 vectors
  input  logic signed [4:0] ref_left [4],     // left MB's column 3 reference indices
  input  mv_t               mv_top   [4],     // upper MB's row 3 vectors
  input  logic signed [4:0] ref_top  [4],     // upper MB's row 3 reference indices
  output logic [2:0]        bs_v [4][4],      // [vertical edge x/4][row band]
  output logic [2:0]        bs_h [4][4]       // [horizontal edge y/4][column block]
);
  function automatic logic mv_far(input mv_t a, input mv_t b);
    logic signed [14:0] ex, ey;
    ex = 15'(a.x) - 15'(b.x);
    ey = 15'(a.y) - 15'(b.y);
    return (ex >= 15'sd4) || (ex <= -15'sd4) || (ey >= 15'sd4) || (ey <= -15'sd4);
  endfunction

  function automatic logic [2:0] strength(input logic mb_edge, input logic p_intra, input logic q_intra,
                                          input logic p_nz, input logic q_nz,
                                          input mv_t p_mv, input mv_t q_mv,
                                          input logic signed [4:0] p_ref, input logic signed [4:0] q_ref);
    if (mb_edge && (p_intra || q_intra)) return 3'd4;
    if (p_intra || q_intra)              return 3'd3;
    if (p_nz || q_nz)                    return 3'd2;
    if (p_ref != q_ref || mv_far(p_mv, q_mv)) return 3'd1;
    return 3'd0;
  endfunction

  always_comb begin
    for (int e = 0; e < 4; e++)
      for (int s = 0; s < 4; s++) begin
        int qv, qh;
        qv = 4 * s + e;          // q block right of vertical edge e, row band s
        qh = 4 * e + s;          // q block below horizontal edge e, column s
        if (e == 0) begin
          bs_v[e][s] = strength(1'b1, left_intra, cur_intra, nz_left[s], nz_cur[qv],
                                mv_left[s], mv_cur[qv], ref_left[s], ref_cur[qv]);
          bs_h[e][s] = strength(1'b1, top_intra, cur_intra, nz_top[s], nz_cur[qh],
                                mv_top[s], mv_cur[qh], ref_top[s], ref_cur[qh]);
        end else begin
          bs_v[e][s] = strength(1'b0, cur_intra, cur_intra, nz_cur[qv - 1], nz_cur[qv],
                                mv_cur[qv - 1], mv_cur[qv], ref_cur[qv - 1], ref_cur[qv]);
          bs_h[e][s] = strength(1'b0, cur_intra, cur_intra, nz_cur[qh - 4], nz_cur[qh],
                                mv_cur[qh - 4], mv_cur[qh], ref_cur[qh - 4], ref_cur[qh]);
        end
      end
  end
endmodule
