// intramode_pred: IntraMode prediction -- derives the Intra4x4 prediction mode
// of a 4x4 block from the modes of its left (A) and upper (B) neighbours.
//
// Combinational.  predMode = min(modeA, modeB); it is 2 (DC) when either
// neighbour is unavailable.  A neighbour that is available but not coded in
// Intra4x4 (an inter or Intra16x16 block) counts as mode 2.  With
// prev_flag = 1 the block uses predMode; otherwise rem_mode selects one of
// the other eight modes (rem < pred ? rem : rem + 1).  These are the standard's
// rules; the neighbour modes come from the IntraMode register / SRAM.
module intramode_pred
  import h264_pkg::*;
(
  input  logic       a_avail,
  input  logic       a_is_i4,
  input  i4_mode_e   a_mode,
  input  logic       b_avail,
  input  logic       b_is_i4,
  input  i4_mode_e   b_mode,
  input  logic       prev_flag,
  input  logic [2:0] rem_mode,
  output i4_mode_e   pred_mode,
  output i4_mode_e   mode
);
  always_comb begin
    logic [3:0] ma, mb, p;
    ma = a_is_i4 ? a_mode : I4_DC;
    mb = b_is_i4 ? b_mode : I4_DC;
    if (!a_avail || !b_avail) p = I4_DC;
    else                      p = (ma < mb) ? ma : mb;
    pred_mode = i4_mode_e'(p);
    if (prev_flag)                 mode = i4_mode_e'(p);
    else if ({1'b0, rem_mode} < p) mode = i4_mode_e'({1'b0, rem_mode});
    else                           mode = i4_mode_e'({1'b0, rem_mode} + 4'd1);
  end
endmodule
