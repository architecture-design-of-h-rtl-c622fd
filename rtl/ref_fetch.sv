// ref_fetch: reference-window fetch of the INTER_PRED engine, with reuse of
// reference pixels shared by the 4x4 blocks of one partition.
//
// One command describes a luma partition of w4 x h4 4x4 blocks (1, 2 or 4
// each way): the integer reference position (ref_x, ref_y) of its top-left
// pixel, the quarter-sample fraction (dx, dy) shared by all its blocks, its
// raster 4x4 position in the macroblock and the inter-buffer half.  The unit
// reads the union of the windows of all its blocks from the frame memory in
// one pass, one row request per cycle:
//   columns 4*w4 + 5 when dx != 0, else 4*w4  (no horizontal taps needed)
//   rows    4*h4 + 5 when dy != 0, else 4*h4  (no vertical taps needed)
// so a 16x16 partition with a fractional vector costs 21 x 21 = 441 pixels
// instead of 16 x 81 = 1296 for separate 9x9 windows, and an integer vector
// costs only the 256 pixels that are copied.  The rows land in a 21x21 pixel
// window buffer; then the unit hands the interpolator one 9x9 window per 4x4
// block (the block's integer pixels at [2..5][2..5]) in raster order inside
// the partition.  Window pixels that were not fetched are not used by the
// interpolator at that fraction and are sent as 0.
//
// Interface: cmd_* (valid/ready) takes a partition; mem_req_* asks for
// mem_req_len pixels of row mem_req_y starting at column mem_req_x; mem_rsp_*
// returns the rows in request order, left-aligned in mem_rsp_pix.  win_* is
// the window stream to inter_pred_luma.  fetched counts the pixels read
// since reset (the external-memory traffic of inter prediction).
// Timing: fetch takes one cycle per row plus the memory latency, then one
// window per cycle while win_ready is high.
//
// From the document: reading all reference pixels of a partition once,
// sharing them between its 4x4 blocks, and reading fewer pixels when the
// vector is integer.  This design's own: splitting the integer case per
// direction, the row-request memory port, and the requirement that the
// window lie inside the stored picture (border padding is the memory
// side's job).
module ref_fetch
  import h264_pkg::*;
#(
  parameter int unsigned PIC_W = 2048,   // luma picture width
  parameter int unsigned PIC_H = 1024    // luma picture height
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic [$clog2(PIC_W)-1:0] cmd_ref_x,   // top-left integer sample of the partition
  input  logic [$clog2(PIC_H)-1:0] cmd_ref_y,
  input  logic [1:0]  cmd_dx,
  input  logic [1:0]  cmd_dy,
  input  logic [2:0]  cmd_w4,      // width in 4x4 blocks: 1, 2 or 4
  input  logic [2:0]  cmd_h4,      // height in 4x4 blocks
  input  logic [3:0]  cmd_pos,     // raster 4x4 position of the top-left block
  input  logic        cmd_buf,
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output logic [$clog2(PIC_W)-1:0] mem_req_x,
  output logic [$clog2(PIC_H)-1:0] mem_req_y,
  output logic [4:0]  mem_req_len,
  input  logic        mem_rsp_valid,
  input  pixel_t      mem_rsp_pix [21],
  output logic        win_valid,
  input  logic        win_ready,
  output pixel_t      win [9][9],
  output logic [1:0]  win_dx,
  output logic [1:0]  win_dy,
  output logic [3:0]  win_pos,
  output logic        win_buf,
  output logic [31:0] fetched
);
  typedef enum logic [1:0] {F_IDLE, F_FETCH, F_EMIT} fstate_e;
  fstate_e state;

  pixel_t     wb [21][21];           // window buffer
  logic [1:0] dx_r, dy_r;
  logic [2:0] w4_r, h4_r;
  logic [3:0] pos_r;
  logic       buf_r;
  logic [$clog2(PIC_W)-1:0] x0_r;
  logic [$clog2(PIC_H)-1:0] y0_r;
  logic [4:0] nrows, ncols, rq, rs;
  logic [1:0] bx, by;
  logic       ext_c, ext_r;          // fetched with the 2-left/3-right (2-up/3-down) margin

  assign cmd_ready = (state == F_IDLE);
  assign ext_c = (dx_r != 2'd0);
  assign ext_r = (dy_r != 2'd0);
  assign ncols = ext_c ? 5'({w4_r, 2'b00}) + 5'd5 : 5'({w4_r, 2'b00});
  assign nrows = ext_r ? 5'({h4_r, 2'b00}) + 5'd5 : 5'({h4_r, 2'b00});

  assign mem_req_valid = (state == F_FETCH) && (rq < nrows);
  assign mem_req_x     = ext_c ? x0_r - 2 : x0_r;
  assign mem_req_y     = (ext_r ? y0_r - 2 : y0_r) + ($clog2(PIC_H))'(rq);
  assign mem_req_len   = ncols;

  // 9x9 window of block (bx, by): window pixel (r, c) is the reference sample
  // at (4*by + r - 2, 4*bx + c - 2) relative to the partition's top-left
  always_comb begin
    for (int r = 0; r < 9; r++)
      for (int c = 0; c < 9; c++) begin
        int br, bc;
        br = 4 * int'(by) + r - (ext_r ? 0 : 2);
        bc = 4 * int'(bx) + c - (ext_c ? 0 : 2);
        win[r][c] = (br >= 0 && br < int'(nrows) && bc >= 0 && bc < int'(ncols)) ? wb[br][bc] : 8'd0;
      end
  end
  assign win_valid = (state == F_EMIT);
  assign win_dx    = dx_r;
  assign win_dy    = dy_r;
  assign win_buf   = buf_r;
  assign win_pos   = pos_r + {by, bx};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= F_IDLE; dx_r <= '0; dy_r <= '0; w4_r <= 3'd1; h4_r <= 3'd1; pos_r <= '0; buf_r <= 1'b0;
      x0_r <= '0; y0_r <= '0; rq <= '0; rs <= '0; bx <= '0; by <= '0; fetched <= '0;
      for (int r = 0; r < 21; r++) for (int c = 0; c < 21; c++) wb[r][c] <= '0;
    end else begin
      unique case (state)
        F_IDLE: if (cmd_valid) begin
          dx_r <= cmd_dx; dy_r <= cmd_dy; w4_r <= cmd_w4; h4_r <= cmd_h4;
          pos_r <= cmd_pos; buf_r <= cmd_buf; x0_r <= cmd_ref_x; y0_r <= cmd_ref_y;
          rq <= '0; rs <= '0; bx <= '0; by <= '0;
          state <= F_FETCH;
        end
        F_FETCH: begin
          if (mem_req_valid && mem_req_ready) begin
            rq <= rq + 5'd1;
            fetched <= fetched + 32'(ncols);
          end
          if (mem_rsp_valid) begin
            for (int c = 0; c < 21; c++) wb[rs][c] <= mem_rsp_pix[c];
            rs <= rs + 5'd1;
            if (rs + 5'd1 == nrows) state <= F_EMIT;
          end
        end
        F_EMIT: if (win_ready) begin
          if (3'(bx) + 3'd1 < w4_r) bx <= bx + 2'd1;
          else begin
            bx <= '0;
            if (3'(by) + 3'd1 < h4_r) by <= by + 2'd1;
            else state <= F_IDLE;
          end
        end
        default: state <= F_IDLE;
      endcase
    end
  end

  // a response only ever answers an outstanding request
  assert property (@(posedge clk) disable iff (!rst_n) mem_rsp_valid |-> state == F_FETCH && rs < rq);
  assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && cmd_ready |-> cmd_w4 inside {3'd1, 3'd2, 3'd4} && cmd_h4 inside {3'd1, 3'd2, 3'd4});
endmodule
