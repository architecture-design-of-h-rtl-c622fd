// h264_decoder_top: decoder core with hybrid task pipelining -- the 4x4-block
// pipeline (PARSER/CAVLD, IQ/IT, INTRA_PRED), the macroblock pipeline
// (INTER_PRED into a ping-pong Inter-Predicted MB Buffer, SUM_AND_CLIPPING)
// and the macroblock pipeline DEBLOCK engine.
//
// Data path of a luma 4x4 block:
//   system bus -> Bitstream SRAM (bs_fifo) -> cavld (coeff_token ... inverse
//   scan) -> iq_it (4 residues/cycle) -> sum_clip, with the prediction row
//   taken from intra_pred4x4 (intra MB) or from the Inter-Predicted MB Buffer
//   (inter MB) -> reconstructed rows out on rec_* and written into the DEBLOCK
//   SRAMs at the block's place in the macroblock.
// Blocks are decoded in double-z-scan order (blk_idx); the inter buffer is
// filled by INTER_PRED in its own order (partition by partition) one
// macroblock ahead, which is why it is double-buffered (rf_buf / blk_buf).
// CAVLD, IQ/IT and INTRA_PRED overlap on successive 4x4 blocks (4x4-block
// pipelining); the INTER_PRED of the next macroblock and the DEBLOCK of the
// previous one run beside them (macroblock pipelining).  For an intra MB the
// inter path is idle, for an inter MB the intra unit is idle.
//
// Ports: blk_* commands the parser (one residual block or one Exp-Golomb
// symbol per command; symbol results leave on sym_*); ip_* gives the intra
// unit the parsed mode syntax, the neighbour modes and the neighbour pixels of
// the next intra block (the mode is derived by the intra mode predictor and
// returned on ip_mode); mv_* is the motion vector predictor; rf_* takes one
// inter partition (reference position, fraction, size), whose reference
// window ref_fetch reads once over mem_* and cuts into 9x9 windows for the
// interpolator; rec_* carries reconstructed rows
// (back-pressure stalls the whole pipeline); db_* is the bus port of the
// DEBLOCK SRAMs (granted when no reconstructed row is being written) and the
// engine's coding information.  The sequencing of macroblock headers, the
// neighbour pixel/mode/motion memories and the bus interfaces sit outside this
// core and drive these ports.
// Document: the partition into engines and buffers, the three pipelining
// levels and the degree of parallelism 4.  This design's: the port protocols,
// the buffer depths, luma-only reconstruction in this core, and one bubble
// cycle per inter block at the MB-buffer read.
module h264_decoder_top
  import h264_pkg::*;
#(
  parameter int unsigned NSYM     = 2,    // CAVLD levels/runs per cycle
  parameter int unsigned BS_DEPTH = 128,  // Bitstream SRAM words
  parameter int unsigned PIC_W    = 2048, // luma picture size
  parameter int unsigned PIC_H    = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  // system bus -> Bitstream SRAM
  input  logic              bs_wr_en,
  input  logic [31:0]       bs_wr_data,
  output logic              bs_full,
  // parser commands
  input  logic              blk_valid,
  output logic              blk_ready,
  input  cavld_cmd_t        blk_cmd,
  input  logic [5:0]        blk_qp,
  input  logic [3:0]        blk_idx,     // luma 4x4 block, decoding order
  input  logic              blk_intra,
  input  logic              blk_buf,     // inter buffer holding this MB's prediction
  output logic              sym_valid,
  output logic signed [17:0] sym_value,
  output logic [4:0]        blk_total_coeff,
  // intra prediction requests
  input  logic              ip_valid,
  output logic              ip_ready,
  input  logic              ip_a_avail,   // left block: available, Intra4x4, its mode
  input  logic              ip_a_is_i4,
  input  i4_mode_e          ip_a_mode,
  input  logic              ip_b_avail,   // upper block
  input  logic              ip_b_is_i4,
  input  i4_mode_e          ip_b_mode,
  input  logic              ip_prev_flag, // prev_intra4x4_pred_mode_flag
  input  logic [2:0]        ip_rem_mode,  // rem_intra4x4_pred_mode
  output i4_mode_e          ip_mode,      // mode used (to the IntraMode memory)
  input  pixel_t            ip_top [8],
  input  pixel_t            ip_left [4],
  input  pixel_t            ip_corner,
  input  logic              ip_top_avail,
  input  logic              ip_left_avail,
  input  logic              ip_tr_avail,
  // motion vector prediction (neighbour motion information in, predictor out)
  input  mv_t               mv_nb [4],    // A, B, C, D
  input  logic signed [4:0] mv_ref_nb [4],
  input  logic signed [4:0] mv_ref_cur,
  input  logic [1:0]        mv_shape,
  input  logic              mv_part_idx,
  output mv_t               mv_pred_out,
  // inter prediction: partition commands and the reference-frame memory port
  input  logic              rf_valid,
  output logic              rf_ready,
  input  logic [$clog2(PIC_W)-1:0] rf_ref_x,  // integer reference sample of the partition's top-left pixel
  input  logic [$clog2(PIC_H)-1:0] rf_ref_y,
  input  logic [1:0]        rf_dx,        // quarter-sample fraction
  input  logic [1:0]        rf_dy,
  input  logic [2:0]        rf_w4,        // partition size in 4x4 blocks
  input  logic [2:0]        rf_h4,
  input  logic [3:0]        rf_pos,       // raster position of its top-left 4x4 block
  input  logic              rf_buf,       // inter buffer half (macroblock parity)
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic [$clog2(PIC_W)-1:0] mem_req_x,
  output logic [$clog2(PIC_H)-1:0] mem_req_y,
  output logic [4:0]        mem_req_len,
  input  logic              mem_rsp_valid,
  input  pixel_t            mem_rsp_pix [21],
  output logic [31:0]       ref_fetched,  // reference pixels read since reset
  // reconstructed rows
  output logic              rec_valid,
  input  logic              rec_ready,
  output pixel_t            rec_pix [4],
  output logic [3:0]        rec_pos,
  output logic [1:0]        rec_row,
  // DEBLOCK: bus port and coding information
  input  logic              db_bus_en,
  input  logic              db_bus_we,
  input  logic              db_bus_bank,
  input  logic [6:0]        db_bus_addr,
  input  logic [31:0]       db_bus_wdata,
  output logic [31:0]       db_bus_rdata,
  output logic              db_bus_gnt,
  input  logic              db_start,
  input  logic [2:0]        db_bs_v [4][4],
  input  logic [2:0]        db_bs_h [4][4],
  input  logic [5:0]        db_qp [3],    // current, left, upper MB (luma)
  input  logic [5:0]        db_qpc [3],   // same for chroma
  input  logic signed [4:0] db_off_a,
  input  logic signed [4:0] db_off_b,
  input  logic              db_left_avail,
  input  logic              db_top_avail,
  output logic              db_busy,
  output logic              db_done,
  output logic [15:0]       db_seg_filtered
);
  // ------------------------------------------------------------ bitstream
  logic [31:0] bs_word;
  logic        bs_wvalid, bs_wready;
  bs_fifo #(.DEPTH(BS_DEPTH)) u_bs (
    .clk, .rst_n, .wr_en(bs_wr_en), .wr_data(bs_wr_data), .full(bs_full),
    .rd_valid(bs_wvalid), .rd_ready(bs_wready), .rd_data(bs_word)
  );

  // ------------------------------------------------- block metadata queue
  typedef struct packed {
    logic [3:0] pos;
    logic       intra;
    logic       buff;
  } meta_t;
  meta_t       mq [4];
  logic [2:0]  mq_n;
  logic        mq_push, mq_pop;
  logic [5:0]  qp_r;
  logic        is_sym_r;

  // ------------------------------------------------------------- parser
  logic  cv_cmd_ready, cv_out_valid, cv_out_ready;
  coef_t cv_coef [16];
  logic  is_res_cmd;
  assign is_res_cmd = (blk_cmd.kind != CMD_UE) && (blk_cmd.kind != CMD_SE);
  assign blk_ready  = cv_cmd_ready && (mq_n < 3'd4);
  assign mq_push    = blk_valid && blk_ready && is_res_cmd;

  cavld #(.NSYM(NSYM)) u_cavld (
    .clk, .rst_n, .bs_data(bs_word), .bs_valid(bs_wvalid), .bs_ready(bs_wready),
    .cmd_valid(blk_valid && blk_ready), .cmd_ready(cv_cmd_ready), .cmd(blk_cmd),
    .out_valid(cv_out_valid), .out_ready(cv_out_ready), .coef(cv_coef),
    .total_coeff(blk_total_coeff), .value(sym_value)
  );

  // --------------------------------------------------------------- IQ/IT
  logic   iq_in_ready, iq_out_valid, iq_out_ready;
  resid_t iq_row [4];
  logic [1:0] iq_y;
  assign sym_valid    = cv_out_valid && is_sym_r;
  assign cv_out_ready = is_sym_r ? 1'b1 : iq_in_ready;

  iq_it u_iqit (
    .clk, .rst_n, .in_valid(cv_out_valid && !is_sym_r), .in_ready(iq_in_ready),
    .in_coef(cv_coef), .in_qp(qp_r), .in_dc_pre(1'b0),
    .out_valid(iq_out_valid), .out_ready(iq_out_ready), .out_row(iq_row), .out_y(iq_y)
  );

  // ------------------------------------- PARSER: intra mode / MV prediction
  i4_mode_e ip_pred_mode;
  intramode_pred u_imode (
    .a_avail(ip_a_avail), .a_is_i4(ip_a_is_i4), .a_mode(ip_a_mode),
    .b_avail(ip_b_avail), .b_is_i4(ip_b_is_i4), .b_mode(ip_b_mode),
    .prev_flag(ip_prev_flag), .rem_mode(ip_rem_mode), .pred_mode(ip_pred_mode), .mode(ip_mode)
  );
  mv_pred u_mvp (
    .mv_a(mv_nb[0]), .mv_b(mv_nb[1]), .mv_c(mv_nb[2]), .mv_d(mv_nb[3]),
    .ref_a(mv_ref_nb[0]), .ref_b(mv_ref_nb[1]), .ref_c(mv_ref_nb[2]), .ref_d(mv_ref_nb[3]),
    .ref_cur(mv_ref_cur), .shape(mv_shape), .part_idx(mv_part_idx), .mvp(mv_pred_out)
  );

  // ----------------------------------------------------------- INTRA_PRED
  logic   ip_out_valid, ip_out_ready;
  pixel_t ip_row [4];
  logic [1:0] ip_y;
  intra_pred4x4 u_intra (
    .clk, .rst_n, .in_valid(ip_valid), .in_ready(ip_ready), .in_mode(ip_mode),
    .in_top(ip_top), .in_left(ip_left), .in_corner(ip_corner),
    .in_top_avail(ip_top_avail), .in_left_avail(ip_left_avail), .in_tr_avail(ip_tr_avail),
    .out_valid(ip_out_valid), .out_ready(ip_out_ready), .out_row(ip_row), .out_y(ip_y)
  );

  // ----------------------------------------------------------- INTER_PRED
  logic       iw_valid, iw_ready, iw_buf;
  pixel_t     iw_win [9][9];
  logic [1:0] iw_dx, iw_dy;
  logic [3:0] iw_pos;
  ref_fetch #(.PIC_W(PIC_W), .PIC_H(PIC_H)) u_fetch (
    .clk, .rst_n, .cmd_valid(rf_valid), .cmd_ready(rf_ready), .cmd_ref_x(rf_ref_x), .cmd_ref_y(rf_ref_y),
    .cmd_dx(rf_dx), .cmd_dy(rf_dy), .cmd_w4(rf_w4), .cmd_h4(rf_h4), .cmd_pos(rf_pos), .cmd_buf(rf_buf),
    .mem_req_valid, .mem_req_ready, .mem_req_x, .mem_req_y, .mem_req_len, .mem_rsp_valid, .mem_rsp_pix,
    .win_valid(iw_valid), .win_ready(iw_ready), .win(iw_win), .win_dx(iw_dx), .win_dy(iw_dy),
    .win_pos(iw_pos), .win_buf(iw_buf), .fetched(ref_fetched)
  );

  logic   lp_out_valid;
  pixel_t lp_row [4];
  logic [1:0] lp_y;
  logic [3:0] lp_pos;
  logic       lp_buf;
  inter_pred_luma u_inter (
    .clk, .rst_n, .in_valid(iw_valid), .in_ready(iw_ready), .in_win(iw_win),
    .in_dx(iw_dx), .in_dy(iw_dy),
    .out_valid(lp_out_valid), .out_ready(1'b1), .out_row(lp_row), .out_y(lp_y)
  );
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin lp_pos <= '0; lp_buf <= 1'b0; end
    else if (iw_valid && iw_ready) begin lp_pos <= iw_pos; lp_buf <= iw_buf; end

  // Inter-Predicted MB Buffer: 2 MBs x 16 blocks x 4 rows of 4 pixels
  logic [6:0]  ib_raddr, ib_tag;
  logic        ib_tag_ok;
  logic [31:0] ib_rdata, ib_wdata;
  always_comb for (int x = 0; x < 4; x++) ib_wdata[8*x +: 8] = lp_row[x];
  sram_dp #(.DEPTH(128), .WIDTH(32)) u_interbuf (
    .clk,
    .a_en(1'b1), .a_we(1'b0), .a_addr(ib_raddr), .a_wdata('0), .a_rdata(ib_rdata),
    .b_en(lp_out_valid), .b_we(1'b1), .b_addr({lp_buf, lp_pos, lp_y}), .b_wdata(ib_wdata), .b_rdata()
  );

  // ----------------------------------------------------- reconstruction
  meta_t      cur;
  logic [1:0] row;
  logic       pred_valid, fire, sc_in_ready;
  pixel_t     pred [4];
  logic [6:0] cur_addr;

  assign cur      = mq[0];
  assign cur_addr = {cur.buff, cur.pos, row};
  assign pred_valid = (mq_n != 3'd0) && (cur.intra ? ip_out_valid : (ib_tag_ok && ib_tag == cur_addr));
  always_comb
    for (int x = 0; x < 4; x++) pred[x] = cur.intra ? ip_row[x] : ib_rdata[8*x +: 8];
  assign fire         = iq_out_valid && pred_valid && sc_in_ready;
  assign iq_out_ready = pred_valid && sc_in_ready;
  assign ip_out_ready = (mq_n != 3'd0) && cur.intra && iq_out_valid && sc_in_ready;
  assign mq_pop       = fire && (row == 2'd3);
  // read ahead: the next row of the same block is addressed in the cycle the
  // current one is used
  assign ib_raddr = (fire && row != 2'd3) ? {cur.buff, cur.pos, row + 2'd1} : cur_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mq_n <= '0; row <= '0; qp_r <= '0; is_sym_r <= 1'b0; ib_tag <= '0; ib_tag_ok <= 1'b0;
      for (int i = 0; i < 4; i++) mq[i] <= '0;
    end else begin
      ib_tag <= ib_raddr; ib_tag_ok <= 1'b1;
      if (blk_valid && blk_ready) begin qp_r <= blk_qp; is_sym_r <= !is_res_cmd; end
      if (fire) row <= row + 2'd1;
      // queue: pop shifts, push appends
      if (mq_pop) begin
        for (int i = 0; i < 3; i++) mq[i] <= mq[i + 1];
        if (mq_push) mq[mq_n - 3'd1] <= '{pos: blk_pos(blk_idx), intra: blk_intra, buff: blk_buf};
      end else if (mq_push)
        mq[mq_n[1:0]] <= '{pos: blk_pos(blk_idx), intra: blk_intra, buff: blk_buf};
      mq_n <= mq_n + 3'(mq_push) - 3'(mq_pop);
    end
  end

  // residue rows and prediction rows belong to the same block row
  assert property (@(posedge clk) disable iff (!rst_n) fire |-> iq_y == row);
  assert property (@(posedge clk) disable iff (!rst_n) fire && cur.intra |-> ip_y == row);

  // ------------------------------------------------------ SUM_AND_CLIPPING
  logic [3:0] sc_pos;
  logic [1:0] sc_row;
  sum_clip u_sum (
    .clk, .rst_n, .in_valid(fire), .in_ready(sc_in_ready), .in_pred(pred), .in_res(iq_row),
    .out_valid(rec_valid), .out_ready(rec_ready), .out_pix(rec_pix)
  );
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin sc_pos <= '0; sc_row <= '0; end
    else if (sc_in_ready && fire) begin sc_pos <= cur.pos; sc_row <= row; end
  assign rec_pos = sc_pos;
  assign rec_row = sc_row;

  // ------------------------------------------------------------- DEBLOCK
  logic        rec_wr;
  logic [31:0] rec_word;
  logic [7:0]  rec_addr;   // {bank, index} in the DEBLOCK SRAMs
  assign rec_wr = rec_valid && rec_ready;
  always_comb begin
    int c, r;
    c = int'(sc_pos[1:0]);
    r = 4 * int'(sc_pos[3:2]) + int'(sc_row);
    rec_addr = {1'(c % 2), 7'((c / 2) * 20 + r + 4)};
    for (int x = 0; x < 4; x++) rec_word[8*x +: 8] = rec_pix[x];
  end
  assign db_bus_gnt = !rec_wr;

  deblock_engine u_deblock (
    .clk, .rst_n,
    .bus_en(rec_wr || db_bus_en), .bus_we(rec_wr || db_bus_we),
    .bus_bank(rec_wr ? rec_addr[7] : db_bus_bank), .bus_addr(rec_wr ? rec_addr[6:0] : db_bus_addr),
    .bus_wdata(rec_wr ? rec_word : db_bus_wdata), .bus_rdata(db_bus_rdata),
    .start(db_start), .bs_v(db_bs_v), .bs_h(db_bs_h),
    .qp_cur(db_qp[0]), .qp_left(db_qp[1]), .qp_top(db_qp[2]),
    .qpc_cur(db_qpc[0]), .qpc_left(db_qpc[1]), .qpc_top(db_qpc[2]),
    .off_a(db_off_a), .off_b(db_off_b), .left_avail(db_left_avail), .top_avail(db_top_avail),
    .busy(db_busy), .done(db_done), .seg_filtered(db_seg_filtered)
  );
endmodule
