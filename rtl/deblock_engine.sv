// deblock_engine: DEBLOCK engine -- filters every edge of one macroblock
// (luma 16x16 and both 8x8 chroma blocks) with two 1-D filters working on an
// 8x4 pixel array that is loaded from, and written back to, two half-sized
// dual-port SRAMs.
//
// Memory: two 80x32 dual-port SRAMs.  A word is four horizontally adjacent
// pixels of one row of one 4x4 block (pixel x in bits 8x+7..8x).  Together the
// two memories hold exactly the current MB plus the 4 neighbouring rows above
// it and the 4 neighbouring columns left of it, for Y, Cb and Cr
// (96 + 32 + 32 = 160 words):
//   luma column c = 0..3, row r = -4..15 : bank c%2, index (c/2)*20 + r + 4
//   luma left column,     row r =  0..15 : bank r/8, index 40 + r%8
//   chroma k (0 Cb, 1 Cr) column c = 0..1, row r = -4..7 : bank k, 48 + 12c + r + 4
//   chroma k left column, row r = 0..7   : bank k, index 72 + r
// (db_word_addr below).  The bus loads the MB and its neighbours before `start`
// and reads the filtered words back after `done`; while the engine is busy the
// bus port is ignored.
//
// Schedule (control unit): luma vertical edges left to right, then luma
// horizontal edges top to bottom, then the same for Cb and Cr, as the standard
// orders them.  Each edge is split into segments of four lines (one 4x4 block
// boundary).  A segment whose bS is 0, or that lies on a picture border
// (left_avail / top_avail low), is skipped.  Otherwise:
//   LOAD   5 cycles: the p-side 4x4 block is read on port A and the q-side
//          block on port B (one word each per cycle) into the 8x4 pixel array,
//          transposed for horizontal edges so that a line always runs across
//          the edge;
//   FILTER 2 cycles: the two 1-D filters process two lines per cycle;
//   STORE  4 cycles: both blocks are written back on the same ports.
// Coding-information registers (bS per segment, QPs of the current, left and
// upper MBs, filter offsets) are sampled at `start`.  Chroma lines take the bS
// of the luma line they cover and the chroma QPs given on the ports.
//
// From the document: two half-sized (80x32) dual-port SRAMs in place of one,
// an 8x4 pixel array with a reconfigurable path for horizontal and vertical
// edges, two 1-D filters, a control unit and coding-information registers.
// This design's own: the word layout above, the segment schedule and its
// cycle count (11 cycles per filtered segment, at most 528 per MB), and the
// port protocol.  bS itself is an input (its derivation is outside the engine).
module deblock_engine
  import h264_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // bus interface: one word per cycle, read data one cycle later
  input  logic              bus_en,
  input  logic              bus_we,
  input  logic              bus_bank,
  input  logic [6:0]        bus_addr,
  input  logic [31:0]       bus_wdata,
  output logic [31:0]       bus_rdata,
  // coding information
  input  logic              start,
  input  logic [2:0]        bs_v [4][4],   // [vertical edge x/4][row band]
  input  logic [2:0]        bs_h [4][4],   // [horizontal edge y/4][column block]
  input  logic [5:0]        qp_cur,
  input  logic [5:0]        qp_left,
  input  logic [5:0]        qp_top,
  input  logic [5:0]        qpc_cur,
  input  logic [5:0]        qpc_left,
  input  logic [5:0]        qpc_top,
  input  logic signed [4:0] off_a,
  input  logic signed [4:0] off_b,
  input  logic              left_avail,
  input  logic              top_avail,
  output logic              busy,
  output logic              done,
  output logic [15:0]       seg_filtered   // segments filtered in the last MB
);
  // ---------------------------------------------------------------- memories
  logic        a_en [2], a_we [2], b_en [2], b_we [2];
  logic [6:0]  a_addr [2], b_addr [2];
  logic [31:0] a_wd [2], b_wd [2], a_rd [2], b_rd [2];

  for (genvar g = 0; g < 2; g++) begin : g_bank
    sram_dp #(.DEPTH(80), .WIDTH(32)) u_sram (
      .clk(clk),
      .a_en(a_en[g]), .a_we(a_we[g]), .a_addr(a_addr[g]), .a_wdata(a_wd[g]), .a_rdata(a_rd[g]),
      .b_en(b_en[g]), .b_we(b_we[g]), .b_addr(b_addr[g]), .b_wdata(b_wd[g]), .b_rdata(b_rd[g])
    );
  end

  // {bank, index} of the word holding row r of block column c of component k
  function automatic logic [7:0] db_word_addr(input logic [1:0] k, input int c, input int r);
    if (k == 2'd0) begin
      if (c < 0) return {1'(r / 8), 7'(40 + r % 8)};
      return {1'(c % 2), 7'((c / 2) * 20 + r + 4)};
    end
    if (c < 0) return {1'(k - 2'd1), 7'(72 + r)};
    return {1'(k - 2'd1), 7'(48 + 12 * c + r + 4)};
  endfunction

  // ------------------------------------------------------ coding info regs
  logic [2:0]        r_bs_v [4][4];
  logic [2:0]        r_bs_h [4][4];
  logic [5:0]        r_qp [3], r_qpc [3];   // cur, left, top
  logic signed [4:0] r_oa, r_ob;
  logic              r_la, r_ta;

  // ---------------------------------------------------------- control unit
  typedef enum logic [2:0] {D_IDLE, D_NEXT, D_LOAD, D_FILT, D_STORE, D_DONE} dstate_e;
  dstate_e     st;
  logic [1:0]  comp;     // 0 Y, 1 Cb, 2 Cr
  logic        dir;      // 0 vertical edges, 1 horizontal edges
  logic [1:0]  edge_i;   // edge index (x/4 or y/4)
  logic [1:0]  seg;      // band (vertical) or column block (horizontal)
  logic [2:0]  cnt;
  pixel_t      arr [8][4];   // [position p3..p0 q0..q3][line]

  logic [1:0]  n_edges, n_segs;
  assign n_edges = (comp == 2'd0) ? 2'd3 : 2'd1;   // last index
  assign n_segs  = (comp == 2'd0) ? 2'd3 : 2'd1;

  // bS of line l of the current segment
  function automatic logic [2:0] line_bs(input logic [1:0] k, input logic d, input logic [1:0] e,
                                         input logic [1:0] s, input int l);
    int le, ls;
    if (k == 2'd0) begin le = e; ls = s; end
    else begin le = 2 * e; ls = 2 * s + l / 2; end
    return d ? r_bs_h[le][ls] : r_bs_v[le][ls];
  endfunction

  logic seg_skip;
  always_comb begin
    seg_skip = 1'b1;
    for (int l = 0; l < 4; l++) if (line_bs(comp, dir, edge_i, seg, l) != 3'd0) seg_skip = 1'b0;
    if (edge_i == 2'd0 && !(dir ? r_ta : r_la)) seg_skip = 1'b1;
  end

  // word k of the p / q block of the current segment
  function automatic logic [7:0] p_word(input int k);
    if (!dir) return db_word_addr(comp, int'(edge_i) - 1, 4 * int'(seg) + k);
    return db_word_addr(comp, int'(seg), 4 * int'(edge_i) - 4 + k);
  endfunction
  function automatic logic [7:0] q_word(input int k);
    if (!dir) return db_word_addr(comp, int'(edge_i), 4 * int'(seg) + k);
    return db_word_addr(comp, int'(seg), 4 * int'(edge_i) + k);
  endfunction

  // ------------------------------------------------------------- filters
  logic [5:0] qp_av;
  always_comb begin
    logic [5:0] qp_p, qp_q;
    qp_q = (comp == 2'd0) ? r_qp[0] : r_qpc[0];
    if (edge_i != 2'd0) qp_p = qp_q;
    else if (comp == 2'd0) qp_p = dir ? r_qp[2] : r_qp[1];
    else qp_p = dir ? r_qpc[2] : r_qpc[1];
    qp_av = 6'((7'(qp_p) + 7'(qp_q) + 7'd1) >> 1);
  end

  pixel_t fp [2][4], fq [2][4], fpo [2][3], fqo [2][3];
  logic   ff [2];
  for (genvar f = 0; f < 2; f++) begin : g_filt
    always_comb
      for (int j = 0; j < 4; j++) begin
        fp[f][j] = arr[3 - j][2 * cnt[0] + f];
        fq[f][j] = arr[4 + j][2 * cnt[0] + f];
      end
    deblock_filter u_filt (
      .p(fp[f]), .q(fq[f]), .bs(line_bs(comp, dir, edge_i, seg, 2 * int'(cnt[0]) + f)),
      .chroma(comp != 2'd0), .qp_av(qp_av), .off_a(r_oa), .off_b(r_ob),
      .pf(fpo[f]), .qf(fqo[f]), .filtered(ff[f])
    );
  end

  // ------------------------------------------------------------- ports
  function automatic logic [31:0] pack_p(input int k);
    logic [31:0] w;
    for (int x = 0; x < 4; x++) w[8*x +: 8] = dir ? arr[k][x] : arr[x][k];
    return w;
  endfunction
  function automatic logic [31:0] pack_q(input int k);
    logic [31:0] w;
    for (int x = 0; x < 4; x++) w[8*x +: 8] = dir ? arr[4 + k][x] : arr[4 + x][k];
    return w;
  endfunction

  logic       rd_bank_p, rd_bank_q;
  logic [7:0] pw, qw;
  always_comb begin
    for (int g = 0; g < 2; g++) begin
      a_en[g] = 1'b0; a_we[g] = 1'b0; a_addr[g] = '0; a_wd[g] = '0;
      b_en[g] = 1'b0; b_we[g] = 1'b0; b_addr[g] = '0; b_wd[g] = '0;
    end
    pw = p_word(int'(cnt[1:0]));
    qw = q_word(int'(cnt[1:0]));
    if (st == D_IDLE) begin
      a_en[bus_bank] = bus_en; a_we[bus_bank] = bus_we; a_addr[bus_bank] = bus_addr; a_wd[bus_bank] = bus_wdata;
    end else if ((st == D_LOAD && cnt < 3'd4) || st == D_STORE) begin
      a_en[pw[7]] = 1'b1; a_addr[pw[7]] = pw[6:0];
      b_en[qw[7]] = 1'b1; b_addr[qw[7]] = qw[6:0];
      if (st == D_STORE) begin
        a_we[pw[7]] = 1'b1; a_wd[pw[7]] = pack_p(int'(cnt[1:0]));
        b_we[qw[7]] = 1'b1; b_wd[qw[7]] = pack_q(int'(cnt[1:0]));
      end
    end
  end

  logic bus_bank_q;
  assign bus_rdata = a_rd[bus_bank_q];
  assign busy = (st != D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; comp <= '0; dir <= 1'b0; edge_i <= '0; seg <= '0; cnt <= '0;
      done <= 1'b0; seg_filtered <= '0; bus_bank_q <= 1'b0; rd_bank_p <= 1'b0; rd_bank_q <= 1'b0;
      r_oa <= '0; r_ob <= '0; r_la <= 1'b0; r_ta <= 1'b0;
      for (int i = 0; i < 3; i++) begin r_qp[i] <= '0; r_qpc[i] <= '0; end
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin r_bs_v[i][j] <= '0; r_bs_h[i][j] <= '0; end
      for (int i = 0; i < 8; i++) for (int j = 0; j < 4; j++) arr[i][j] <= '0;
    end else begin
      done <= 1'b0;
      bus_bank_q <= bus_bank;
      case (st)
        D_IDLE: if (start) begin
          r_bs_v <= bs_v; r_bs_h <= bs_h;
          r_qp[0] <= qp_cur; r_qp[1] <= qp_left; r_qp[2] <= qp_top;
          r_qpc[0] <= qpc_cur; r_qpc[1] <= qpc_left; r_qpc[2] <= qpc_top;
          r_oa <= off_a; r_ob <= off_b; r_la <= left_avail; r_ta <= top_avail;
          comp <= '0; dir <= 1'b0; edge_i <= '0; seg <= '0; cnt <= '0;
          seg_filtered <= '0;
          st <= D_NEXT;
        end
        D_NEXT: begin
          // decide on the current segment
          if (!seg_skip) begin st <= D_LOAD; cnt <= '0; seg_filtered <= seg_filtered + 16'd1; end
          else begin
            // advance to the next segment
            if (seg != n_segs) seg <= seg + 2'd1;
            else begin
              seg <= '0;
              if (edge_i != n_edges) edge_i <= edge_i + 2'd1;
              else begin
                edge_i <= '0;
                if (!dir) dir <= 1'b1;
                else begin
                  dir <= 1'b0;
                  if (comp == 2'd2) st <= D_DONE;
                  else comp <= comp + 2'd1;
                end
              end
            end
          end
        end
        D_LOAD: begin
          rd_bank_p <= pw[7]; rd_bank_q <= qw[7];
          if (cnt != 3'd0) begin
            for (int x = 0; x < 4; x++) begin
              if (!dir) begin
                arr[x][cnt - 3'd1]     <= a_rd[rd_bank_p][8*x +: 8];
                arr[4 + x][cnt - 3'd1] <= b_rd[rd_bank_q][8*x +: 8];
              end else begin
                arr[cnt - 3'd1][x]     <= a_rd[rd_bank_p][8*x +: 8];
                arr[4 + cnt - 3'd1][x] <= b_rd[rd_bank_q][8*x +: 8];
              end
            end
          end
          cnt <= cnt + 3'd1;
          if (cnt == 3'd4) begin st <= D_FILT; cnt <= '0; end
        end
        D_FILT: begin
          for (int f = 0; f < 2; f++)
            for (int j = 0; j < 3; j++) begin
              arr[3 - j][2 * cnt[0] + f] <= fpo[f][j];
              arr[4 + j][2 * cnt[0] + f] <= fqo[f][j];
            end
          cnt <= cnt + 3'd1;
          if (cnt[0]) begin st <= D_STORE; cnt <= '0; end
        end
        D_STORE: begin
          cnt <= cnt + 3'd1;
          if (cnt == 3'd3) begin
            cnt <= '0;
            st <= D_NEXT;
            // same advance as a skipped segment
            if (seg != n_segs) seg <= seg + 2'd1;
            else begin
              seg <= '0;
              if (edge_i != n_edges) edge_i <= edge_i + 2'd1;
              else begin
                edge_i <= '0;
                if (!dir) dir <= 1'b1;
                else begin
                  dir <= 1'b0;
                  if (comp == 2'd2) st <= D_DONE;
                  else comp <= comp + 2'd1;
                end
              end
            end
          end
        end
        D_DONE: begin done <= 1'b1; st <= D_IDLE; end
        default: st <= D_IDLE;
      endcase
    end
  end
endmodule
