// h264_pkg: types, constants and table functions shared by the decoder blocks.
//
// The tables are those of H.264/AVC baseline profile (run_before, total_zeros
// for 4x4 blocks, deblocking alpha/beta/tC0, dequantisation multipliers).
// The hardware around them decides when they are looked up; these functions are
// pure combinational lookups so that a block can place one or several copies of a
// table in a cycle (the multi-symbol CAVLD does this).
package h264_pkg;

  typedef logic [7:0]         pixel_t;
  typedef logic signed [15:0] coef_t;
  typedef logic signed [15:0] resid_t;

  // Intra 4x4 prediction modes (standard numbering).
  typedef enum logic [3:0] {
    I4_VERTICAL   = 4'd0, I4_HORIZONTAL = 4'd1, I4_DC       = 4'd2,
    I4_DIAG_DL    = 4'd3, I4_DIAG_DR    = 4'd4, I4_VERT_R   = 4'd5,
    I4_HORIZ_D    = 4'd6, I4_VERT_L     = 4'd7, I4_HORIZ_U  = 4'd8
  } i4_mode_e;

  // Commands of the PARSER engine's symbol decoder (cavld).
  typedef enum logic [2:0] {
    CMD_UE   = 3'd0,  // one ue(v) Exp-Golomb symbol
    CMD_SE   = 3'd1,  // one se(v) Exp-Golomb symbol
    CMD_BLK  = 3'd2,  // residual 4x4 block, maxNumCoeff 16 (luma 4x4, Intra16x16 DC)
    CMD_AC   = 3'd3,  // residual AC block, maxNumCoeff 15, first coefficient at index 1
    CMD_CDC  = 3'd4   // chroma DC 2x2 block, maxNumCoeff 4, nC = -1
  } cmd_kind_e;

  typedef struct packed {
    cmd_kind_e         kind;
    logic signed [5:0] nc;   // nC of the block (ignored for CMD_CDC / CMD_UE / CMD_SE)
  } cavld_cmd_t;

  typedef struct packed {
    logic signed [13:0] x;   // quarter-pel units
    logic signed [13:0] y;
  } mv_t;

  // Zig-zag scan of a 4x4 frame block: scan index -> raster index (4*row+col).
  function automatic logic [3:0] zigzag4x4(input logic [3:0] k);
    case (k)
      4'd0: return 4'd0;   4'd1: return 4'd1;   4'd2: return 4'd4;   4'd3: return 4'd8;
      4'd4: return 4'd5;   4'd5: return 4'd2;   4'd6: return 4'd3;   4'd7: return 4'd6;
      4'd8: return 4'd9;   4'd9: return 4'd12;  4'd10: return 4'd13; 4'd11: return 4'd10;
      4'd12: return 4'd7;  4'd13: return 4'd11; 4'd14: return 4'd14; default: return 4'd15;
    endcase
  endfunction

  // Double-z-scan: luma 4x4 block index in decoding order -> raster position
  // (4*row + column) of the block inside its macroblock.
  function automatic logic [3:0] blk_pos(input logic [3:0] k);
    return {k[3], k[1], k[2], k[0]};
  endfunction

  // Count of leading zero bits of a 16-bit field (16 when all zero).
  function automatic logic [4:0] clz16(input logic [15:0] v);
    logic [4:0] n;
    n = 5'd16;
    for (int i = 0; i < 16; i++)
      if (v[i]) n = 5'(15 - i);
    return n;
  endfunction

  // run_before: returns {length[3:0], run[3:0]} for the code at the top of w.
  // zl = zerosLeft (1..14).  w[15] is the next bit of the stream.
  function automatic logic [7:0] run_before_lut(input logic [3:0] zl, input logic [15:0] w);
    logic [3:0] len, run;
    len = 4'd1; run = 4'd0;
    case (zl)
      4'd1: begin len = 4'd1; run = w[15] ? 4'd0 : 4'd1; end
      4'd2: begin
        if (w[15])      begin len = 4'd1; run = 4'd0; end
        else if (w[14]) begin len = 4'd2; run = 4'd1; end
        else            begin len = 4'd2; run = 4'd2; end
      end
      4'd3: begin len = 4'd2; run = 4'd3 - {2'b00, w[15:14]}; end
      4'd4: begin
        if (w[15] || w[14]) begin len = 4'd2; run = 4'd3 - {2'b00, w[15:14]}; end
        else                begin len = 4'd3; run = w[13] ? 4'd3 : 4'd4; end
      end
      4'd5: begin
        if (w[15]) begin len = 4'd2; run = w[14] ? 4'd0 : 4'd1; end
        else       begin len = 4'd3; run = 4'd5 - {2'b00, w[14:13]}; end
      end
      4'd6: begin
        if (w[15:14] == 2'b11) begin len = 4'd2; run = 4'd0; end
        else begin
          len = 4'd3;
          case (w[15:13])
            3'b000: run = 4'd1; 3'b001: run = 4'd2; 3'b011: run = 4'd3;
            3'b010: run = 4'd4; 3'b101: run = 4'd5; default: run = 4'd6;
          endcase
        end
      end
      default: begin // zerosLeft > 6
        if (w[15:13] != 3'b000) begin len = 4'd3; run = 4'd7 - {1'b0, w[15:13]}; end
        else begin
          // 0001 -> 7, 00001 -> 8, ... leading zeros n (3..13) -> run n+4
          logic [4:0] nz;
          nz = clz16(w);
          len = 4'(nz + 5'd1);
          run = 4'(nz + 5'd4);
        end
      end
    endcase
    return {len, run};
  endfunction

  // total_zeros for 4x4 blocks (maxNumCoeff 15/16): returns {len[3:0], tz[3:0]}.
  // tc = TotalCoeff (1..15), w[15] is the next bit.
  function automatic logic [7:0] total_zeros_lut(input logic [3:0] tc, input logic [15:0] w);
    // Each table is written as (code, length) per total_zeros value.
    logic [8:0] code [16];
    logic [3:0] clen [16];
    logic [3:0] n;
    logic [7:0] r;
    for (int i = 0; i < 16; i++) begin code[i] = '0; clen[i] = '0; end
    case (tc)
      4'd1: begin
        code = '{9'd1,9'd3,9'd2,9'd3,9'd2,9'd3,9'd2,9'd3,9'd2,9'd3,9'd2,9'd3,9'd2,9'd3,9'd2,9'd1};
        clen = '{4'd1,4'd3,4'd3,4'd4,4'd4,4'd5,4'd5,4'd6,4'd6,4'd7,4'd7,4'd8,4'd8,4'd9,4'd9,4'd9};
      end
      4'd2: begin
        code = '{9'd7,9'd6,9'd5,9'd4,9'd3,9'd5,9'd4,9'd3,9'd2,9'd3,9'd2,9'd3,9'd2,9'd1,9'd0,9'd0};
        clen = '{4'd3,4'd3,4'd3,4'd3,4'd3,4'd4,4'd4,4'd4,4'd4,4'd5,4'd5,4'd6,4'd6,4'd6,4'd6,4'd0};
      end
      4'd3: begin
        code = '{9'd5,9'd7,9'd6,9'd5,9'd4,9'd3,9'd4,9'd3,9'd2,9'd3,9'd2,9'd1,9'd1,9'd0,9'd0,9'd0};
        clen = '{4'd4,4'd3,4'd3,4'd3,4'd4,4'd4,4'd3,4'd3,4'd4,4'd5,4'd5,4'd6,4'd5,4'd6,4'd0,4'd0};
      end
      4'd4: begin
        code = '{9'd3,9'd7,9'd5,9'd4,9'd6,9'd5,9'd4,9'd3,9'd3,9'd2,9'd2,9'd1,9'd0,9'd0,9'd0,9'd0};
        clen = '{4'd5,4'd3,4'd4,4'd4,4'd3,4'd3,4'd3,4'd4,4'd3,4'd4,4'd5,4'd5,4'd5,4'd0,4'd0,4'd0};
      end
      4'd5: begin
        code = '{9'd5,9'd4,9'd3,9'd7,9'd6,9'd5,9'd4,9'd3,9'd2,9'd1,9'd1,9'd0,9'd0,9'd0,9'd0,9'd0};
        clen = '{4'd4,4'd4,4'd4,4'd3,4'd3,4'd3,4'd3,4'd3,4'd4,4'd5,4'd4,4'd5,4'd0,4'd0,4'd0,4'd0};
      end
      4'd6: begin
        code = '{9'd1,9'd1,9'd7,9'd6,9'd5,9'd4,9'd3,9'd2,9'd1,9'd1,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0};
        clen = '{4'd6,4'd5,4'd3,4'd3,4'd3,4'd3,4'd3,4'd3,4'd4,4'd3,4'd6,4'd0,4'd0,4'd0,4'd0,4'd0};
      end
      4'd7: begin
        code = '{9'd1,9'd1,9'd5,9'd4,9'd3,9'd3,9'd2,9'd1,9'd1,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0};
        clen = '{4'd6,4'd5,4'd3,4'd3,4'd3,4'd2,4'd3,4'd4,4'd3,4'd6,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0};
      end
      4'd8: begin
        code = '{9'd1,9'd1,9'd1,9'd3,9'd3,9'd2,9'd2,9'd1,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0};
        clen = '{4'd6,4'd4,4'd5,4'd3,4'd2,4'd2,4'd3,4'd3,4'd6,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0};
      end
      4'd9: begin
        code = '{9'd1,9'd0,9'd1,9'd3,9'd2,9'd1,9'd1,9'd1,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0};
        clen = '{4'd6,4'd6,4'd4,4'd2,4'd2,4'd3,4'd2,4'd5,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0};
      end
      4'd10: begin
        code = '{9'd1,9'd0,9'd1,9'd3,9'd2,9'd1,9'd1,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0};
        clen = '{4'd5,4'd5,4'd3,4'd2,4'd2,4'd2,4'd4,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0};
      end
      4'd11: begin
        code = '{9'd0,9'd1,9'd1,9'd2,9'd1,9'd3,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0};
        clen = '{4'd4,4'd4,4'd3,4'd3,4'd1,4'd3,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0};
      end
      4'd12: begin
        code = '{9'd0,9'd1,9'd1,9'd1,9'd1,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0};
        clen = '{4'd4,4'd4,4'd2,4'd1,4'd3,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0};
      end
      4'd13: begin
        code = '{9'd0,9'd1,9'd1,9'd1,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0};
        clen = '{4'd3,4'd3,4'd1,4'd2,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0};
      end
      4'd14: begin
        code = '{9'd0,9'd1,9'd1,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0};
        clen = '{4'd2,4'd2,4'd1,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0};
      end
      default: begin
        code = '{9'd0,9'd1,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0,9'd0};
        clen = '{4'd1,4'd1,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0,4'd0};
      end
    endcase
    r = 8'h00;
    // Codes are prefix-free: exactly one entry matches the head of w.
    for (int i = 15; i >= 0; i--) begin
      n = clen[i];
      if (n != 0 && (16'(w >> (16 - 32'(n))) == 16'(code[i]))) r = {n, 4'(i)};
    end
    return r;
  endfunction

  // Dequantisation multipliers (flat scaling matrix) indexed by qP%6 and the
  // coefficient position class: 0 -> (even,even), 1 -> (odd,odd), 2 -> mixed.
  function automatic logic [4:0] dequant_v(input logic [2:0] qm, input logic [1:0] cls);
    logic [4:0] t0 [6];
    logic [4:0] t1 [6];
    logic [4:0] t2 [6];
    t0 = '{5'd10, 5'd11, 5'd13, 5'd14, 5'd16, 5'd18};
    t1 = '{5'd16, 5'd18, 5'd20, 5'd23, 5'd25, 5'd29};
    t2 = '{5'd13, 5'd14, 5'd16, 5'd18, 5'd20, 5'd23};
    case (cls)
      2'd0:    return t0[qm];
      2'd1:    return t1[qm];
      default: return t2[qm];
    endcase
  endfunction

  function automatic logic [7:0] clip_pix(input logic signed [19:0] v);
    if (v < 0) return 8'd0;
    if (v > 255) return 8'd255;
    return v[7:0];
  endfunction

  // Deblocking thresholds, indexA / indexB in 0..51.
  function automatic logic [7:0] db_alpha(input logic [5:0] ia);
    logic [7:0] t [36];
    t = '{8'd4,8'd4,8'd5,8'd6,8'd7,8'd8,8'd9,8'd10,8'd12,8'd13,8'd15,8'd17,8'd20,8'd22,8'd25,8'd28,
          8'd32,8'd36,8'd40,8'd45,8'd50,8'd56,8'd63,8'd71,8'd80,8'd90,8'd101,8'd113,8'd127,8'd144,8'd162,
          8'd182,8'd203,8'd226,8'd255,8'd255};
    return (ia < 6'd16) ? 8'd0 : t[ia - 6'd16];
  endfunction

  function automatic logic [4:0] db_beta(input logic [5:0] ib);
    logic [4:0] t [36];
    t = '{5'd2,5'd2,5'd2,5'd3,5'd3,5'd3,5'd3,5'd4,5'd4,5'd4,5'd6,5'd6,5'd7,5'd7,5'd8,5'd8,
          5'd9,5'd9,5'd10,5'd10,5'd11,5'd11,5'd12,5'd12,5'd13,5'd13,5'd14,5'd14,5'd15,5'd15,5'd16,
          5'd16,5'd17,5'd17,5'd18,5'd18};
    return (ib < 6'd16) ? 5'd0 : t[ib - 6'd16];
  endfunction

  // tC0 for bS = 1, 2, 3.
  function automatic logic [4:0] db_tc0(input logic [5:0] ia, input logic [2:0] bs);
    logic [4:0] t1 [35];
    logic [4:0] t2 [35];
    logic [4:0] t3 [35];
    t1 = '{5'd0,5'd0,5'd0,5'd0,5'd0,5'd0,5'd1,5'd1,5'd1,5'd1,5'd1,5'd1,5'd1,5'd1,5'd1,5'd1,5'd2,5'd2,
           5'd2,5'd2,5'd3,5'd3,5'd3,5'd4,5'd4,5'd4,5'd5,5'd6,5'd6,5'd7,5'd8,5'd9,5'd10,5'd11,5'd13};
    t2 = '{5'd0,5'd0,5'd0,5'd0,5'd1,5'd1,5'd1,5'd1,5'd1,5'd1,5'd1,5'd1,5'd1,5'd1,5'd2,5'd2,5'd2,5'd2,
           5'd3,5'd3,5'd3,5'd4,5'd4,5'd5,5'd5,5'd6,5'd7,5'd8,5'd8,5'd10,5'd11,5'd12,5'd13,5'd15,5'd17};
    t3 = '{5'd1,5'd1,5'd1,5'd1,5'd1,5'd1,5'd1,5'd1,5'd1,5'd1,5'd2,5'd2,5'd2,5'd2,5'd3,5'd3,5'd3,5'd4,
           5'd4,5'd4,5'd5,5'd6,5'd6,5'd7,5'd8,5'd9,5'd10,5'd11,5'd13,5'd14,5'd16,5'd18,5'd20,5'd23,5'd25};
    if (ia < 6'd17) return 5'd0;
    case (bs)
      3'd1:    return t1[ia - 6'd17];
      3'd2:    return t2[ia - 6'd17];
      default: return t3[ia - 6'd17];
    endcase
  endfunction

endpackage
