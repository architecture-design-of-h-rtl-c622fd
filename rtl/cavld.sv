// cavld: symbol decoder of the PARSER engine -- CAVLC residual blocks and
// Exp-Golomb symbols, read through one barrel shifter.
//
// Structure (after the CAVLD block diagram): a barrel shifter over a 128-bit
// window of the bitstream feeds the coeff_token table, the trailing-ones sign
// field, the level table, the total_zeros table and the run_before table.
// Decoded levels go to a level buffer; the run phase walks the level buffer,
// places every level at its scan position and writes it, through the inverse
// zig-zag scan, into the output buffer (16 coefficients in raster order).
// Every state consumes its symbols in one cycle, so no bubble cycles occur
// while the window is full.
//
// Multi-symbol decoding: levels and runs are the symbols that follow each
// other most often, so the level table and the run table are replicated
// NSYM times and chained in one cycle; NSYM consecutive levels (or runs) are
// decoded per cycle.  Other symbols take one cycle each.  A block with
// TotalCoeff = n, T trailing ones and R coded runs takes
//   1 (coeff_token) + (T>0) + ceil((n-T)/NSYM) + (n<max) + max(1, ceil(R/NSYM))
// cycles, then holds its result until it is taken.  Once zerosLeft reaches 0 the remaining levels
// are placed without further codes in the same cycle.
//
// Interface: bs_* is a 32-bit word stream from the bitstream SRAM, most
// significant bit first (valid/ready).  A symbol is decoded only while at least
// NEED bits are in the window, so the stream must be padded after its last
// symbol.  cmd_* starts one command (cavld_cmd_t); the result is held on out_*
// until out_ready.  For Exp-Golomb commands `value` holds the symbol.
// The tables, the decoding order and the level/run buffers follow the
// document's design; the window size, the handshakes and the one-cycle
// trailing-ones state are this design's choices.
module cavld
  import h264_pkg::*;
  import cavld_tab_pkg::*;
#(
  parameter int unsigned NSYM = 2    // levels / runs decoded per cycle (1..4)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [31:0]        bs_data,
  input  logic               bs_valid,
  output logic               bs_ready,
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  cavld_cmd_t         cmd,
  output logic               out_valid,
  input  logic               out_ready,
  output coef_t              coef [16],
  output logic [4:0]         total_coeff,
  output logic signed [17:0] value
);
  localparam int unsigned NEED = (NSYM * 28 > 64) ? NSYM * 28 : 64;

  typedef enum logic [2:0] {S_IDLE, S_EG, S_TOKEN, S_T1, S_LEVEL, S_TZ, S_RUN, S_DONE} state_e;
  state_e state;

  logic [127:0] win;
  logic [7:0]   fill;
  logic         have;
  logic [7:0]   used;

  cmd_kind_e          kind;
  logic signed [5:0]  nc;
  logic [4:0]         tc, idx, maxn;
  logic [1:0]         t1;
  logic [2:0]         sl;
  logic [3:0]         zl;
  logic signed [5:0]  pos;
  coef_t              lv [16];
  coef_t              cf [16];

  // next-state values computed by the decode logic
  logic [4:0]         idx_n;
  logic [2:0]         sl_n;
  logic [3:0]         zl_n;
  logic signed [5:0]  pos_n;
  coef_t              lv_n [16];
  coef_t              cf_n [16];
  state_e             state_n;
  logic [4:0]         tc_n;
  logic [1:0]         t1_n;
  logic signed [17:0] value_n;

  // Exp-Golomb decoder on the head of the window
  logic [5:0]         eg_len;
  logic [16:0]        eg_code;
  logic signed [17:0] eg_value;
  logic               eg_ok;
  exp_golomb_dec u_eg (
    .w(win[127:96]), .is_signed(kind == CMD_SE), .len(eg_len), .code_num(eg_code),
    .value(eg_value), .valid(eg_ok)
  );

  assign have = (fill >= 8'(NEED));

  function automatic logic [3:0] scan_pos(input cmd_kind_e k, input logic [4:0] p);
    if (k == CMD_CDC)     return p[3:0];
    else if (k == CMD_AC) return zigzag4x4(p[3:0] + 4'd1);
    else                  return zigzag4x4(p[3:0]);
  endfunction

  always_comb begin
    ct_t        ct;
    lvl_t       ld;
    logic [7:0] tzr, rbr;
    logic [7:0] off;
    logic [127:0] sh;
    int unsigned ncodes;
    logic       stop;

    state_n = state;  used = 8'd0;
    idx_n = idx; sl_n = sl; zl_n = zl; pos_n = pos; tc_n = tc; t1_n = t1; value_n = value;
    lv_n = lv; cf_n = cf;
    ct = '0; ld = '0; tzr = '0; rbr = '0; off = '0; sh = '0; ncodes = 0; stop = 1'b0;

    case (state)
      S_EG: if (have) begin
        used = {2'b00, eg_len};
        value_n = eg_value;
        state_n = S_DONE;
      end

      S_TOKEN: if (have) begin
        ct = coeff_token((kind == CMD_CDC) ? -6'sd1 : nc, win[127:112]);
        used = {3'b000, ct.len};
        tc_n = ct.tc;  t1_n = ct.t1;
        idx_n = 5'd0;
        sl_n = (ct.tc > 5'd10 && ct.t1 < 2'd3) ? 3'd1 : 3'd0;
        if (ct.tc == 5'd0)      state_n = S_DONE;
        else if (ct.t1 != 2'd0) state_n = S_T1;
        else                    state_n = S_LEVEL;
      end

      S_T1: if (have) begin
        used = {6'd0, t1};
        for (int i = 0; i < 3; i++)
          if (i < int'(t1)) lv_n[i] = win[127 - i] ? -16'sd1 : 16'sd1;
        idx_n = {3'b000, t1};
        if (tc == {3'b000, t1}) begin
          state_n = S_TZ;
          if (tc == maxn) begin  // no total_zeros code: go straight to placing
            idx_n = 5'd0; zl_n = 4'd0; pos_n = 6'(signed'({1'b0, tc})) - 6'sd1; state_n = S_RUN;
          end
        end else state_n = S_LEVEL;
      end

      S_LEVEL: if (have) begin
        for (int k = 0; k < int'(NSYM); k++) begin
          if (idx_n < tc) begin
            sh = win << off;
            ld = level_dec(sh[127:96], sl_n, (idx_n == {3'b000, t1}) && (t1 < 2'd3));
            lv_n[idx_n[3:0]] = ld.level;
            sl_n = ld.next_sl;
            off = off + {3'b000, ld.len};
            idx_n = idx_n + 5'd1;
          end
        end
        used = off;
        if (idx_n == tc) begin
          state_n = S_TZ;
          if (tc == maxn) begin
            idx_n = 5'd0; zl_n = 4'd0; pos_n = 6'(signed'({1'b0, tc})) - 6'sd1; state_n = S_RUN;
          end
        end
      end

      S_TZ: if (have) begin
        if (tc < maxn) begin
          tzr = (kind == CMD_CDC) ? total_zeros_cdc(tc[1:0], win[127:112])
                                  : total_zeros_lut(tc[3:0], win[127:112]);
          used = {4'd0, tzr[7:4]};
        end
        zl_n  = tzr[3:0];
        pos_n = 6'(signed'({1'b0, tc})) + 6'(signed'({2'b00, tzr[3:0]})) - 6'sd1;
        idx_n = 5'd0;
        state_n = S_RUN;
      end

      S_RUN: if (have) begin
        for (int i = 0; i < 16; i++) begin
          if (!stop && 5'(i) >= idx && 5'(i) < tc) begin
            if (5'(i) < tc - 5'd1 && zl_n != 4'd0) begin
              if (ncodes == NSYM) stop = 1'b1;
              else begin
                sh  = win << off;
                rbr = run_before_lut(zl_n, sh[127:112]);
                cf_n[scan_pos(kind, 5'(pos_n))] = lv[i];
                pos_n = pos_n - 6'sd1 - 6'(signed'({2'b00, rbr[3:0]}));
                zl_n  = zl_n - rbr[3:0];
                off   = off + {4'd0, rbr[7:4]};
                ncodes++;
                idx_n = 5'(i + 1);
              end
            end else begin
              cf_n[scan_pos(kind, 5'(pos_n))] = lv[i];
              pos_n = pos_n - 6'sd1;
              idx_n = 5'(i + 1);
            end
          end
        end
        used = off;
        if (idx_n == tc) state_n = S_DONE;
      end

      default: ;
    endcase
  end

  assign cmd_ready   = (state == S_IDLE);
  assign out_valid   = (state == S_DONE);
  assign coef        = cf;
  assign total_coeff = tc;
  assign bs_ready    = (fill <= 8'd96);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      win <= '0;  fill <= '0;
      kind <= CMD_UE; nc <= '0; maxn <= 5'd16;
      tc <= '0; t1 <= '0; idx <= '0; sl <= '0; zl <= '0; pos <= '0; value <= '0;
      for (int i = 0; i < 16; i++) begin lv[i] <= '0; cf[i] <= '0; end
    end else begin
      // barrel shifter and refill
      logic [7:0] rem;
      rem = fill - used;
      if (bs_valid && bs_ready) begin
        win  <= (win << used) | ({bs_data, 96'd0} >> rem);
        fill <= rem + 8'd32;
      end else begin
        win  <= win << used;
        fill <= rem;
      end

      idx <= idx_n; sl <= sl_n; zl <= zl_n; pos <= pos_n; tc <= tc_n; t1 <= t1_n;
      value <= value_n; lv <= lv_n; cf <= cf_n;
      state <= state_n;

      if (state == S_IDLE && cmd_valid) begin
        kind <= cmd.kind;
        nc   <= cmd.nc;
        maxn <= (cmd.kind == CMD_CDC) ? 5'd4 : (cmd.kind == CMD_AC) ? 5'd15 : 5'd16;
        tc   <= '0;
        for (int i = 0; i < 16; i++) cf[i] <= '0;
        state <= (cmd.kind == CMD_UE || cmd.kind == CMD_SE) ? S_EG : S_TOKEN;
      end
      if (state == S_DONE && out_ready) state <= S_IDLE;
    end
  end

  // consumption never exceeds the bits in the window
  assert property (@(posedge clk) disable iff (!rst_n) used <= fill);
endmodule
