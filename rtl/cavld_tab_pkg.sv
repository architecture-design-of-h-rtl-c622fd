// cavld_tab_pkg: the coeff_token code tables of H.264/AVC CAVLC.
//
// Each function matches the next 16 stream bits (w[15] first) against one
// table and returns the code length, TotalCoeff and TrailingOnes.  A zero length
// means the bits hold no valid code.  nC >= 8 uses a 6-bit fixed-length code,
// decoded arithmetically in ct_flc.  The tables are the standard's; only the
// way they are laid out (one casez per table) is this design's.
package cavld_tab_pkg;

  typedef struct packed {
    logic [4:0] len;
    logic [4:0] tc;
    logic [1:0] t1;
  } ct_t;

  // coeff_token, 0 <= nC < 2
  function automatic ct_t ct_nc0(input logic [15:0] w);
    ct_t r;
    r = '{len: 5'd0, tc: 5'd0, t1: 2'd0};
    casez (w)
      16'b1???????????????: r = '{len: 5'd1, tc: 5'd0, t1: 2'd0};
      16'b000101??????????: r = '{len: 5'd6, tc: 5'd1, t1: 2'd0};
      16'b01??????????????: r = '{len: 5'd2, tc: 5'd1, t1: 2'd1};
      16'b00000111????????: r = '{len: 5'd8, tc: 5'd2, t1: 2'd0};
      16'b000100??????????: r = '{len: 5'd6, tc: 5'd2, t1: 2'd1};
      16'b001?????????????: r = '{len: 5'd3, tc: 5'd2, t1: 2'd2};
      16'b000000111???????: r = '{len: 5'd9, tc: 5'd3, t1: 2'd0};
      16'b00000110????????: r = '{len: 5'd8, tc: 5'd3, t1: 2'd1};
      16'b0000101?????????: r = '{len: 5'd7, tc: 5'd3, t1: 2'd2};
      16'b00011???????????: r = '{len: 5'd5, tc: 5'd3, t1: 2'd3};
      16'b0000000111??????: r = '{len: 5'd10, tc: 5'd4, t1: 2'd0};
      16'b000000110???????: r = '{len: 5'd9, tc: 5'd4, t1: 2'd1};
      16'b00000101????????: r = '{len: 5'd8, tc: 5'd4, t1: 2'd2};
      16'b000011??????????: r = '{len: 5'd6, tc: 5'd4, t1: 2'd3};
      16'b00000000111?????: r = '{len: 5'd11, tc: 5'd5, t1: 2'd0};
      16'b0000000110??????: r = '{len: 5'd10, tc: 5'd5, t1: 2'd1};
      16'b000000101???????: r = '{len: 5'd9, tc: 5'd5, t1: 2'd2};
      16'b0000100?????????: r = '{len: 5'd7, tc: 5'd5, t1: 2'd3};
      16'b0000000001111???: r = '{len: 5'd13, tc: 5'd6, t1: 2'd0};
      16'b00000000110?????: r = '{len: 5'd11, tc: 5'd6, t1: 2'd1};
      16'b0000000101??????: r = '{len: 5'd10, tc: 5'd6, t1: 2'd2};
      16'b00000100????????: r = '{len: 5'd8, tc: 5'd6, t1: 2'd3};
      16'b0000000001011???: r = '{len: 5'd13, tc: 5'd7, t1: 2'd0};
      16'b0000000001110???: r = '{len: 5'd13, tc: 5'd7, t1: 2'd1};
      16'b00000000101?????: r = '{len: 5'd11, tc: 5'd7, t1: 2'd2};
      16'b000000100???????: r = '{len: 5'd9, tc: 5'd7, t1: 2'd3};
      16'b0000000001000???: r = '{len: 5'd13, tc: 5'd8, t1: 2'd0};
      16'b0000000001010???: r = '{len: 5'd13, tc: 5'd8, t1: 2'd1};
      16'b0000000001101???: r = '{len: 5'd13, tc: 5'd8, t1: 2'd2};
      16'b0000000100??????: r = '{len: 5'd10, tc: 5'd8, t1: 2'd3};
      16'b00000000001111??: r = '{len: 5'd14, tc: 5'd9, t1: 2'd0};
      16'b00000000001110??: r = '{len: 5'd14, tc: 5'd9, t1: 2'd1};
      16'b0000000001001???: r = '{len: 5'd13, tc: 5'd9, t1: 2'd2};
      16'b00000000100?????: r = '{len: 5'd11, tc: 5'd9, t1: 2'd3};
      16'b00000000001011??: r = '{len: 5'd14, tc: 5'd10, t1: 2'd0};
      16'b00000000001010??: r = '{len: 5'd14, tc: 5'd10, t1: 2'd1};
      16'b00000000001101??: r = '{len: 5'd14, tc: 5'd10, t1: 2'd2};
      16'b0000000001100???: r = '{len: 5'd13, tc: 5'd10, t1: 2'd3};
      16'b000000000001111?: r = '{len: 5'd15, tc: 5'd11, t1: 2'd0};
      16'b000000000001110?: r = '{len: 5'd15, tc: 5'd11, t1: 2'd1};
      16'b00000000001001??: r = '{len: 5'd14, tc: 5'd11, t1: 2'd2};
      16'b00000000001100??: r = '{len: 5'd14, tc: 5'd11, t1: 2'd3};
      16'b000000000001011?: r = '{len: 5'd15, tc: 5'd12, t1: 2'd0};
      16'b000000000001010?: r = '{len: 5'd15, tc: 5'd12, t1: 2'd1};
      16'b000000000001101?: r = '{len: 5'd15, tc: 5'd12, t1: 2'd2};
      16'b00000000001000??: r = '{len: 5'd14, tc: 5'd12, t1: 2'd3};
      16'b0000000000001111: r = '{len: 5'd16, tc: 5'd13, t1: 2'd0};
      16'b000000000000001?: r = '{len: 5'd15, tc: 5'd13, t1: 2'd1};
      16'b000000000001001?: r = '{len: 5'd15, tc: 5'd13, t1: 2'd2};
      16'b000000000001100?: r = '{len: 5'd15, tc: 5'd13, t1: 2'd3};
      16'b0000000000001011: r = '{len: 5'd16, tc: 5'd14, t1: 2'd0};
      16'b0000000000001110: r = '{len: 5'd16, tc: 5'd14, t1: 2'd1};
      16'b0000000000001101: r = '{len: 5'd16, tc: 5'd14, t1: 2'd2};
      16'b000000000001000?: r = '{len: 5'd15, tc: 5'd14, t1: 2'd3};
      16'b0000000000000111: r = '{len: 5'd16, tc: 5'd15, t1: 2'd0};
      16'b0000000000001010: r = '{len: 5'd16, tc: 5'd15, t1: 2'd1};
      16'b0000000000001001: r = '{len: 5'd16, tc: 5'd15, t1: 2'd2};
      16'b0000000000001100: r = '{len: 5'd16, tc: 5'd15, t1: 2'd3};
      16'b0000000000000100: r = '{len: 5'd16, tc: 5'd16, t1: 2'd0};
      16'b0000000000000110: r = '{len: 5'd16, tc: 5'd16, t1: 2'd1};
      16'b0000000000000101: r = '{len: 5'd16, tc: 5'd16, t1: 2'd2};
      16'b0000000000001000: r = '{len: 5'd16, tc: 5'd16, t1: 2'd3};
      default: r = '{len: 5'd0, tc: 5'd0, t1: 2'd0};
    endcase
    return r;
  endfunction

  // coeff_token, 2 <= nC < 4
  function automatic ct_t ct_nc2(input logic [15:0] w);
    ct_t r;
    r = '{len: 5'd0, tc: 5'd0, t1: 2'd0};
    casez (w)
      16'b11??????????????: r = '{len: 5'd2, tc: 5'd0, t1: 2'd0};
      16'b001011??????????: r = '{len: 5'd6, tc: 5'd1, t1: 2'd0};
      16'b10??????????????: r = '{len: 5'd2, tc: 5'd1, t1: 2'd1};
      16'b000111??????????: r = '{len: 5'd6, tc: 5'd2, t1: 2'd0};
      16'b00111???????????: r = '{len: 5'd5, tc: 5'd2, t1: 2'd1};
      16'b011?????????????: r = '{len: 5'd3, tc: 5'd2, t1: 2'd2};
      16'b0000111?????????: r = '{len: 5'd7, tc: 5'd3, t1: 2'd0};
      16'b001010??????????: r = '{len: 5'd6, tc: 5'd3, t1: 2'd1};
      16'b001001??????????: r = '{len: 5'd6, tc: 5'd3, t1: 2'd2};
      16'b0101????????????: r = '{len: 5'd4, tc: 5'd3, t1: 2'd3};
      16'b00000111????????: r = '{len: 5'd8, tc: 5'd4, t1: 2'd0};
      16'b000110??????????: r = '{len: 5'd6, tc: 5'd4, t1: 2'd1};
      16'b000101??????????: r = '{len: 5'd6, tc: 5'd4, t1: 2'd2};
      16'b0100????????????: r = '{len: 5'd4, tc: 5'd4, t1: 2'd3};
      16'b00000100????????: r = '{len: 5'd8, tc: 5'd5, t1: 2'd0};
      16'b0000110?????????: r = '{len: 5'd7, tc: 5'd5, t1: 2'd1};
      16'b0000101?????????: r = '{len: 5'd7, tc: 5'd5, t1: 2'd2};
      16'b00110???????????: r = '{len: 5'd5, tc: 5'd5, t1: 2'd3};
      16'b000000111???????: r = '{len: 5'd9, tc: 5'd6, t1: 2'd0};
      16'b00000110????????: r = '{len: 5'd8, tc: 5'd6, t1: 2'd1};
      16'b00000101????????: r = '{len: 5'd8, tc: 5'd6, t1: 2'd2};
      16'b001000??????????: r = '{len: 5'd6, tc: 5'd6, t1: 2'd3};
      16'b00000001111?????: r = '{len: 5'd11, tc: 5'd7, t1: 2'd0};
      16'b000000110???????: r = '{len: 5'd9, tc: 5'd7, t1: 2'd1};
      16'b000000101???????: r = '{len: 5'd9, tc: 5'd7, t1: 2'd2};
      16'b000100??????????: r = '{len: 5'd6, tc: 5'd7, t1: 2'd3};
      16'b00000001011?????: r = '{len: 5'd11, tc: 5'd8, t1: 2'd0};
      16'b00000001110?????: r = '{len: 5'd11, tc: 5'd8, t1: 2'd1};
      16'b00000001101?????: r = '{len: 5'd11, tc: 5'd8, t1: 2'd2};
      16'b0000100?????????: r = '{len: 5'd7, tc: 5'd8, t1: 2'd3};
      16'b000000001111????: r = '{len: 5'd12, tc: 5'd9, t1: 2'd0};
      16'b00000001010?????: r = '{len: 5'd11, tc: 5'd9, t1: 2'd1};
      16'b00000001001?????: r = '{len: 5'd11, tc: 5'd9, t1: 2'd2};
      16'b000000100???????: r = '{len: 5'd9, tc: 5'd9, t1: 2'd3};
      16'b000000001011????: r = '{len: 5'd12, tc: 5'd10, t1: 2'd0};
      16'b000000001110????: r = '{len: 5'd12, tc: 5'd10, t1: 2'd1};
      16'b000000001101????: r = '{len: 5'd12, tc: 5'd10, t1: 2'd2};
      16'b00000001100?????: r = '{len: 5'd11, tc: 5'd10, t1: 2'd3};
      16'b000000001000????: r = '{len: 5'd12, tc: 5'd11, t1: 2'd0};
      16'b000000001010????: r = '{len: 5'd12, tc: 5'd11, t1: 2'd1};
      16'b000000001001????: r = '{len: 5'd12, tc: 5'd11, t1: 2'd2};
      16'b00000001000?????: r = '{len: 5'd11, tc: 5'd11, t1: 2'd3};
      16'b0000000001111???: r = '{len: 5'd13, tc: 5'd12, t1: 2'd0};
      16'b0000000001110???: r = '{len: 5'd13, tc: 5'd12, t1: 2'd1};
      16'b0000000001101???: r = '{len: 5'd13, tc: 5'd12, t1: 2'd2};
      16'b000000001100????: r = '{len: 5'd12, tc: 5'd12, t1: 2'd3};
      16'b0000000001011???: r = '{len: 5'd13, tc: 5'd13, t1: 2'd0};
      16'b0000000001010???: r = '{len: 5'd13, tc: 5'd13, t1: 2'd1};
      16'b0000000001001???: r = '{len: 5'd13, tc: 5'd13, t1: 2'd2};
      16'b0000000001100???: r = '{len: 5'd13, tc: 5'd13, t1: 2'd3};
      16'b0000000000111???: r = '{len: 5'd13, tc: 5'd14, t1: 2'd0};
      16'b00000000001011??: r = '{len: 5'd14, tc: 5'd14, t1: 2'd1};
      16'b0000000000110???: r = '{len: 5'd13, tc: 5'd14, t1: 2'd2};
      16'b0000000001000???: r = '{len: 5'd13, tc: 5'd14, t1: 2'd3};
      16'b00000000001001??: r = '{len: 5'd14, tc: 5'd15, t1: 2'd0};
      16'b00000000001000??: r = '{len: 5'd14, tc: 5'd15, t1: 2'd1};
      16'b00000000001010??: r = '{len: 5'd14, tc: 5'd15, t1: 2'd2};
      16'b0000000000001???: r = '{len: 5'd13, tc: 5'd15, t1: 2'd3};
      16'b00000000000111??: r = '{len: 5'd14, tc: 5'd16, t1: 2'd0};
      16'b00000000000110??: r = '{len: 5'd14, tc: 5'd16, t1: 2'd1};
      16'b00000000000101??: r = '{len: 5'd14, tc: 5'd16, t1: 2'd2};
      16'b00000000000100??: r = '{len: 5'd14, tc: 5'd16, t1: 2'd3};
      default: r = '{len: 5'd0, tc: 5'd0, t1: 2'd0};
    endcase
    return r;
  endfunction

  // coeff_token, 4 <= nC < 8
  function automatic ct_t ct_nc4(input logic [15:0] w);
    ct_t r;
    r = '{len: 5'd0, tc: 5'd0, t1: 2'd0};
    casez (w)
      16'b1111????????????: r = '{len: 5'd4, tc: 5'd0, t1: 2'd0};
      16'b001111??????????: r = '{len: 5'd6, tc: 5'd1, t1: 2'd0};
      16'b1110????????????: r = '{len: 5'd4, tc: 5'd1, t1: 2'd1};
      16'b001011??????????: r = '{len: 5'd6, tc: 5'd2, t1: 2'd0};
      16'b01111???????????: r = '{len: 5'd5, tc: 5'd2, t1: 2'd1};
      16'b1101????????????: r = '{len: 5'd4, tc: 5'd2, t1: 2'd2};
      16'b001000??????????: r = '{len: 5'd6, tc: 5'd3, t1: 2'd0};
      16'b01100???????????: r = '{len: 5'd5, tc: 5'd3, t1: 2'd1};
      16'b01110???????????: r = '{len: 5'd5, tc: 5'd3, t1: 2'd2};
      16'b1100????????????: r = '{len: 5'd4, tc: 5'd3, t1: 2'd3};
      16'b0001111?????????: r = '{len: 5'd7, tc: 5'd4, t1: 2'd0};
      16'b01010???????????: r = '{len: 5'd5, tc: 5'd4, t1: 2'd1};
      16'b01011???????????: r = '{len: 5'd5, tc: 5'd4, t1: 2'd2};
      16'b1011????????????: r = '{len: 5'd4, tc: 5'd4, t1: 2'd3};
      16'b0001011?????????: r = '{len: 5'd7, tc: 5'd5, t1: 2'd0};
      16'b01000???????????: r = '{len: 5'd5, tc: 5'd5, t1: 2'd1};
      16'b01001???????????: r = '{len: 5'd5, tc: 5'd5, t1: 2'd2};
      16'b1010????????????: r = '{len: 5'd4, tc: 5'd5, t1: 2'd3};
      16'b0001001?????????: r = '{len: 5'd7, tc: 5'd6, t1: 2'd0};
      16'b001110??????????: r = '{len: 5'd6, tc: 5'd6, t1: 2'd1};
      16'b001101??????????: r = '{len: 5'd6, tc: 5'd6, t1: 2'd2};
      16'b1001????????????: r = '{len: 5'd4, tc: 5'd6, t1: 2'd3};
      16'b0001000?????????: r = '{len: 5'd7, tc: 5'd7, t1: 2'd0};
      16'b001010??????????: r = '{len: 5'd6, tc: 5'd7, t1: 2'd1};
      16'b001001??????????: r = '{len: 5'd6, tc: 5'd7, t1: 2'd2};
      16'b1000????????????: r = '{len: 5'd4, tc: 5'd7, t1: 2'd3};
      16'b00001111????????: r = '{len: 5'd8, tc: 5'd8, t1: 2'd0};
      16'b0001110?????????: r = '{len: 5'd7, tc: 5'd8, t1: 2'd1};
      16'b0001101?????????: r = '{len: 5'd7, tc: 5'd8, t1: 2'd2};
      16'b01101???????????: r = '{len: 5'd5, tc: 5'd8, t1: 2'd3};
      16'b00001011????????: r = '{len: 5'd8, tc: 5'd9, t1: 2'd0};
      16'b00001110????????: r = '{len: 5'd8, tc: 5'd9, t1: 2'd1};
      16'b0001010?????????: r = '{len: 5'd7, tc: 5'd9, t1: 2'd2};
      16'b001100??????????: r = '{len: 5'd6, tc: 5'd9, t1: 2'd3};
      16'b000001111???????: r = '{len: 5'd9, tc: 5'd10, t1: 2'd0};
      16'b00001010????????: r = '{len: 5'd8, tc: 5'd10, t1: 2'd1};
      16'b00001101????????: r = '{len: 5'd8, tc: 5'd10, t1: 2'd2};
      16'b0001100?????????: r = '{len: 5'd7, tc: 5'd10, t1: 2'd3};
      16'b000001011???????: r = '{len: 5'd9, tc: 5'd11, t1: 2'd0};
      16'b000001110???????: r = '{len: 5'd9, tc: 5'd11, t1: 2'd1};
      16'b00001001????????: r = '{len: 5'd8, tc: 5'd11, t1: 2'd2};
      16'b00001100????????: r = '{len: 5'd8, tc: 5'd11, t1: 2'd3};
      16'b000001000???????: r = '{len: 5'd9, tc: 5'd12, t1: 2'd0};
      16'b000001010???????: r = '{len: 5'd9, tc: 5'd12, t1: 2'd1};
      16'b000001101???????: r = '{len: 5'd9, tc: 5'd12, t1: 2'd2};
      16'b00001000????????: r = '{len: 5'd8, tc: 5'd12, t1: 2'd3};
      16'b0000001101??????: r = '{len: 5'd10, tc: 5'd13, t1: 2'd0};
      16'b000000111???????: r = '{len: 5'd9, tc: 5'd13, t1: 2'd1};
      16'b000001001???????: r = '{len: 5'd9, tc: 5'd13, t1: 2'd2};
      16'b000001100???????: r = '{len: 5'd9, tc: 5'd13, t1: 2'd3};
      16'b0000001001??????: r = '{len: 5'd10, tc: 5'd14, t1: 2'd0};
      16'b0000001100??????: r = '{len: 5'd10, tc: 5'd14, t1: 2'd1};
      16'b0000001011??????: r = '{len: 5'd10, tc: 5'd14, t1: 2'd2};
      16'b0000001010??????: r = '{len: 5'd10, tc: 5'd14, t1: 2'd3};
      16'b0000000101??????: r = '{len: 5'd10, tc: 5'd15, t1: 2'd0};
      16'b0000001000??????: r = '{len: 5'd10, tc: 5'd15, t1: 2'd1};
      16'b0000000111??????: r = '{len: 5'd10, tc: 5'd15, t1: 2'd2};
      16'b0000000110??????: r = '{len: 5'd10, tc: 5'd15, t1: 2'd3};
      16'b0000000001??????: r = '{len: 5'd10, tc: 5'd16, t1: 2'd0};
      16'b0000000100??????: r = '{len: 5'd10, tc: 5'd16, t1: 2'd1};
      16'b0000000011??????: r = '{len: 5'd10, tc: 5'd16, t1: 2'd2};
      16'b0000000010??????: r = '{len: 5'd10, tc: 5'd16, t1: 2'd3};
      default: r = '{len: 5'd0, tc: 5'd0, t1: 2'd0};
    endcase
    return r;
  endfunction

  // coeff_token, chroma DC (nC = -1)
  function automatic ct_t ct_cdc(input logic [15:0] w);
    ct_t r;
    r = '{len: 5'd0, tc: 5'd0, t1: 2'd0};
    casez (w)
      16'b01??????????????: r = '{len: 5'd2, tc: 5'd0, t1: 2'd0};
      16'b000111??????????: r = '{len: 5'd6, tc: 5'd1, t1: 2'd0};
      16'b1???????????????: r = '{len: 5'd1, tc: 5'd1, t1: 2'd1};
      16'b000100??????????: r = '{len: 5'd6, tc: 5'd2, t1: 2'd0};
      16'b000110??????????: r = '{len: 5'd6, tc: 5'd2, t1: 2'd1};
      16'b001?????????????: r = '{len: 5'd3, tc: 5'd2, t1: 2'd2};
      16'b000011??????????: r = '{len: 5'd6, tc: 5'd3, t1: 2'd0};
      16'b0000011?????????: r = '{len: 5'd7, tc: 5'd3, t1: 2'd1};
      16'b0000010?????????: r = '{len: 5'd7, tc: 5'd3, t1: 2'd2};
      16'b000101??????????: r = '{len: 5'd6, tc: 5'd3, t1: 2'd3};
      16'b000010??????????: r = '{len: 5'd6, tc: 5'd4, t1: 2'd0};
      16'b00000011????????: r = '{len: 5'd8, tc: 5'd4, t1: 2'd1};
      16'b00000010????????: r = '{len: 5'd8, tc: 5'd4, t1: 2'd2};
      16'b0000000?????????: r = '{len: 5'd7, tc: 5'd4, t1: 2'd3};
      default: r = '{len: 5'd0, tc: 5'd0, t1: 2'd0};
    endcase
    return r;
  endfunction

  // nC >= 8: xxxxyy with TotalCoeff-1 in xxxx and TrailingOnes in yy;
  // 000011 stands for TotalCoeff = 0.
  function automatic ct_t ct_flc(input logic [15:0] w);
    ct_t r;
    if (w[15:10] == 6'b000011) r = '{len: 5'd6, tc: 5'd0, t1: 2'd0};
    else                       r = '{len: 5'd6, tc: 5'({1'b0, w[15:12]} + 5'd1), t1: w[11:10]};
    return r;
  endfunction

  function automatic ct_t coeff_token(input logic signed [5:0] nc, input logic [15:0] w);
    if (nc < 0)       return ct_cdc(w);
    else if (nc < 2)  return ct_nc0(w);
    else if (nc < 4)  return ct_nc2(w);
    else if (nc < 8)  return ct_nc4(w);
    else              return ct_flc(w);
  endfunction

  // Chroma DC total_zeros (maxNumCoeff = 4): returns {len[3:0], tz[3:0]}.
  function automatic logic [7:0] total_zeros_cdc(input logic [1:0] tc, input logic [15:0] w);
    case (tc)
      2'd1: begin
        if (w[15])      return {4'd1, 4'd0};
        else if (w[14]) return {4'd2, 4'd1};
        else if (w[13]) return {4'd3, 4'd2};
        else            return {4'd3, 4'd3};
      end
      2'd2: begin
        if (w[15])      return {4'd1, 4'd0};
        else if (w[14]) return {4'd2, 4'd1};
        else            return {4'd2, 4'd2};
      end
      default:          return {4'd1, w[15] ? 4'd0 : 4'd1};
    endcase
  endfunction

  typedef struct packed {
    logic [4:0]         len;      // bits used by level_prefix + level_suffix
    logic signed [15:0] level;
    logic [2:0]         next_sl;  // suffixLength for the next level
  } lvl_t;

  // One level code (level_prefix, level_suffix) at the top of w, w[31] first.
  // sl: current suffixLength; first: this level directly follows fewer than
  // three trailing ones.  level_prefix is limited to 15 (baseline, 8-bit video).
  function automatic lvl_t level_dec(input logic [31:0] w, input logic [2:0] sl, input logic first);
    lvl_t r;
    logic [4:0] prefix;
    logic [3:0] ssize;
    logic [15:0] suffix, code;
    logic signed [15:0] val;
    logic [15:0] mag;
    logic [31:0] rest;
    prefix = 5'd16;
    for (int i = 16; i < 32; i++)
      if (w[i]) prefix = 5'(31 - i);
    if (prefix > 5'd15) prefix = 5'd15;  // escape beyond baseline range
    if (prefix == 5'd14 && sl == 3'd0) ssize = 4'd4;
    else if (prefix == 5'd15)          ssize = 4'd12;
    else                               ssize = {1'b0, sl};
    rest   = w << (prefix + 5'd1);
    suffix = (ssize == 4'd0) ? 16'd0 : 16'(rest >> (32 - 32'(ssize)));
    code   = 16'((32'(prefix) << sl) + 32'(suffix));
    if (prefix == 5'd15 && sl == 3'd0) code = code + 16'd15;
    if (first) code = code + 16'd2;
    if (!code[0]) val = 16'(signed'({1'b0, code} + 17'd2) >>> 1);
    else          val = -16'(signed'({1'b0, code} + 17'd1) >>> 1);
    mag = val[15] ? 16'(-val) : 16'(val);
    r.len   = prefix + 5'd1 + 5'(ssize);
    r.level = val;
    r.next_sl = (sl == 3'd0) ? 3'd1 : sl;
    if (sl != 3'd6 && 32'(mag) > (32'd3 << (((sl == 3'd0) ? 3'd1 : sl) - 3'd1)))
      r.next_sl = ((sl == 3'd0) ? 3'd1 : sl) + 3'd1;
    return r;
  endfunction

endpackage
