// exp_golomb_dec: Exp-Golomb (ue(v) / se(v)) decoder of the PARSER engine.
//
// Combinational.  w holds the next 32 bits of the stream, w[31] first.  A code
// is M leading zeros, a one, and M info bits; codeNum = 2^M - 1 + info.  For
// se(v) codeNum k maps to (-1)^(k+1) * ceil(k/2).  The window limits M to 15
// (codeNum up to 65534), which covers every MB-level syntax element of the
// baseline profile.  `len` is the number of bits the code occupies; `valid` is
// low when the window holds more than 15 leading zeros.
// The code itself is the standard's; the width limit is this design's choice.
module exp_golomb_dec (
  input  logic [31:0]        w,
  input  logic               is_signed,
  output logic [5:0]         len,
  output logic [16:0]        code_num,
  output logic signed [17:0] value,
  output logic               valid
);
  logic [4:0]  m;
  logic [31:0] rest;
  logic [15:0] info;

  always_comb begin
    m = 5'd16;
    for (int i = 16; i < 32; i++)
      if (w[i]) m = 5'(31 - i);
    valid = (m < 5'd16);
    rest  = w << (m + 5'd1);
    info  = (m == 5'd0) ? 16'd0 : 16'(rest >> (32 - 32'(m)));
    code_num = (17'd1 << m) - 17'd1 + {1'b0, info};
    len   = {m, 1'b0} + 6'd1;
    if (!is_signed)        value = signed'({1'b0, code_num});
    else if (code_num[0])  value = signed'({1'b0, code_num} + 18'd1) >>> 1;
    else                   value = -(signed'({1'b0, code_num}) >>> 1);
  end
endmodule
