// tb_exp_golomb_dec: checks ue(v)/se(v) decoding of every codeNum 0..4095
// and a set of long codes, each followed by random bits, against codes built
// here from the definition (M zeros, then codeNum+1 in M+1 bits).
module tb_exp_golomb_dec;
  logic [31:0] w; logic is_signed; logic [5:0] len; logic [16:0] code_num;
  logic signed [17:0] value; logic valid;
  exp_golomb_dec dut (.*);
  int checks = 0, failures = 0;
  task automatic one(int cn, bit sgn);
    int m, ev;
    logic [63:0] bits;
    m = 0; while (((cn + 1) >> (m + 1)) != 0) m++;
    bits = {$urandom, $urandom};
    bits = (bits >> (2 * m + 1)) | (64'(cn + 1) << (64 - (2 * m + 1)));
    w = bits[63:32]; is_signed = sgn;
    #1;
    ev = sgn ? ((cn % 2 == 1) ? (cn + 1) / 2 : -(cn / 2)) : cn;
    checks++;
    if (!valid || int'(len) != 2 * m + 1 || int'(value) != ev) begin
      failures++; $display("FAIL cn %0d sgn %0d: len %0d value %0d exp %0d/%0d", cn, sgn, len, value, 2*m+1, ev);
    end
  endtask
  initial begin
    for (int cn = 0; cn < 4096; cn++) begin one(cn, 0); one(cn, 1); end
    for (int i = 0; i < 200; i++) one($urandom_range(4096, 65534), i[0]);
    w = 32'h0000_1fff; #1; checks++;
    if (valid) begin failures++; $display("FAIL: 19 leading zeros accepted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
