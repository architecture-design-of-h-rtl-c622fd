// tb_sram_dp: random reads and writes on both ports of an 80x32 memory
// against a shadow array, including same-cycle read-before-write.
module tb_sram_dp;
  logic clk = 0; always #5 clk = ~clk;
  logic a_en, a_we, b_en, b_we; logic [6:0] a_addr, b_addr; logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  sram_dp #(.DEPTH(80), .WIDTH(32)) dut (.*);
  int checks = 0, failures = 0;
  logic [31:0] shadow [80];
  initial begin
    logic [31:0] ea, eb; bit ca, cb;
    a_en = 1; a_we = 1; b_en = 0; b_we = 0; b_addr = 0; b_wdata = 0;
    for (int i = 0; i < 80; i++) begin
      a_addr = 7'(i); a_wdata = $urandom; shadow[i] = a_wdata; @(posedge clk); #1;
    end
    for (int n = 0; n < 3000; n++) begin
      a_en = $urandom_range(0, 1); b_en = $urandom_range(0, 1);
      a_we = $urandom_range(0, 1); b_we = $urandom_range(0, 1);
      a_addr = 7'($urandom_range(0, 79)); b_addr = 7'($urandom_range(0, 79));
      if (a_we && b_we && a_addr == b_addr) b_we = 0;
      a_wdata = $urandom; b_wdata = $urandom;
      ea = shadow[a_addr]; eb = shadow[b_addr]; ca = a_en; cb = b_en;
      if (a_en && a_we) shadow[a_addr] = a_wdata;
      if (b_en && b_we) shadow[b_addr] = b_wdata;
      @(posedge clk); #1;
      if (ca) begin checks++; if (a_rdata !== ea) begin failures++; $display("FAIL a %0d", n); end end
      if (cb) begin checks++; if (b_rdata !== eb) begin failures++; $display("FAIL b %0d", n); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
