// tb_sum_clip: random prediction/residue rows, including values that
// overflow both ends, with random back-pressure; checks every pixel and the
// one-cycle latency.
module tb_sum_clip;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  pixel_t in_pred [4]; resid_t in_res [4]; pixel_t out_pix [4];
  sum_clip dut (.*);
  int checks = 0, failures = 0;
  int expq [$][4];
  initial begin
    int sent = 0, got = 0;
    in_valid = 0; out_ready = 1;
    for (int i = 0; i < 4; i++) begin in_pred[i] = 0; in_res[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    while (got < 500) begin
      @(negedge clk);
      if (out_valid && out_ready) begin
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (int'(out_pix[i]) != expq[0][i]) begin failures++; $display("FAIL row %0d px %0d got %0d exp %0d", got, i, out_pix[i], expq[0][i]); end
        end
        void'(expq.pop_front()); got++;
      end
      if (in_valid && in_ready) sent++;
      // new stimulus
      if (!in_valid || in_ready) begin
        int e [4];
        in_valid = ($urandom_range(0, 3) != 0) && sent < 500;
        for (int i = 0; i < 4; i++) begin
          int r, p;
          p = $urandom_range(0, 255); r = int'($urandom_range(0, 1200)) - 600;
          in_pred[i] = 8'(p); in_res[i] = 16'(r);
          e[i] = (p + r < 0) ? 0 : (p + r > 255) ? 255 : p + r;
        end
        if (in_valid) expq.push_back(e);
      end
      out_ready = ($urandom_range(0, 4) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
