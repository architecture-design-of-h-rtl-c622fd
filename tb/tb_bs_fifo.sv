// tb_bs_fifo: the Bitstream SRAM word FIFO against a queue model.
//
// Writes and reads happen at random rates, with bursts that fill the FIFO
// (writes refused while full are not expected back) and bursts that drain
// it.  Every word read is compared with the queue; full may be raised only
// when at least DEPTH words are held (the SRAM is full; one more word can sit
// in the output register), and never more than DEPTH + 1 words are held.  A final phase keeps the FIFO non-empty
// with rd_ready held high and checks that a word leaves every cycle.
module tb_bs_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic wr_en, full, rd_valid, rd_ready; logic [31:0] wr_data, rd_data;
  bs_fifo #(.DEPTH(DEPTH)) dut (.*);
  int checks = 0, failures = 0;
  logic [31:0] q [$];
  int held = 0;   // words written and not yet read
  int phase = 0;

  always @(posedge clk) if (rst_n) begin
    checks++;
    if ((full && held < DEPTH) || held > DEPTH + 1) begin failures++; $display("FAIL full %0d with %0d words", full, held); end
    if (rd_valid && rd_ready) begin
      checks++;
      if (q.size() == 0 || rd_data != q[0]) begin failures++; $display("FAIL read %h exp %h", rd_data, q.size() ? q[0] : 0); end
      if (q.size() != 0) void'(q.pop_front());
      held--;
    end
    if (wr_en && !full) begin q.push_back(wr_data); held++; end
  end

  initial begin
    int streak, best;
    wr_en = 0; wr_data = 0; rd_ready = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int pw, pr;
      phase = (t / 250) % 3;
      pw = (phase == 0) ? 9 : (phase == 1) ? 2 : 5;
      pr = (phase == 0) ? 2 : (phase == 1) ? 9 : 5;
      wr_en = ($urandom_range(0, 9) < pw); wr_data = $urandom;
      rd_ready = ($urandom_range(0, 9) < pr);
      @(negedge clk);
    end
    // throughput: fill, then read continuously while writing every cycle
    rd_ready = 0; wr_en = 1;
    repeat (DEPTH + 2) begin wr_data = $urandom; @(negedge clk); end
    rd_ready = 1; streak = 0; best = 0;
    repeat (3 * DEPTH) begin
      wr_data = $urandom;
      @(negedge clk);
      if (rd_valid) streak++; else streak = 0;
      if (streak > best) best = streak;
    end
    checks++;
    if (best < 3 * DEPTH - 2) begin failures++; $display("FAIL throughput: %0d consecutive words", best); end
    wr_en = 0;
    repeat (DEPTH + 4) @(negedge clk);
    checks++;
    if (held != 0 || rd_valid) begin failures++; $display("FAIL %0d words left", held); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
