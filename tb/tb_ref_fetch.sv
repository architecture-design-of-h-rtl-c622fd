// tb_ref_fetch: the reference-window fetch unit against a frame held here.
//
// A 64x64 random frame sits behind a memory model that answers row requests
// in order after 1..3 cycles and refuses requests at random.  Random
// partitions (1, 2 or 4 blocks each way, fractional or integer vectors in
// each direction) are sent; every 9x9 window that comes out is compared,
// at the pixels the interpolator uses for that fraction, with the frame,
// and the block position and fraction are checked.  The pixel count of each
// partition must equal the size of the union window, and the total is
// compared with what separate 9x9 windows per block would have read.
module tb_ref_fetch;
  import h264_pkg::*;
  localparam int PW = 64, PH = 64;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic cmd_valid, cmd_ready, cmd_buf, mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic win_valid, win_ready, win_buf;
  logic [5:0] cmd_ref_x, cmd_ref_y, mem_req_x, mem_req_y;
  logic [1:0] cmd_dx, cmd_dy, win_dx, win_dy; logic [2:0] cmd_w4, cmd_h4; logic [3:0] cmd_pos, win_pos;
  logic [4:0] mem_req_len; pixel_t mem_rsp_pix [21]; pixel_t win [9][9]; logic [31:0] fetched;
  ref_fetch #(.PIC_W(PW), .PIC_H(PH)) dut (.*);
  int checks = 0, failures = 0;
  int F [PH][PW];

  // memory model: in-order row responses after a random latency
  int q_x [$], q_y [$], q_l [$], q_t [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (mem_req_valid && mem_req_ready) begin
      q_x.push_back(int'(mem_req_x)); q_y.push_back(int'(mem_req_y)); q_l.push_back(int'(mem_req_len));
      q_t.push_back(cyc + int'($urandom_range(1, 3)));
    end
  end
  always @(negedge clk) begin
    mem_req_ready = ($urandom_range(0, 3) != 0);
    mem_rsp_valid = 0;
    if (q_t.size() != 0 && q_t[0] <= cyc) begin
      for (int c = 0; c < 21; c++) mem_rsp_pix[c] = (c < q_l[0]) ? 8'(F[q_y[0]][q_x[0] + c]) : 8'd0;
      mem_rsp_valid = 1;
      void'(q_x.pop_front()); void'(q_y.pop_front()); void'(q_l.pop_front()); void'(q_t.pop_front());
    end
  end

  initial begin
    int total = 0, naive = 0, nint = 0;
    for (int y = 0; y < PH; y++) for (int x = 0; x < PW; x++) F[y][x] = $urandom_range(0, 255);
    cmd_valid = 0; win_ready = 0; cmd_ref_x = 0; cmd_ref_y = 0; cmd_dx = 0; cmd_dy = 0;
    cmd_w4 = 1; cmd_h4 = 1; cmd_pos = 0; cmd_buf = 0; mem_req_ready = 0; mem_rsp_valid = 0;
    for (int c = 0; c < 21; c++) mem_rsp_pix[c] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int w4, h4, rx, ry, dx, dy, px, py, f0, exp_pix, nb;
      w4 = 1 << $urandom_range(0, 2); h4 = 1 << $urandom_range(0, 2);
      px = $urandom_range(0, 4 - w4); py = $urandom_range(0, 4 - h4);
      px -= px % w4; py -= py % h4;
      rx = $urandom_range(2, PW - 4 * w4 - 4); ry = $urandom_range(2, PH - 4 * h4 - 4);
      dx = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, 3);
      dy = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, 3);
      if (dx == 0 && dy == 0) nint++;
      while (!cmd_ready) @(negedge clk);
      f0 = fetched;
      cmd_ref_x = 6'(rx); cmd_ref_y = 6'(ry); cmd_dx = 2'(dx); cmd_dy = 2'(dy);
      cmd_w4 = 3'(w4); cmd_h4 = 3'(h4); cmd_pos = 4'(4 * py + px); cmd_buf = 1'(n % 2); cmd_valid = 1;
      @(negedge clk); cmd_valid = 0;
      nb = 0;
      while (nb < w4 * h4) begin
        win_ready = ($urandom_range(0, 2) != 0);
        #1;
        if (win_valid && win_ready) begin
          int bx, by;
          bx = nb % w4; by = nb / w4;
          checks++;
          if (int'(win_pos) != 4 * (py + by) + px + bx || int'(win_dx) != dx || int'(win_dy) != dy || win_buf != 1'(n % 2)) begin
            failures++; $display("FAIL cmd %0d block %0d: pos %0d dx %0d dy %0d", n, nb, win_pos, win_dx, win_dy);
          end
          for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++)
            if ((dy != 0 || (r >= 2 && r < 6)) && (dx != 0 || (c >= 2 && c < 6))) begin
              checks++;
              exp_pix = F[ry + 4 * by + r - 2][rx + 4 * bx + c - 2];
              if (int'(win[r][c]) != exp_pix) begin
                failures++;
                if (failures < 20) $display("FAIL cmd %0d block %0d (%0d,%0d): %0d exp %0d", n, nb, r, c, win[r][c], exp_pix);
              end
            end
          nb++;
        end
        @(negedge clk);
      end
      win_ready = 0;
      checks++;
      if (int'(fetched) - f0 != (4 * w4 + (dx != 0 ? 5 : 0)) * (4 * h4 + (dy != 0 ? 5 : 0))) begin
        failures++; $display("FAIL cmd %0d fetched %0d", n, int'(fetched) - f0);
      end
      total += int'(fetched) - f0; naive += 81 * w4 * h4;
    end
    $display("pixels read %0d, separate 9x9 windows %0d (%0d%% saved), integer-vector partitions %0d",
             total, naive, 100 - 100 * total / naive, nint);
    checks++;
    if (total >= naive / 2) begin failures++; $display("FAIL reuse saves too little"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
