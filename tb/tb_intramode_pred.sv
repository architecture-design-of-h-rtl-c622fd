// tb_intramode_pred: exhaustive over neighbour availability, type and mode,
// the prediction flag and rem_intra4x4_pred_mode; the expected mode is
// derived here by listing the eight non-predicted modes in order.
module tb_intramode_pred;
  import h264_pkg::*;
  logic a_avail, a_is_i4, b_avail, b_is_i4, prev_flag; i4_mode_e a_mode, b_mode, pred_mode, mode;
  logic [2:0] rem_mode;
  intramode_pred dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int av = 0; av < 16; av++)
      for (int am = 0; am < 9; am++)
        for (int bm = 0; bm < 9; bm++)
          for (int f = 0; f < 9; f++) begin
            int pa, pb, p, e, k;
            int others [$];
            a_avail = av[0]; a_is_i4 = av[1]; b_avail = av[2]; b_is_i4 = av[3];
            a_mode = i4_mode_e'(am); b_mode = i4_mode_e'(bm);
            prev_flag = (f == 8); rem_mode = 3'(f);
            #1;
            pa = av[1] ? am : 2; pb = av[3] ? bm : 2;
            p = (av[0] && av[2]) ? ((pa < pb) ? pa : pb) : 2;
            others.delete();
            for (k = 0; k < 9; k++) if (k != p) others.push_back(k);
            e = (f == 8) ? p : others[f];
            checks++;
            if (int'(pred_mode) != p || int'(mode) != e) begin
              failures++; $display("FAIL av %0d am %0d bm %0d f %0d: %0d/%0d exp %0d/%0d", av, am, bm, f, pred_mode, mode, p, e);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
