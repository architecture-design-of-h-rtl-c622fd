// sum_clip: SUM_AND_CLIPPING -- reconstructs pixels as prediction plus
// residue, clipped to 0..255, four pixels per cycle.
//
// One register stage: a row presented with in_valid appears on out_* in the
// next cycle (valid/ready, stalls when out_ready is low).  The prediction comes
// from the intra or inter prediction engine of the current macroblock; the
// selection is made by the caller.  Four pixels per cycle matches the
// parallelism the document chooses for the prediction engines; the register
// stage is this design's choice.
module sum_clip
  import h264_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  pixel_t in_pred [4],
  input  resid_t in_res  [4],
  output logic   out_valid,
  input  logic   out_ready,
  output pixel_t out_pix [4]
);
  assign in_ready = !out_valid || out_ready;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < 4; i++) out_pix[i] <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid)
        for (int i = 0; i < 4; i++)
          out_pix[i] <= clip_pix(20'(signed'({1'b0, in_pred[i]})) + 20'(signed'(in_res[i])));
    end
  end
endmodule
