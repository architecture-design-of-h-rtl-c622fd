// bs_fifo: the Bitstream SRAM as a word FIFO between the system bus and the
// PARSER engine's barrel shifter.
//
// The bus writes 32-bit words (wr_en, refused while full); the read side
// offers the oldest word with valid/ready.  The words live in a sram_dp with
// a one-cycle read; a one-word output register is refilled as soon as it is
// empty or taken, so a word can leave every cycle.  The depth is this design's
// choice (the document gives no size for this SRAM).
module bs_fifo #(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [31:0] wr_data,
  output logic        full,
  output logic        rd_valid,
  input  logic        rd_ready,
  output logic [31:0] rd_data
);
  logic [AW:0]   wp, rp;        // rp: next word to read from the SRAM
  logic          rd_pend;       // a read was issued last cycle
  logic          out_full;
  logic [31:0]   out_q, ram_q;
  logic          issue, take;
  logic [AW:0]   stored;        // words in SRAM not yet read

  assign stored = wp - rp;
  assign full   = (wp - rp) == (AW + 1)'(DEPTH);
  assign take   = rd_valid && rd_ready;
  // issue a read only when the output stage is (or is becoming) empty, so the
  // word arriving next cycle always has a place
  assign issue  = (stored != '0) && ((out_full || rd_pend) ? take : 1'b1);

  sram_dp #(.DEPTH(DEPTH), .WIDTH(32)) u_ram (
    .clk(clk),
    .a_en(wr_en && !full), .a_we(1'b1), .a_addr(wp[AW-1:0]), .a_wdata(wr_data), .a_rdata(),
    .b_en(issue), .b_we(1'b0), .b_addr(rp[AW-1:0]), .b_wdata('0), .b_rdata(ram_q)
  );

  // output: the registered word, or the word arriving from the SRAM
  assign rd_valid = out_full || rd_pend;
  assign rd_data  = out_full ? out_q : ram_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; rd_pend <= 1'b0; out_full <= 1'b0; out_q <= '0;
    end else begin
      if (wr_en && !full) wp <= wp + 1'b1;
      if (issue) rp <= rp + 1'b1;
      rd_pend <= issue;
      // an arriving word is parked unless it is taken directly
      out_full <= (out_full || rd_pend) && !take;
      if (rd_pend && !take) out_q <= ram_q;
    end
  end
endmodule
