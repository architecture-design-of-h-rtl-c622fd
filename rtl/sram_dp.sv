// sram_dp: true dual-port on-chip SRAM, synchronous read (one cycle), one
// read or write per port per cycle.
//
// Used for the decoder's buffers (bitstream SRAM, MB buffers, the two 80x32
// deblocking SRAMs).  A write and a read of the same word on different ports
// in the same cycle return the old word.  Written as an array so that a
// synthesis flow can map it to a memory macro; contents are not reset.
module sram_dp #(
  parameter int unsigned DEPTH = 80,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end
endmodule
