// qp_dmem: data memory of the queue processor.
//
// DEPTH x 32-bit words, mapped by the bus decoder at word addresses
// 0x400-0x7FF (1024 words, 4 KB, as specified). One port: a write when sel
// and we are high, and a synchronous read whose data appears one clock
// after the address (block-RAM style, this design's choice).
module qp_dmem
  import qp_pkg::*;
#(
  parameter int DEPTH = 1024,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          sel,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  word_t         wdata,
  output word_t         rdata
);
  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (sel && we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
