// qp_imem: instruction memory of the queue processor.
//
// DEPTH 16-bit words with one synchronous read port for the fetch unit and
// one write port used to load a program before (or while) the core runs.
// Read data appears one clock after the read address, as in an FPGA block
// RAM. The specification only names an instruction memory; its size, the
// synchronous read and the load port are this design's choices. The default
// of 1024 words covers byte addresses 0x000-0x7FF, which includes both
// interrupt routines (0x200 and 0x280).
module qp_imem #(
  parameter int DEPTH = 1024,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [15:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [15:0]   rdata
);
  logic [15:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
