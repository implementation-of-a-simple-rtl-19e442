// qp_sw: slide-switch input port of the queue processor (0x80000018).
//
// Passes the N_SW switch levels through a two-flop synchroniser; a load
// from the port address returns them in the low bits, zero extended. One
// bit per switch as specified; the switch count (18) and the synchroniser
// are this design's choices.
module qp_sw
  import qp_pkg::*;
#(
  parameter int N_SW = 18
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_SW-1:0] SW,
  output word_t           rdata
);
  logic [N_SW-1:0] s1, s2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin s1 <= '0; s2 <= '0; end
    else begin s1 <= SW; s2 <= s1; end
  end

  assign rdata = word_t'(s2);
endmodule
