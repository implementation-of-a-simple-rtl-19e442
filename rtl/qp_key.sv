// qp_key: push-switch port of the queue processor (0x80000020), interrupt
// source 1.
//
// The N_KEY buttons are active low. They pass through a two-flop
// synchroniser; a load from the port address returns their pressed state
// (1 = pressed). When any button goes from released to pressed, irq is
// high for one clock. The interrupt on a press follows the specification;
// polarity, synchroniser and count are this design's choices. There is no
// debouncing.
module qp_key
  import qp_pkg::*;
#(
  parameter int N_KEY = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_KEY-1:0] KEY,
  output word_t            rdata,
  output logic             irq
);
  logic [N_KEY-1:0] s1, s2, prev;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; prev <= '0; irq <= 1'b0;
    end else begin
      s1   <= ~KEY;
      s2   <= s1;
      prev <= s2;
      irq  <= |(s2 & ~prev);
    end
  end

  assign rdata = word_t'(s2);
endmodule
