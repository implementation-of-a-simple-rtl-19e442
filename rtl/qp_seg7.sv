// qp_seg7: seven-segment display port of the queue processor.
//
// A 32-bit register at bus address 0x80000000. Each 4-bit group drives one
// hexadecimal digit: bits 3:0 HEX0 up to bits 31:28 HEX7. A store writes
// the register; a load reads it back (rdata, combinational, registered by
// the bus). Segment outputs are active low with segment g in bit 6 and a in
// bit 0, the usual arrangement on boards with eight HEX digits; polarity
// and segment order are this design's choice.
module qp_seg7
  import qp_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           we,
  input  word_t          wdata,
  output word_t          rdata,
  output logic [7:0][6:0] HEX
);
  word_t value_reg;

  function automatic logic [6:0] seg(input logic [3:0] d);
    unique case (d)       // gfedcba, 1 = segment lit
      4'h0: seg = 7'b0111111;  4'h1: seg = 7'b0000110;
      4'h2: seg = 7'b1011011;  4'h3: seg = 7'b1001111;
      4'h4: seg = 7'b1100110;  4'h5: seg = 7'b1101101;
      4'h6: seg = 7'b1111101;  4'h7: seg = 7'b0000111;
      4'h8: seg = 7'b1111111;  4'h9: seg = 7'b1101111;
      4'hA: seg = 7'b1110111;  4'hB: seg = 7'b1111100;
      4'hC: seg = 7'b0111001;  4'hD: seg = 7'b1011110;
      4'hE: seg = 7'b1111001;  4'hF: seg = 7'b1110001;
      default: seg = 7'b0000000;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n)  value_reg <= '0;
    else if (we) value_reg <= wdata;
  end

  assign rdata = value_reg;
  always_comb
    for (int i = 0; i < 8; i++) HEX[i] = ~seg(value_reg[4*i +: 4]);
endmodule
