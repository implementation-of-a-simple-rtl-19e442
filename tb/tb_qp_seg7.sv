// tb_qp_seg7: self-checking test of the seven-segment port. Writes
// 0x01234567 and 0x89ABCDEF and checks each digit's active-low segment
// pattern against the standard hexadecimal glyphs, and the read back.
module tb_qp_seg7;
  import qp_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  word_t wdata = 0, rdata;
  logic [7:0][6:0] HEX;
  int checks = 0, failures = 0;
  // gfedcba, lit = 1
  logic [6:0] glyph [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                             7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
  always #5 clk = ~clk;

  qp_seg7 dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t v [2] = '{32'h01234567, 32'h89ABCDEF};
    @(negedge clk); rst_n = 1;
    checks++;
    if (HEX[0] != ~glyph[0]) begin failures++; $display("FAIL reset shows 0"); end
    foreach (v[k]) begin
      @(negedge clk); we = 1; wdata = v[k];
      @(negedge clk); we = 0;
      checks++;
      if (rdata != v[k]) begin failures++; $display("FAIL readback"); end
      for (int d = 0; d < 8; d++) begin
        checks++;
        if (HEX[d] != ~glyph[v[k][4*d +: 4]]) begin
          failures++; $display("FAIL HEX%0d = %b", d, HEX[d]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
