// tb_qp_sw: self-checking test of the slide-switch port: random switch
// settings must appear on the read value two clocks later, zero extended.
module tb_qp_sw;
  import qp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [17:0] SW = '0;
  word_t rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  qp_sw dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); SW = 18'($urandom);
      @(negedge clk);
      checks++;
      if (rdata == {14'd0, SW}) begin failures++; $display("FAIL not synchronised"); end
      @(negedge clk);
      checks++;
      if (rdata != {14'd0, SW}) begin failures++; $display("FAIL read %h", rdata); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
