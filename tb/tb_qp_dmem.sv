// tb_qp_dmem: self-checking test of the data memory: random writes and
// reads against a model array, with the one-clock read latency, and a
// check that a write without sel is ignored.
module tb_qp_dmem;
  import qp_pkg::*;
  logic clk = 0, sel = 0, we = 0;
  logic [9:0] addr = 0;
  word_t wdata = 0, rdata;
  word_t m [1024];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  qp_dmem dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); sel = 1; we = 1; addr = 10'(i); wdata = $urandom; m[i] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      addr = 10'($urandom); sel = 1'($urandom_range(0, 3) != 0); we = 1'($urandom);
      wdata = $urandom;
      @(posedge clk); #1;
      checks++;
      if (rdata != m[addr]) begin failures++; $display("FAIL read %0d", addr); end
      if (sel && we) m[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
