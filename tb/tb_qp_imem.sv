// tb_qp_imem: self-checking test of the instruction memory. Writes a
// pseudo-random pattern through the load port, then reads every word back
// and checks data and the one-clock read latency.
module tb_qp_imem;
  localparam int DEPTH = 64;
  logic clk = 0;
  logic we = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  qp_imem #(.DEPTH(DEPTH)) dut (.*);

  function automatic logic [15:0] pat(int i);
    return 16'(i * 16'h9E37 + 16'h1234);
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = pat(i);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = 6'(i);
      @(posedge clk); #1;
      checks++;
      if (rdata !== pat(i)) begin
        failures++; $display("FAIL imem[%0d] = %h, expected %h", i, rdata, pat(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
