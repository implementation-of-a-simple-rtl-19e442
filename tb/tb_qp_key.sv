// tb_qp_key: self-checking test of the push-switch port. Presses and
// releases buttons (active low) and checks one interrupt request per press,
// none on release or while held, and the pressed state on the read port.
module tb_qp_key;
  import qp_pkg::*;
  logic clk = 0, rst_n = 0, irq;
  logic [3:0] KEY = 4'hF;
  word_t rdata;
  int checks = 0, failures = 0, nirq = 0;
  always #5 clk = ~clk;
  always @(posedge clk) if (irq) nirq++;

  qp_key dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    chk(nirq == 0 && rdata == 0, "idle");
    for (int k = 0; k < 4; k++) begin
      KEY[k] = 0;
      repeat (10) @(negedge clk);
      chk(nirq == k + 1, $sformatf("one request for press of KEY%0d", k));
      chk(rdata == 32'(1 << k), "pressed state");
      KEY[k] = 1;
      repeat (10) @(negedge clk);
      chk(nirq == k + 1 && rdata == 0, "no request on release");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
