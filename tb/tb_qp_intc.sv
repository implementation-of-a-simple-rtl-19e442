// tb_qp_intc: self-checking test of the interrupt controller. Checks that
// a request waits while interrupts are disabled, that hold lasts exactly
// DRAIN clocks before the one-clock accept with the right routine address,
// that int_req1 is served before a pending int_req0, and that rfi gives the
// same drain followed by the restore pulse.
module tb_qp_intc;
  import qp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic IntReq0 = 0, IntReq1 = 0, IntEnable = 0, RFI = 0;
  logic Hold, IntAccept, RfiRestore;
  word_t IntAddress;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  qp_intc dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Count hold clocks after the first one until the pulse (the first is
  // checked by the caller); return the address at the pulse. Hold covers
  // DRAIN + 1 clocks in all, the last one being the pulse itself.
  task automatic wait_pulse(input bit restore, output int holds, output word_t a);
    holds = 0; a = 0;
    for (int k = 0; k < 50; k++) begin
      @(negedge clk);
      if (Hold) holds++;
      if (restore ? RfiRestore : IntAccept) begin a = IntAddress; break; end
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h;
    word_t a;
    @(negedge clk); rst_n = 1;
    IntReq0 = 1; @(negedge clk); IntReq0 = 0;
    IntReq1 = 1; @(negedge clk); IntReq1 = 0;
    repeat (5) @(negedge clk);
    chk(!Hold && !IntAccept, "disabled: nothing happens");
    IntEnable = 1;
    #1;
    chk(Hold, "hold starts at once");
    wait_pulse(0, h, a);
    chk(h == 6 && a == 32'h200, $sformatf("int_req1 first after drain (holds %0d, %h)", h, a));
    IntEnable = 0;                  // the decode unit clears it on accept
    @(negedge clk);
    chk(!Hold, "hold released");
    @(negedge clk); RFI = 1; #1;
    chk(Hold, "rfi holds at once");
    @(negedge clk); RFI = 0; IntEnable = 1;
    wait_pulse(1, h, a);
    chk(h == 5, $sformatf("rfi drain (holds %0d)", h));
    wait_pulse(0, h, a);
    chk(a == 32'h280, "pending int_req0 served next");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
