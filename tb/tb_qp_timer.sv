// tb_qp_timer: self-checking test of the timer. Sets an initial value of
// 9, loads it (Number Set), starts the timer and checks that interrupt
// requests come exactly every 10 clocks, that the counter reads back while
// counting, and that Start/Stop = 0 stops both counting and requests.
module tb_qp_timer;
  import qp_pkg::*;
  logic clk = 0, rst_n = 0, cmd_we = 0, cnt_we = 0, irq;
  word_t wdata = 0, count;
  logic [7:0] cmd;
  int checks = 0, failures = 0;
  int irq_times [$];
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (irq) irq_times.push_back(cyc);
  end

  qp_timer dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    @(negedge clk); cnt_we = 1; wdata = 9;
    @(negedge clk); cnt_we = 0; cmd_we = 1; wdata = 32'h4;     // Number Set
    @(negedge clk); cmd_we = 0;
    chk(count == 9 && cmd == 8'h4, "counter loaded");
    repeat (5) @(negedge clk);
    chk(count == 9 && irq_times.size() == 0, "not counting before start");
    cmd_we = 1; wdata = 32'h1;                               // Start
    @(negedge clk); cmd_we = 0;
    chk(count == 9, "start");
    @(negedge clk);
    chk(count == 8, "counting down");
    repeat (60) @(negedge clk);
    chk(irq_times.size() >= 5, "periodic requests");
    for (int k = 1; k < irq_times.size(); k++)
      chk(irq_times[k] - irq_times[k-1] == 10, "period of initial value + 1 clocks");
    cmd_we = 1; wdata = 32'h0;                               // Stop
    @(negedge clk); cmd_we = 0;
    irq_times.delete();
    repeat (30) @(negedge clk);
    chk(irq_times.size() == 0, "stopped timer is silent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
