// tb_qp_iobus: self-checking test of the bus decoder. For each mapped
// address it checks the write selects, and that a read returns the
// selected slave's value one clock later; data-memory addresses outside
// 0x400-0x7FF and unmapped peripheral addresses must select nothing and
// read 0.
module tb_qp_iobus;
  import qp_pkg::*;
  logic clk = 0, rst_n = 0;
  ctrl_mem_t ctrl = '0;
  word_t addr = 0;
  logic dmem_sel, dmem_we, seg7_we, tcmd_we, tcnt_we;
  logic [9:0] dmem_addr;
  word_t dmem_rdata = 32'hD0D0_0001, seg7_rdata = 32'h5E57_0002, tcnt_rdata = 32'h0C00_0003;
  word_t sw_rdata = 32'h0003_1234, key_rdata = 32'h0000_0005, rdata;
  logic [7:0] tcmd_rdata = 8'h05;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  qp_iobus dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(input word_t a, input logic [4:0] wsel, input word_t rexp);
    @(negedge clk); addr = a; ctrl = 2'b01; #1;
    chk({dmem_we, seg7_we, tcmd_we, tcnt_we} == wsel[4:1] && dmem_sel == wsel[0],
        $sformatf("write selects at %h", a));
    if (wsel[0]) chk(dmem_addr == a[9:0], "dmem index");
    @(negedge clk); ctrl = 2'b10;
    @(negedge clk); ctrl = 2'b00;
    chk(rdata == rexp, $sformatf("read at %h = %h", a, rdata));
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    access(32'h0000_0400, 5'b10001, dmem_rdata);
    access(32'h0000_07FF, 5'b10001, dmem_rdata);
    access(32'h0000_03FF, 5'b00000, 32'h0);
    access(32'h0000_0800, 5'b00000, 32'h0);
    access(SEG7_ADDR,     5'b01000, seg7_rdata);
    access(TCMD_ADDR,     5'b00100, 32'h5);
    access(TCNT_ADDR,     5'b00010, tcnt_rdata);
    access(SW_ADDR,       5'b00000, sw_rdata);
    access(KEY_ADDR,      5'b00000, key_rdata);
    access(32'h8000_0030, 5'b00000, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
