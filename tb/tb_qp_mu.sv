// tb_qp_mu: self-checking test of the memory unit. Checks that the bus
// strobes, address and store data are driven in the cycle the instruction
// is in the stage (store data only for stores), that bus read data is
// handed straight on, and that result, destination and write-back
// controls appear one clock later.
module tb_qp_mu;
  import qp_pkg::*;
  logic clk = 0, rst_n = 0;
  word_t MU_I_Result = 0, MU_I_WriteDataToMem = 0, MU_I_ReadDataFromPeripheral = 0;
  raddr_t MU_I_DstAddress = 0;
  ctrl_mem_t MU_I_ControlMem = '0;
  ctrl_wb_t MU_I_ControlWB = '0;
  word_t MU_O_Result, MU_O_ReadDataFromMem, MU_O_PeripheralAddress, MU_O_WriteDataToPeripheral;
  raddr_t MU_O_DstAddress;
  ctrl_wb_t MU_O_ControlWB;
  ctrl_mem_t MU_O_ControlPeripheral;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  qp_mu dut (.*);

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
    word_t r, w, d;
    raddr_t da;
    ctrl_wb_t wb;
    ctrl_mem_t cm;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      r = $urandom; w = $urandom; d = $urandom; da = 6'($urandom); wb = 2'($urandom);
      cm = 2'(i % 3);
      MU_I_Result = r; MU_I_WriteDataToMem = w; MU_I_DstAddress = da; MU_I_ControlWB = wb;
      MU_I_ControlMem = cm; MU_I_ReadDataFromPeripheral = d;
      #1;
      chk(MU_O_ControlPeripheral == cm && MU_O_PeripheralAddress == r, "bus strobes and address");
      chk(MU_O_WriteDataToPeripheral == (cm.mem_write ? w : 0), "store data");
      chk(MU_O_ReadDataFromMem == d, "read data passed on");
      @(posedge clk); #1;
      chk(MU_O_Result == r && MU_O_DstAddress == da && MU_O_ControlWB == wb, "pipeline register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
