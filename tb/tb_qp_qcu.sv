// tb_qp_qcu: self-checking test of the queue computation unit. Drives a
// random stream of PN/CN/offset/RegSel values and compares the generated
// Src1/Src2/Dst addresses and the queue head and tail with a reference
// model kept in the testbench (head and tail modulo 32). Also checks the
// branch renewal of QH/QT with its flush, and the interrupt save/restore.
module tb_qp_qcu;
  import qp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] QCU_I_PN = 0, QCU_I_CN = 0;
  logic [2:0] QCU_I_RegSel = 0;
  logic [3:0] QCU_I_RegNum = 0, QCU_I_ExeOp = 0;
  logic [7:0] QCU_I_Operand = 0;
  ctrl_exe_t QCU_I_ControlExe = CEXE_NONE;
  ctrl_mem_t QCU_I_ControlMem = '0;
  ctrl_wb_t QCU_I_ControlWB = '0;
  word_t QCU_I_PC = '0;
  logic QCU_I_Branch = 0, QCU_I_IntReq = 0, QCU_I_RFI = 0;
  qidx_t QCU_I_RenewQH = 0, QCU_I_RenewQT = 0;
  raddr_t QCU_O_Src1Address, QCU_O_Src2Address, QCU_O_DstAddress;
  logic [7:0] QCU_O_Operand;
  ctrl_exe_t QCU_O_ControlExe;
  logic [3:0] QCU_O_ExeOp;
  ctrl_mem_t QCU_O_ControlMem;
  ctrl_wb_t QCU_O_ControlWB;
  word_t QCU_O_PC;
  qidx_t QCU_O_QH, QCU_O_QT;
  int checks = 0, failures = 0;
  int qh = 0, qt = 0, sqh, sqt;
  always #5 clk = ~clk;

  qp_qcu dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (QH %0d QT %0d)", what, QCU_O_QH, QCU_O_QT); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raddr_t e1, e2, ed;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      QCU_I_PN = 2'($urandom_range(0, 1)); QCU_I_CN = 2'($urandom_range(0, 2));
      QCU_I_RegSel = 3'($urandom); QCU_I_RegNum = 4'($urandom);
      QCU_I_Operand = 8'($urandom_range(0, 7)); QCU_I_PC = 32'(i);
      QCU_I_ControlWB = ctrl_wb_t'($urandom);
      e1 = QCU_I_RegSel[2] ? {2'b10, QCU_I_RegNum} : raddr_t'(qh);
      e2 = QCU_I_RegSel[1] ? {2'b10, QCU_I_RegNum} : raddr_t'((qh + QCU_I_Operand) % 32);
      ed = QCU_I_RegSel[0] ? {2'b10, QCU_I_RegNum} : raddr_t'(qt);
      @(posedge clk); #1;
      chk(QCU_O_Src1Address == e1 && QCU_O_Src2Address == e2 && QCU_O_DstAddress == ed, "addresses");
      chk(QCU_O_PC == 32'(i) && QCU_O_Operand == QCU_I_Operand && QCU_O_ControlWB == QCU_I_ControlWB,
          "fields passed on");
      qh = (qh + QCU_I_CN) % 32; qt = (qt + QCU_I_PN) % 32;
      chk(QCU_O_QH == qidx_t'(qh) && QCU_O_QT == qidx_t'(qt), "head/tail update");
      if (i == 100) begin sqh = qh; sqt = qt; QCU_I_IntReq = 1; end
      else QCU_I_IntReq = 0;
      if (i == 150) begin
        // a taken branch overrides the update and flushes the stage
        QCU_I_Branch = 1; QCU_I_RenewQH = 5'd3; QCU_I_RenewQT = 5'd9;
        QCU_I_ControlWB = 2'b10;
        @(posedge clk); #1;
        chk(QCU_O_QH == 5'd3 && QCU_O_QT == 5'd9, "branch renews QH/QT");
        chk(QCU_O_ControlWB == 2'b00, "branch flushes the stage");
        qh = 3; qt = 9; QCU_I_Branch = 0;
      end
      if (i == 200) begin
        QCU_I_RFI = 1; QCU_I_PN = 0; QCU_I_CN = 0;
        @(posedge clk); #1;
        chk(QCU_O_QH == qidx_t'(sqh) && QCU_O_QT == qidx_t'(sqt), "rfi restores QH/QT");
        qh = sqh; qt = sqt; QCU_I_RFI = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
