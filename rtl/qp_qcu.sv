// qp_qcu: queue computation unit (QCU) of the queue processor.
//
// Holds the queue head QH and tail QT and turns each decoded instruction
// into physical register addresses: Src1 = QH, Src2 = QH + operand (the
// offset), Dst = QT. Where RegSel marks an operand as an SPR (bit 2 Src1,
// bit 1 Src2, bit 0 Dst), that address is {1, RegNum} instead. After each
// instruction QH advances by CN and QT by PN, both modulo the 32-entry
// queue. A taken branch from the execution unit loads QH and QT with the
// values the branch carried (its own Src1 and Dst addresses) and turns the
// instruction in this stage into a nop. An interrupt accept pulse copies
// QH/QT to QCU_IQHR_reg/QCU_IQTR_reg; the return-from-interrupt pulse
// copies them back. Results go to the issue unit through a pipeline
// register. This follows the specification; the modulo wrap is this
// design's reading of a circular queue register.
module qp_qcu
  import qp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] QCU_I_PN,
  input  logic [1:0] QCU_I_CN,
  input  logic [2:0] QCU_I_RegSel,
  input  logic [3:0] QCU_I_RegNum,
  input  logic [7:0] QCU_I_Operand,
  input  ctrl_exe_t  QCU_I_ControlExe,
  input  logic [3:0] QCU_I_ExeOp,
  input  ctrl_mem_t  QCU_I_ControlMem,
  input  ctrl_wb_t   QCU_I_ControlWB,
  input  word_t      QCU_I_PC,
  input  logic       QCU_I_Branch,
  input  qidx_t      QCU_I_RenewQH,
  input  qidx_t      QCU_I_RenewQT,
  input  logic       QCU_I_IntReq,
  input  logic       QCU_I_RFI,
  output raddr_t     QCU_O_Src1Address,
  output raddr_t     QCU_O_Src2Address,
  output raddr_t     QCU_O_DstAddress,
  output logic [7:0] QCU_O_Operand,
  output ctrl_exe_t  QCU_O_ControlExe,
  output logic [3:0] QCU_O_ExeOp,
  output ctrl_mem_t  QCU_O_ControlMem,
  output ctrl_wb_t   QCU_O_ControlWB,
  output word_t      QCU_O_PC,
  output qidx_t      QCU_O_QH,
  output qidx_t      QCU_O_QT
);
  qidx_t  QCU_QH_reg, QCU_QT_reg, QCU_IQHR_reg, QCU_IQTR_reg;
  raddr_t src1, src2, dst;
  raddr_t spr_addr;

  assign spr_addr = {2'b10, QCU_I_RegNum};
  assign src1 = QCU_I_RegSel[2] ? spr_addr : {1'b0, QCU_QH_reg};
  assign src2 = QCU_I_RegSel[1] ? spr_addr : {1'b0, QCU_QH_reg + QCU_I_Operand[QIDX_W-1:0]};
  assign dst  = QCU_I_RegSel[0] ? spr_addr : {1'b0, QCU_QT_reg};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      QCU_QH_reg <= '0; QCU_QT_reg <= '0;
      QCU_IQHR_reg <= '0; QCU_IQTR_reg <= '0;
    end else begin
      if (QCU_I_IntReq) begin
        QCU_IQHR_reg <= QCU_QH_reg;
        QCU_IQTR_reg <= QCU_QT_reg;
      end
      if (QCU_I_RFI) begin
        QCU_QH_reg <= QCU_IQHR_reg;
        QCU_QT_reg <= QCU_IQTR_reg;
      end else if (QCU_I_Branch) begin
        QCU_QH_reg <= QCU_I_RenewQH;
        QCU_QT_reg <= QCU_I_RenewQT;
      end else begin
        QCU_QH_reg <= QCU_QH_reg + qidx_t'(QCU_I_CN);
        QCU_QT_reg <= QCU_QT_reg + qidx_t'(QCU_I_PN);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || QCU_I_Branch) begin
      QCU_O_Src1Address <= '0; QCU_O_Src2Address <= '0; QCU_O_DstAddress <= '0;
      QCU_O_Operand <= '0; QCU_O_ControlExe <= CEXE_NONE; QCU_O_ExeOp <= '0;
      QCU_O_ControlMem <= '0; QCU_O_ControlWB <= '0; QCU_O_PC <= '0;
    end else begin
      QCU_O_Src1Address <= src1; QCU_O_Src2Address <= src2; QCU_O_DstAddress <= dst;
      QCU_O_Operand <= QCU_I_Operand; QCU_O_ControlExe <= QCU_I_ControlExe;
      QCU_O_ExeOp <= QCU_I_ExeOp; QCU_O_ControlMem <= QCU_I_ControlMem;
      QCU_O_ControlWB <= QCU_I_ControlWB; QCU_O_PC <= QCU_I_PC;
    end
  end

  assign QCU_O_QH = QCU_QH_reg;
  assign QCU_O_QT = QCU_QT_reg;
endmodule
