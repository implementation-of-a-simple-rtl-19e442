// qp_top: the queue processor with its memories and peripherals.
//
// A seven-stage pipeline: fetch (qp_fu, with the instruction memory),
// decode (qp_du), queue computation (qp_qcu), issue / register file
// (qp_iu), execute (qp_eu), memory (qp_mu) and write back (qp_wbu). Operands
// live in a 32-entry circular queue register addressed through the queue
// head and tail kept by qp_qcu, plus 16 special purpose registers.
// Unconditional jumps are taken in decode (one bubble); conditional
// branches are resolved in execute and flush the four younger stages.
// The memory unit drives a memory-mapped bus (qp_iobus) to the 4 KB data
// memory (qp_dmem), the eight-digit seven-segment port (qp_seg7), the
// timer (qp_timer), the slide switches (qp_sw) and the push switches
// (qp_key). The timer and the push switches request interrupts through
// qp_intc, which drains the pipeline and then makes every unit save (or,
// on rfi, restore) its state in one clock.
//
// Ports: one clock, synchronous active-low reset, a write port for loading
// the instruction memory (16-bit words), the board switches and buttons,
// and the eight HEX digits (active-low segments). Everything inside follows
// the specification's unit partitioning and signal names; clocking, reset
// and the program-load port are this design's choices.
module qp_top
  import qp_pkg::*;
#(
  parameter int IMEM_DEPTH = 1024,
  parameter int DMEM_DEPTH = 1024,
  parameter int N_SW       = 18,
  parameter int N_KEY      = 4,
  parameter int DRAIN      = 6
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          IMEM_We,
  input  logic [$clog2(IMEM_DEPTH)-1:0] IMEM_Addr,
  input  logic [15:0]                   IMEM_Data,
  input  logic [N_SW-1:0]               SW,
  input  logic [N_KEY-1:0]              KEY,
  output logic [7:0][6:0]               HEX
);
  // FU -> DU
  instr_t     fu_instr;
  word_t      fu_pc;
  // DU
  logic [1:0] du_pn, du_cn, du_areg;
  logic [2:0] du_regsel;
  logic [3:0] du_regnum, du_exeop;
  logic [7:0] du_operand;
  ctrl_exe_t  du_cexe;
  ctrl_mem_t  du_cmem;
  ctrl_wb_t   du_cwb;
  word_t      du_pc, du_jaddr;
  logic       du_jump, du_inten, du_rfi;
  // QCU
  raddr_t     q_src1, q_src2, q_dst;
  logic [7:0] q_operand;
  ctrl_exe_t  q_cexe;
  ctrl_mem_t  q_cmem;
  ctrl_wb_t   q_cwb;
  logic [3:0] q_exeop;
  word_t      q_pc;
  // IU
  raddr_t     i_src1a, i_src2a, i_dst;
  word_t      i_src1, i_src2, i_pc, i_areg;
  logic [7:0] i_operand;
  ctrl_exe_t  i_cexe;
  ctrl_mem_t  i_cmem;
  ctrl_wb_t   i_cwb;
  logic [3:0] i_exeop;
  // EU
  word_t      e_result, e_wdata, e_baddr;
  raddr_t     e_dst;
  ctrl_mem_t  e_cmem;
  ctrl_wb_t   e_cwb;
  logic       e_branch;
  qidx_t      e_rqh, e_rqt;
  // MU / bus
  word_t      m_result, m_rdata, bus_addr, bus_wdata, bus_rdata;
  raddr_t     m_dst;
  ctrl_wb_t   m_cwb;
  ctrl_mem_t  bus_ctrl;
  // WBU
  word_t      w_data;
  raddr_t     w_addr;
  logic       w_we;
  // interrupts
  logic       hold, int_acc, rfi_rst;
  word_t      int_addr;
  // peripherals
  localparam int DAW = $clog2(DMEM_DEPTH);
  logic           dmem_sel, dmem_we, seg7_we, tcmd_we, tcnt_we, t_irq, k_irq;
  logic [DAW-1:0] dmem_addr;
  word_t          dmem_rdata, seg7_rdata, tcnt_rdata, sw_rdata, key_rdata;
  logic [7:0]     tcmd_rdata;

  qp_fu #(.IMEM_DEPTH(IMEM_DEPTH)) u_fu (
    .clk, .rst_n,
    .IMEM_We, .IMEM_Addr, .IMEM_Data,
    .FU_I_Jump(du_jump), .FU_I_Branch(e_branch),
    .FU_I_JumpAddress(du_jaddr), .FU_I_BranchAddress(e_baddr),
    .FU_I_IntReq(int_acc), .FU_I_IntAddress(int_addr),
    .FU_I_RFI(rfi_rst), .FU_I_Hold(hold),
    .FU_O_Instruction(fu_instr), .FU_O_PC(fu_pc)
  );

  qp_du u_du (
    .clk, .rst_n,
    .DU_I_Instruction(fu_instr), .DU_I_PC(fu_pc), .DU_I_ARegValue(i_areg),
    .DU_I_Flush(e_branch), .DU_I_IntAck(int_acc),
    .DU_O_PN(du_pn), .DU_O_CN(du_cn), .DU_O_RegSel(du_regsel), .DU_O_RegNum(du_regnum),
    .DU_O_Operand(du_operand), .DU_O_ControlExe(du_cexe), .DU_O_ExeOp(du_exeop),
    .DU_O_ControlMem(du_cmem), .DU_O_ControlWB(du_cwb), .DU_O_PC(du_pc),
    .DU_O_ARegAddress(du_areg), .DU_O_Jump(du_jump), .DU_O_JumpAddress(du_jaddr),
    .DU_O_IntEnable(du_inten), .DU_O_RFI(du_rfi)
  );

  qp_qcu u_qcu (
    .clk, .rst_n,
    .QCU_I_PN(du_pn), .QCU_I_CN(du_cn), .QCU_I_RegSel(du_regsel), .QCU_I_RegNum(du_regnum),
    .QCU_I_Operand(du_operand), .QCU_I_ControlExe(du_cexe), .QCU_I_ExeOp(du_exeop),
    .QCU_I_ControlMem(du_cmem), .QCU_I_ControlWB(du_cwb), .QCU_I_PC(du_pc),
    .QCU_I_Branch(e_branch), .QCU_I_RenewQH(e_rqh), .QCU_I_RenewQT(e_rqt),
    .QCU_I_IntReq(int_acc), .QCU_I_RFI(rfi_rst),
    .QCU_O_Src1Address(q_src1), .QCU_O_Src2Address(q_src2), .QCU_O_DstAddress(q_dst),
    .QCU_O_Operand(q_operand), .QCU_O_ControlExe(q_cexe), .QCU_O_ExeOp(q_exeop),
    .QCU_O_ControlMem(q_cmem), .QCU_O_ControlWB(q_cwb), .QCU_O_PC(q_pc),
    .QCU_O_QH(), .QCU_O_QT()
  );

  qp_iu u_iu (
    .clk, .rst_n,
    .IU_I_Src1Address(q_src1), .IU_I_Src2Address(q_src2), .IU_I_DstAddress(q_dst),
    .IU_I_Operand(q_operand), .IU_I_ControlExe(q_cexe), .IU_I_ExeOp(q_exeop),
    .IU_I_ControlMem(q_cmem), .IU_I_ControlWB(q_cwb), .IU_I_PC(q_pc),
    .IU_I_RegWrite(w_we), .IU_I_WriteData(w_data), .IU_I_WriteAddress(w_addr),
    .IU_I_ARegAddress(du_areg), .IU_I_Flush(e_branch),
    .IU_I_IntReq(int_acc), .IU_I_RFI(rfi_rst),
    .IU_O_Src1Address(i_src1a), .IU_O_Src2Address(i_src2a),
    .IU_O_Src1(i_src1), .IU_O_Src2(i_src2), .IU_O_DstAddress(i_dst),
    .IU_O_Operand(i_operand), .IU_O_ControlExe(i_cexe), .IU_O_ExeOp(i_exeop),
    .IU_O_ControlMem(i_cmem), .IU_O_ControlWB(i_cwb), .IU_O_PC(i_pc),
    .IU_O_ARegValue(i_areg)
  );

  qp_eu u_eu (
    .clk, .rst_n,
    .EU_I_Src1Address(i_src1a), .EU_I_Src2Address(i_src2a),
    .EU_I_Src1(i_src1), .EU_I_Src2(i_src2), .EU_I_DstAddress(i_dst),
    .EU_I_Operand(i_operand), .EU_I_ControlExe(i_cexe), .EU_I_ExeOp(i_exeop),
    .EU_I_PC(i_pc), .EU_I_ControlMem(i_cmem), .EU_I_ControlWB(i_cwb),
    .EU_I_IntReq(int_acc), .EU_I_RFI(rfi_rst),
    .EU_O_Result(e_result), .EU_O_WriteDataToMem(e_wdata), .EU_O_DstAddress(e_dst),
    .EU_O_ControlMem(e_cmem), .EU_O_ControlWB(e_cwb),
    .EU_O_BranchAddress(e_baddr), .EU_O_Branch(e_branch),
    .EU_O_RenewQH(e_rqh), .EU_O_RenewQT(e_rqt), .EU_O_CC()
  );

  qp_mu u_mu (
    .clk, .rst_n,
    .MU_I_Result(e_result), .MU_I_WriteDataToMem(e_wdata), .MU_I_DstAddress(e_dst),
    .MU_I_ControlMem(e_cmem), .MU_I_ControlWB(e_cwb),
    .MU_I_ReadDataFromPeripheral(bus_rdata),
    .MU_O_Result(m_result), .MU_O_ReadDataFromMem(m_rdata), .MU_O_DstAddress(m_dst),
    .MU_O_ControlWB(m_cwb), .MU_O_ControlPeripheral(bus_ctrl),
    .MU_O_PeripheralAddress(bus_addr), .MU_O_WriteDataToPeripheral(bus_wdata)
  );

  qp_wbu u_wbu (
    .WBU_I_Result(m_result), .WBU_I_ReadDataFromMem(m_rdata),
    .WBU_I_DstAddress(m_dst), .WBU_I_ControlWB(m_cwb),
    .WBU_O_WriteDataToReg(w_data), .WBU_O_DstAddress(w_addr), .WBU_O_RegWrite(w_we)
  );

  qp_intc #(.DRAIN(DRAIN), .INT0_VEC(INT0_ADDR), .INT1_VEC(INT1_ADDR)) u_intc (
    .clk, .rst_n,
    .IntReq0(t_irq), .IntReq1(k_irq), .IntEnable(du_inten), .RFI(du_rfi),
    .Hold(hold), .IntAccept(int_acc), .IntAddress(int_addr), .RfiRestore(rfi_rst)
  );

  qp_iobus #(.DMEM_DEPTH(DMEM_DEPTH)) u_bus (
    .clk, .rst_n, .ctrl(bus_ctrl), .addr(bus_addr),
    .dmem_sel, .dmem_we, .dmem_addr, .dmem_rdata,
    .seg7_we, .tcmd_we, .tcnt_we,
    .seg7_rdata, .tcmd_rdata, .tcnt_rdata, .sw_rdata, .key_rdata,
    .rdata(bus_rdata)
  );

  qp_dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk, .sel(dmem_sel), .we(dmem_we), .addr(dmem_addr), .wdata(bus_wdata), .rdata(dmem_rdata)
  );

  qp_seg7 u_seg7 (
    .clk, .rst_n, .we(seg7_we), .wdata(bus_wdata), .rdata(seg7_rdata), .HEX
  );

  qp_timer u_timer (
    .clk, .rst_n, .cmd_we(tcmd_we), .cnt_we(tcnt_we), .wdata(bus_wdata),
    .cmd(tcmd_rdata), .count(tcnt_rdata), .irq(t_irq)
  );

  qp_sw #(.N_SW(N_SW)) u_sw (.clk, .rst_n, .SW, .rdata(sw_rdata));

  qp_key #(.N_KEY(N_KEY)) u_key (.clk, .rst_n, .KEY, .rdata(key_rdata), .irq(k_irq));
endmodule
