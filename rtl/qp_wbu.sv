// qp_wbu: write-back unit (WBU) of the queue processor.
//
// Chooses the value written back to the queue register or SPR: the memory
// read data for loads (Result_Sel, here ControlWB.mem_to_reg), otherwise
// the execution result, and raises the register write enable from
// ControlWB.reg_write. Purely combinational; the issue unit performs the
// write at the next clock edge.
module qp_wbu
  import qp_pkg::*;
(
  input  word_t    WBU_I_Result,
  input  word_t    WBU_I_ReadDataFromMem,
  input  raddr_t   WBU_I_DstAddress,
  input  ctrl_wb_t WBU_I_ControlWB,
  output word_t    WBU_O_WriteDataToReg,
  output raddr_t   WBU_O_DstAddress,
  output logic     WBU_O_RegWrite
);
  assign WBU_O_WriteDataToReg = WBU_I_ControlWB.mem_to_reg ? WBU_I_ReadDataFromMem : WBU_I_Result;
  assign WBU_O_DstAddress     = WBU_I_DstAddress;
  assign WBU_O_RegWrite       = WBU_I_ControlWB.reg_write;
endmodule
