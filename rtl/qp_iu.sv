// qp_iu: issue unit (IU) of the queue processor, i.e. its register file.
//
// Holds the 32 x 32-bit queue register QREG and the 16 x 32-bit special
// purpose registers SPR (0-3 d0-d3, 4-7 a0-a3, 8-15 general). Src1 and Src2
// are read by 6-bit address: bit 5 set reads an SPR, clear reads QREG.
// The read values and the instruction's controls go to the execution unit
// through a pipeline register, which a taken branch clears to a nop. The
// write port is driven by the write-back unit; a read of the register
// written in the same cycle returns the new value (write-through, this
// design's choice). A third, combinational read port returns a-register
// IU_I_ARegAddress to the decode unit for "jmp an".
//
// An interrupt accept pulse copies QREG and SPR into the shadow copies
// IQREG and ISPR; the return-from-interrupt pulse copies them back.
// Queue-register dependences are not checked: as in the specification,
// only SPR dependences are handled (in the execution unit).
module qp_iu
  import qp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  raddr_t     IU_I_Src1Address,
  input  raddr_t     IU_I_Src2Address,
  input  raddr_t     IU_I_DstAddress,
  input  logic [7:0] IU_I_Operand,
  input  ctrl_exe_t  IU_I_ControlExe,
  input  logic [3:0] IU_I_ExeOp,
  input  ctrl_mem_t  IU_I_ControlMem,
  input  ctrl_wb_t   IU_I_ControlWB,
  input  word_t      IU_I_PC,
  input  logic       IU_I_RegWrite,
  input  word_t      IU_I_WriteData,
  input  raddr_t     IU_I_WriteAddress,
  input  logic [1:0] IU_I_ARegAddress,
  input  logic       IU_I_Flush,
  input  logic       IU_I_IntReq,
  input  logic       IU_I_RFI,
  output raddr_t     IU_O_Src1Address,
  output raddr_t     IU_O_Src2Address,
  output word_t      IU_O_Src1,
  output word_t      IU_O_Src2,
  output raddr_t     IU_O_DstAddress,
  output logic [7:0] IU_O_Operand,
  output ctrl_exe_t  IU_O_ControlExe,
  output logic [3:0] IU_O_ExeOp,
  output ctrl_mem_t  IU_O_ControlMem,
  output ctrl_wb_t   IU_O_ControlWB,
  output word_t      IU_O_PC,
  output word_t      IU_O_ARegValue
);
  word_t QREG  [QREG_N];
  word_t SPR   [SPR_N];
  word_t IQREG [QREG_N];
  word_t ISPR  [SPR_N];

  function automatic word_t rd(input raddr_t a, input logic we, input raddr_t wa,
                               input word_t wd, input word_t q, input word_t s);
    if (we && wa == a) return wd;
    return a[5] ? s : q;
  endfunction

  word_t src1_v, src2_v;
  assign src1_v = rd(IU_I_Src1Address, IU_I_RegWrite, IU_I_WriteAddress, IU_I_WriteData,
                     QREG[IU_I_Src1Address[4:0]], SPR[IU_I_Src1Address[3:0]]);
  assign src2_v = rd(IU_I_Src2Address, IU_I_RegWrite, IU_I_WriteAddress, IU_I_WriteData,
                     QREG[IU_I_Src2Address[4:0]], SPR[IU_I_Src2Address[3:0]]);
  assign IU_O_ARegValue = SPR[{2'b01, IU_I_ARegAddress}];

  // Register file: written back from WBU, saved/restored around interrupts.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < QREG_N; i++) begin QREG[i] <= '0; IQREG[i] <= '0; end
      for (int i = 0; i < SPR_N; i++)  begin SPR[i]  <= '0; ISPR[i]  <= '0; end
    end else begin
      if (IU_I_IntReq) begin
        for (int i = 0; i < QREG_N; i++) IQREG[i] <= QREG[i];
        for (int i = 0; i < SPR_N; i++)  ISPR[i]  <= SPR[i];
      end
      if (IU_I_RFI) begin
        for (int i = 0; i < QREG_N; i++) QREG[i] <= IQREG[i];
        for (int i = 0; i < SPR_N; i++)  SPR[i]  <= ISPR[i];
      end else if (IU_I_RegWrite) begin
        if (IU_I_WriteAddress[5]) SPR[IU_I_WriteAddress[3:0]]  <= IU_I_WriteData;
        else                      QREG[IU_I_WriteAddress[4:0]] <= IU_I_WriteData;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || IU_I_Flush) begin
      IU_O_Src1Address <= '0; IU_O_Src2Address <= '0; IU_O_Src1 <= '0; IU_O_Src2 <= '0;
      IU_O_DstAddress <= '0; IU_O_Operand <= '0; IU_O_ControlExe <= CEXE_NONE;
      IU_O_ExeOp <= '0; IU_O_ControlMem <= '0; IU_O_ControlWB <= '0; IU_O_PC <= '0;
    end else begin
      IU_O_Src1Address <= IU_I_Src1Address; IU_O_Src2Address <= IU_I_Src2Address;
      IU_O_Src1 <= src1_v; IU_O_Src2 <= src2_v;
      IU_O_DstAddress <= IU_I_DstAddress; IU_O_Operand <= IU_I_Operand;
      IU_O_ControlExe <= IU_I_ControlExe; IU_O_ExeOp <= IU_I_ExeOp;
      IU_O_ControlMem <= IU_I_ControlMem; IU_O_ControlWB <= IU_I_ControlWB;
      IU_O_PC <= IU_I_PC;
    end
  end
endmodule
