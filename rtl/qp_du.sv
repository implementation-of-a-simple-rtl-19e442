// qp_du: decode unit (DU) of the queue processor.
//
// Splits the 16-bit instruction into its opcode (upper byte) and operand
// (lower byte) and produces, in a pipeline register for the queue
// computation unit: PN and CN (queue entries produced and consumed), RegSel
// (which of Src1/Src2/Dst is an SPR), RegNum (the SPR index), the operand,
// the control groups for execute, memory and write back, and the PC.
// For a register-form ALU instruction an operand of 0 means "both operands
// from the head of the queue": CN = 2 and the offset passed on is 1; a
// non-zero operand is the offset of the second operand from QH and CN = 1.
//
// Unconditional jumps are resolved here, combinationally, in the cycle the
// instruction sits in this stage: "b" jumps to PC + (sext(operand) << 1),
// "jmp an" to an + (sext(operand) << 1), with an read from the issue unit
// through DU_O_ARegAddress / DU_I_ARegValue. eint and dint set and clear
// the interrupt-enable register, rfi sets it and raises DU_O_RFI; an
// accepted interrupt (DU_I_IntAck) clears it so that only one interrupt is
// in service. A taken branch (DU_I_Flush) turns the instruction here into a
// nop and suppresses its jump and interrupt effects.
//
// The opcode values are this design's own (see qp_pkg); the decoded
// meaning of each instruction class follows the specification.
module qp_du
  import qp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  instr_t     DU_I_Instruction,
  input  word_t      DU_I_PC,
  input  word_t      DU_I_ARegValue,
  input  logic       DU_I_Flush,
  input  logic       DU_I_IntAck,
  output logic [1:0] DU_O_PN,
  output logic [1:0] DU_O_CN,
  output logic [2:0] DU_O_RegSel,
  output logic [3:0] DU_O_RegNum,
  output logic [7:0] DU_O_Operand,
  output ctrl_exe_t  DU_O_ControlExe,
  output logic [3:0] DU_O_ExeOp,
  output ctrl_mem_t  DU_O_ControlMem,
  output ctrl_wb_t   DU_O_ControlWB,
  output word_t      DU_O_PC,
  output logic [1:0] DU_O_ARegAddress,
  output logic       DU_O_Jump,
  output word_t      DU_O_JumpAddress,
  output logic       DU_O_IntEnable,
  output logic       DU_O_RFI
);
  logic [7:0] opc, opr;
  logic [3:0] cls, sub;
  assign opc = DU_I_Instruction[15:8];
  assign opr = DU_I_Instruction[7:0];
  assign cls = opc[7:4];
  assign sub = opc[3:0];

  logic [1:0] pn, cn;
  logic [2:0] regsel;
  logic [3:0] regnum, exeop;
  logic [7:0] operand;
  ctrl_exe_t  cexe;
  ctrl_mem_t  cmem;
  ctrl_wb_t   cwb;
  logic       jump, eint, dint, rfi;
  word_t      jbase;

  always_comb begin
    pn = 2'd0; cn = 2'd0; regsel = 3'b000; regnum = 4'd0; exeop = 4'd0;
    operand = opr;
    cexe = CEXE_NONE;
    cmem = '0;
    cwb  = '0;
    jump = 1'b0; eint = 1'b0; dint = 1'b0; rfi = 1'b0;
    jbase = DU_I_PC;
    unique case (cls)
      CL_SETD, CL_SETA: begin
        regsel        = 3'b101;
        regnum        = {1'b0, cls == CL_SETA, sub[1:0]};
        cexe.res_sel  = RES_SET;
        cexe.byte_sel = sub[3:2];
        cwb.reg_write = 1'b1;
      end
      CL_MOVE: begin
        if (sub == 4'h0) begin            // movsq: SPR -> queue tail
          regsel = 3'b100; pn = 2'd1;
          cexe.res_sel = RES_MOVE; regnum = opr[3:0]; cwb.reg_write = 1'b1;
        end else if (sub == 4'h1) begin   // movqs: queue head -> SPR
          regsel = 3'b001; cn = 2'd1;
          cexe.res_sel = RES_MOVE; regnum = opr[3:0]; cwb.reg_write = 1'b1;
        end
      end
      CL_LDST: begin
        regnum       = {2'b00, sub[1:0]};
        cexe.res_sel = RES_ADDR;
        if (!sub[2]) begin                // ld dn: base dn, result to tail
          regsel = 3'b100; pn = 2'd1;
          cmem.mem_read  = 1'b1;
          cwb.reg_write  = 1'b1;
          cwb.mem_to_reg = 1'b1;
        end else begin                    // st dn: data from head, base dn
          regsel = 3'b010; cn = 2'd1;
          cmem.mem_write = 1'b1;
        end
      end
      CL_ALU, CL_MUL: begin
        if (cls == CL_ALU ? sub <= OP_NOT : sub == 4'h0) begin
          exeop        = (cls == CL_ALU) ? sub : 4'd0;
          cexe.res_sel = (cls == CL_ALU) ? RES_ALU : RES_MULT;
          if (cls == CL_ALU && sub == OP_NOT) begin
            cn = 2'd1;
          end else if (opr == 8'd0) begin
            cn = 2'd2; operand = 8'd1;
          end else begin
            cn = 2'd1;
          end
          if (cls == CL_ALU && sub == OP_CMP) cexe.cc_write = 1'b1;
          else begin pn = 2'd1; cwb.reg_write = 1'b1; end
        end
      end
      CL_ALUI: begin
        if (sub <= OP_NOT) begin
          exeop = sub; cn = 2'd1; cexe.immediate = 1'b1;
          if (sub == OP_CMP) cexe.cc_write = 1'b1;
          else begin pn = 2'd1; cwb.reg_write = 1'b1; end
        end
      end
      CL_BR: begin
        if (!sub[3]) begin
          exeop = {1'b0, sub[2:0]}; cexe.branch = 1'b1;
        end
      end
      CL_JUMP: begin
        if (sub == 4'h0) jump = 1'b1;
        else if (sub[3:2] == 2'b01) begin jump = 1'b1; jbase = DU_I_ARegValue; end
      end
      CL_INT: begin
        eint = (sub == 4'h0);
        dint = (sub == 4'h1);
        rfi  = (sub == 4'h2);
      end
      default: ;
    endcase
  end

  assign DU_O_ARegAddress = sub[1:0];
  assign DU_O_Jump        = jump && !DU_I_Flush;
  assign DU_O_JumpAddress = jbase + (sext8(opr) << 1);
  assign DU_O_RFI         = rfi && !DU_I_Flush;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      DU_O_IntEnable <= 1'b0;
    end else if (DU_I_IntAck) begin
      DU_O_IntEnable <= 1'b0;
    end else if (!DU_I_Flush) begin
      if (eint || rfi) DU_O_IntEnable <= 1'b1;
      else if (dint)   DU_O_IntEnable <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || DU_I_Flush) begin
      DU_O_PN <= '0; DU_O_CN <= '0; DU_O_RegSel <= '0; DU_O_RegNum <= '0;
      DU_O_Operand <= '0; DU_O_ControlExe <= CEXE_NONE; DU_O_ExeOp <= '0;
      DU_O_ControlMem <= '0; DU_O_ControlWB <= '0; DU_O_PC <= '0;
    end else begin
      DU_O_PN <= pn; DU_O_CN <= cn; DU_O_RegSel <= regsel; DU_O_RegNum <= regnum;
      DU_O_Operand <= operand; DU_O_ControlExe <= cexe; DU_O_ExeOp <= exeop;
      DU_O_ControlMem <= cmem; DU_O_ControlWB <= cwb; DU_O_PC <= DU_I_PC;
    end
  end
endmodule
