// qp_eu: execution unit (EU) of the queue processor.
//
// Works on the operands read by the issue unit. The ALU performs the nine
// functions of the specification (Exe_op 0 add, 1 sub, 2 or, 3 and,
// 4 compare, 5 shift left, 6 shift right logical, 7 shift right
// arithmetic, 8 not) on Src1 and either Src2 or the sign-extended operand
// (immediate forms); shifts use the low five bits of that second value.
// Compare writes the condition code: cc[1] = sign of Src1 - Src2,
// cc[0] = difference is zero. A signed 32x32 multiplier gives the low 32
// bits of the product. Set instructions replace one byte (LL, LH, HL, HH)
// of an SPR with the operand; move instructions pass Src1 on. ld/st form
// the word address base + sext(operand); the base is Src1 for ld and Src2
// for st, whose data is Src1.
//
// SPR forwarding: the last result written to an SPR is held with its
// address (EU_SPRReg_reg / EU_SPRAddress_reg). When a later instruction
// reads that SPR before write back has completed, the held value is used,
// so that back-to-back byte sets of one register compose correctly.
//
// Conditional branches compare the condition code with Exe_op[2:0]
// (beq 010, bnq 000, blt 101, bgt 100, ble 011, bge 001). The branch outputs
// are combinational: a taken branch redirects the fetch unit to
// PC + (sext(operand) << 1) in the same cycle, flushes the younger stages,
// and hands the queue unit the branch's own QH (Src1 address) and QT (Dst
// address). The specified condition table gives bnq and bge the same code and
// ble a condition equal to blt; here bnq uses the free code 000 and ble
// tests "negative or zero". Other results go to the memory unit through a
// pipeline register. Interrupt accept / return pulses save and restore the
// condition code and the forwarding register.
module qp_eu
  import qp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  raddr_t     EU_I_Src1Address,
  input  raddr_t     EU_I_Src2Address,
  input  word_t      EU_I_Src1,
  input  word_t      EU_I_Src2,
  input  raddr_t     EU_I_DstAddress,
  input  logic [7:0] EU_I_Operand,
  input  ctrl_exe_t  EU_I_ControlExe,
  input  logic [3:0] EU_I_ExeOp,
  input  word_t      EU_I_PC,
  input  ctrl_mem_t  EU_I_ControlMem,
  input  ctrl_wb_t   EU_I_ControlWB,
  input  logic       EU_I_IntReq,
  input  logic       EU_I_RFI,
  output word_t      EU_O_Result,
  output word_t      EU_O_WriteDataToMem,
  output raddr_t     EU_O_DstAddress,
  output ctrl_mem_t  EU_O_ControlMem,
  output ctrl_wb_t   EU_O_ControlWB,
  output word_t      EU_O_BranchAddress,
  output logic       EU_O_Branch,
  output qidx_t      EU_O_RenewQH,
  output qidx_t      EU_O_RenewQT,
  output logic [1:0] EU_O_CC
);
  logic [1:0] EU_CC_reg, EU_ICC_reg;
  word_t      EU_SPRReg_reg, EU_ISPRReg_reg;
  raddr_t     EU_SPRAddress_reg, EU_ISPRAddress_reg;

  word_t a, s2, b, imm, diff, alu, result, base;
  word_t prod;
  logic  cond;

  assign imm = sext8(EU_I_Operand);
  // SPR_selected: forwarded value of the previous SPR write
  assign a  = (EU_I_Src1Address[5] && EU_I_Src1Address == EU_SPRAddress_reg) ? EU_SPRReg_reg : EU_I_Src1;
  assign s2 = (EU_I_Src2Address[5] && EU_I_Src2Address == EU_SPRAddress_reg) ? EU_SPRReg_reg : EU_I_Src2;
  assign b  = EU_I_ControlExe.immediate ? imm : s2;
  assign diff = a - b;
  assign prod = $signed(a) * $signed(b);

  always_comb begin
    unique case (EU_I_ExeOp)
      OP_ADD:  alu = a + b;
      OP_SUB:  alu = diff;
      OP_OR:   alu = a | b;
      OP_AND:  alu = a & b;
      OP_CMP:  alu = diff;
      OP_SLL:  alu = a << b[4:0];
      OP_SRL:  alu = a >> b[4:0];
      OP_SRA:  alu = word_t'($signed(a) >>> b[4:0]);
      OP_NOT:  alu = ~a;
      default: alu = a + b;
    endcase
  end

  assign base = EU_I_ControlMem.mem_write ? s2 : a;

  always_comb begin
    result = alu;
    unique case (EU_I_ControlExe.res_sel)
      RES_ALU:  result = alu;
      RES_SET: begin
        result = a;
        result[8*EU_I_ControlExe.byte_sel +: 8] = EU_I_Operand;
      end
      RES_MOVE: result = a;
      RES_MULT: result = prod;
      RES_ADDR: result = base + imm;
      default:  result = alu;
    endcase
  end

  // Branch condition from the condition code (cc[1] negative, cc[0] zero).
  always_comb begin
    unique case (EU_I_ExeOp[2:0])
      BR_BEQ:  cond =  EU_CC_reg[0];
      BR_BNQ:  cond = !EU_CC_reg[0];
      BR_BLT:  cond =  EU_CC_reg[1] && !EU_CC_reg[0];
      BR_BGT:  cond = !EU_CC_reg[1] && !EU_CC_reg[0];
      BR_BLE:  cond =  EU_CC_reg[1] ||  EU_CC_reg[0];
      BR_BGE:  cond = !EU_CC_reg[1];
      default: cond = 1'b0;
    endcase
  end

  assign EU_O_Branch        = EU_I_ControlExe.branch && cond;
  assign EU_O_BranchAddress = EU_I_PC + (imm << 1);
  assign EU_O_RenewQH       = EU_I_Src1Address[QIDX_W-1:0];
  assign EU_O_RenewQT       = EU_I_DstAddress[QIDX_W-1:0];
  assign EU_O_CC            = EU_CC_reg;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      EU_CC_reg <= '0; EU_ICC_reg <= '0;
      EU_SPRReg_reg <= '0; EU_ISPRReg_reg <= '0;
      EU_SPRAddress_reg <= '0; EU_ISPRAddress_reg <= '0;
    end else begin
      if (EU_I_IntReq) begin
        EU_ICC_reg <= EU_CC_reg;
        EU_ISPRReg_reg <= EU_SPRReg_reg;
        EU_ISPRAddress_reg <= EU_SPRAddress_reg;
      end
      if (EU_I_RFI) begin
        EU_CC_reg <= EU_ICC_reg;
        EU_SPRReg_reg <= EU_ISPRReg_reg;
        EU_SPRAddress_reg <= EU_ISPRAddress_reg;
      end else begin
        if (EU_I_ControlExe.cc_write)
          EU_CC_reg <= {diff[31], diff == '0};
        if (EU_I_ControlWB.reg_write && !EU_I_ControlWB.mem_to_reg && EU_I_DstAddress[5]) begin
          EU_SPRReg_reg     <= result;
          EU_SPRAddress_reg <= EU_I_DstAddress;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      EU_O_Result <= '0; EU_O_WriteDataToMem <= '0; EU_O_DstAddress <= '0;
      EU_O_ControlMem <= '0; EU_O_ControlWB <= '0;
    end else begin
      EU_O_Result         <= result;
      EU_O_WriteDataToMem <= a;
      EU_O_DstAddress     <= EU_I_DstAddress;
      EU_O_ControlMem     <= EU_I_ControlMem;
      EU_O_ControlWB      <= EU_I_ControlWB;
    end
  end
endmodule
