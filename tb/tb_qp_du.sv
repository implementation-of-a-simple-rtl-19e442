// tb_qp_du: self-checking test of the decode unit. Applies one instruction
// of each class and compares the registered decode fields (PN, CN, RegSel,
// RegNum, operand, control groups) and the combinational jump, rfi and
// interrupt-enable outputs with values written out by hand from the
// instruction set table in qp_pkg.
module tb_qp_du;
  import qp_pkg::*;
  logic clk = 0, rst_n = 0;
  instr_t DU_I_Instruction = NOP;
  word_t DU_I_PC = '0, DU_I_ARegValue = '0;
  logic DU_I_Flush = 0, DU_I_IntAck = 0;
  logic [1:0] DU_O_PN, DU_O_CN, DU_O_ARegAddress;
  logic [2:0] DU_O_RegSel;
  logic [3:0] DU_O_RegNum, DU_O_ExeOp;
  logic [7:0] DU_O_Operand;
  ctrl_exe_t DU_O_ControlExe;
  ctrl_mem_t DU_O_ControlMem;
  ctrl_wb_t DU_O_ControlWB;
  word_t DU_O_PC, DU_O_JumpAddress;
  logic DU_O_Jump, DU_O_IntEnable, DU_O_RFI;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  qp_du dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Apply an instruction, clock it into the pipeline register and compare.
  task automatic dec(input instr_t ins, input logic [1:0] pn, input logic [1:0] cn,
                     input logic [2:0] rs, input logic [3:0] rn, input logic [7:0] opd,
                     input res_sel_e res, input logic imm, input logic ccw, input logic br,
                     input logic [3:0] eop, input logic [1:0] mem, input logic [1:0] wb,
                     input string what);
    @(negedge clk); DU_I_Instruction = ins; DU_I_PC = 32'h120;
    @(posedge clk); #1;
    chk(DU_O_PN == pn && DU_O_CN == cn, {what, " PN/CN"});
    chk(DU_O_RegSel == rs && DU_O_RegNum == rn, {what, " RegSel/RegNum"});
    chk(DU_O_Operand == opd && DU_O_PC == 32'h120, {what, " operand/PC"});
    chk(DU_O_ControlExe.res_sel == res && DU_O_ControlExe.immediate == imm &&
        DU_O_ControlExe.cc_write == ccw && DU_O_ControlExe.branch == br, {what, " ControlExe"});
    chk(DU_O_ExeOp == eop, {what, " ExeOp"});
    chk(DU_O_ControlMem == mem && DU_O_ControlWB == wb, {what, " Mem/WB"});
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    //        instr      PN CN RegSel  RegNum opd    res       imm ccw br eop  mem    wb
    dec(16'h1E_5A, 0, 0, 3'b101, 4'd2, 8'h5A, RES_SET,  0, 0, 0, 4'd0, 2'b00, 2'b10, "setd2 HH");
    chk(DU_O_ControlExe.byte_sel == 2'd3, "setd byte select");
    dec(16'h21_07, 0, 0, 3'b101, 4'd5, 8'h07, RES_SET,  0, 0, 0, 4'd0, 2'b00, 2'b10, "seta1 LL");
    dec(16'h30_09, 1, 0, 3'b100, 4'd9, 8'h09, RES_MOVE, 0, 0, 0, 4'd0, 2'b00, 2'b10, "movsq r1");
    dec(16'h31_0C, 0, 1, 3'b001, 4'd12,8'h0C, RES_MOVE, 0, 0, 0, 4'd0, 2'b00, 2'b10, "movqs");
    dec(16'h41_04, 1, 0, 3'b100, 4'd1, 8'h04, RES_ADDR, 0, 0, 0, 4'd0, 2'b10, 2'b11, "ld d1");
    dec(16'h46_FF, 0, 1, 3'b010, 4'd2, 8'hFF, RES_ADDR, 0, 0, 0, 4'd0, 2'b01, 2'b00, "st d2");
    dec(16'h50_00, 1, 2, 3'b000, 4'd0, 8'h01, RES_ALU,  0, 0, 0, 4'd0, 2'b00, 2'b10, "add");
    dec(16'h51_03, 1, 1, 3'b000, 4'd0, 8'h03, RES_ALU,  0, 0, 0, 4'd1, 2'b00, 2'b10, "sub offset 3");
    dec(16'h54_00, 0, 2, 3'b000, 4'd0, 8'h01, RES_ALU,  0, 1, 0, 4'd4, 2'b00, 2'b00, "comp");
    dec(16'h58_00, 1, 1, 3'b000, 4'd0, 8'h00, RES_ALU,  0, 0, 0, 4'd8, 2'b00, 2'b10, "not");
    dec(16'h65_04, 1, 1, 3'b000, 4'd0, 8'h04, RES_ALU,  1, 0, 0, 4'd5, 2'b00, 2'b10, "slli 4");
    dec(16'h64_10, 0, 1, 3'b000, 4'd0, 8'h10, RES_ALU,  1, 1, 0, 4'd4, 2'b00, 2'b00, "compi");
    dec(16'h70_00, 1, 2, 3'b000, 4'd0, 8'h01, RES_MULT, 0, 0, 0, 4'd0, 2'b00, 2'b10, "mul");
    dec(16'h85_FC, 0, 0, 3'b000, 4'd0, 8'hFC, RES_ALU,  0, 0, 1, 4'd5, 2'b00, 2'b00, "blt");
    dec(16'h5F_00, 0, 0, 3'b000, 4'd0, 8'h00, RES_ALU,  0, 0, 0, 4'd0, 2'b00, 2'b00, "undefined = nop");
    // b: PC-relative jump, combinational
    @(negedge clk); DU_I_Instruction = 16'h90_FE; DU_I_PC = 32'h200; #1;
    chk(DU_O_Jump && DU_O_JumpAddress == 32'h1FC, "b -2");
    dec(16'h90_FE, 0, 0, 3'b000, 4'd0, 8'hFE, RES_ALU,  0, 0, 0, 4'd0, 2'b00, 2'b00, "b is a nop after DU");
    // jmp a2 + 3*2
    @(negedge clk); DU_I_Instruction = 16'h96_03; DU_I_ARegValue = 32'h400; #1;
    chk(DU_O_Jump && DU_O_JumpAddress == 32'h406 && DU_O_ARegAddress == 2'd2, "jmp a2");
    DU_I_Flush = 1; #1;
    chk(!DU_O_Jump, "jump suppressed by flush");
    @(posedge clk); #1;
    chk(DU_O_PN == 0 && DU_O_ControlWB == 2'b00, "flushed stage is a nop");
    DU_I_Flush = 0;
    // interrupt enable
    chk(!DU_O_IntEnable, "interrupts disabled after reset");
    @(negedge clk); DU_I_Instruction = 16'hA0_00;
    @(posedge clk); #1; chk(DU_O_IntEnable, "eint");
    @(negedge clk); DU_I_Instruction = 16'hA1_00;
    @(posedge clk); #1; chk(!DU_O_IntEnable, "dint");
    @(negedge clk); DU_I_Instruction = 16'hA2_00; #1;
    chk(DU_O_RFI, "rfi decoded");
    @(posedge clk); #1; chk(DU_O_IntEnable, "rfi enables interrupts");
    @(negedge clk); DU_I_Instruction = NOP; DU_I_IntAck = 1;
    @(posedge clk); #1; chk(!DU_O_IntEnable && !DU_O_RFI, "accept clears enable");
    DU_I_IntAck = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
