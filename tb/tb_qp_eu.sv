// tb_qp_eu: self-checking test of the execution unit. Random operands are
// run through all nine ALU functions (register and immediate forms), the
// multiplier, ld/st address generation, set and move, and compared with a
// reference written in the testbench. Compare is followed by each of the
// six conditional branches; taken/not taken, target and the renewed QH/QT
// are checked against the expected relation of the two operands. The SPR
// forwarding of back-to-back byte sets and the save/restore of the
// condition code are checked too.
module tb_qp_eu;
  import qp_pkg::*;
  logic clk = 0, rst_n = 0;
  raddr_t EU_I_Src1Address = 0, EU_I_Src2Address = 0, EU_I_DstAddress = 0;
  word_t EU_I_Src1 = 0, EU_I_Src2 = 0, EU_I_PC = 0;
  logic [7:0] EU_I_Operand = 0;
  ctrl_exe_t EU_I_ControlExe = CEXE_NONE;
  logic [3:0] EU_I_ExeOp = 0;
  ctrl_mem_t EU_I_ControlMem = '0;
  ctrl_wb_t EU_I_ControlWB = '0;
  logic EU_I_IntReq = 0, EU_I_RFI = 0;
  word_t EU_O_Result, EU_O_WriteDataToMem, EU_O_BranchAddress;
  raddr_t EU_O_DstAddress;
  ctrl_mem_t EU_O_ControlMem;
  ctrl_wb_t EU_O_ControlWB;
  logic EU_O_Branch;
  qidx_t EU_O_RenewQH, EU_O_RenewQT;
  logic [1:0] EU_O_CC;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  qp_eu dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic word_t ref_alu(int op, word_t a, word_t b);
    case (op)
      0: return a + b;
      1: return a - b;
      2: return a | b;
      3: return a & b;
      4: return a - b;
      5: return a << b[4:0];
      6: return a >> b[4:0];
      7: return word_t'($signed(a) >>> b[4:0]);
      default: return ~a;
    endcase
  endfunction

  task automatic issue(input res_sel_e res, input logic imm, input logic ccw, input logic br,
                       input logic [3:0] eop, input word_t a, input word_t b, input logic [7:0] opd);
    @(negedge clk);
    EU_I_ControlExe = '{res_sel: res, immediate: imm, cc_write: ccw, branch: br, byte_sel: 2'd0};
    EU_I_ExeOp = eop; EU_I_Src1 = a; EU_I_Src2 = b; EU_I_Operand = opd;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t a, b, e;
    logic [7:0] opd;
    int ia, ib;
    @(negedge clk); rst_n = 1;
    EU_I_ControlWB = 2'b10; EU_I_DstAddress = 6'd7;
    for (int i = 0; i < 600; i++) begin
      a = $urandom; b = $urandom; opd = 8'($urandom);
      if (i % 4 == 0) b = word_t'($urandom_range(0, 40));
      // register form
      issue(RES_ALU, 0, 0, 0, 4'(i % 9), a, b, 8'd1);
      @(posedge clk); #1;
      chk(EU_O_Result == ref_alu(i % 9, a, b), $sformatf("alu op %0d", i % 9));
      // immediate form
      issue(RES_ALU, 1, 0, 0, 4'(i % 9), a, b, opd);
      @(posedge clk); #1;
      chk(EU_O_Result == ref_alu(i % 9, a, sext8(opd)), $sformatf("alu imm op %0d", i % 9));
      // signed multiply, low word
      issue(RES_MULT, 0, 0, 0, 4'd0, a, b, 8'd1);
      @(posedge clk); #1;
      chk(EU_O_Result == word_t'($signed(a) * $signed(b)), "mult");
      // compare, then a branch
      ia = $urandom_range(0, 4) - 2; ib = $urandom_range(0, 4) - 2;
      issue(RES_ALU, 0, 1, 0, 4'd4, word_t'(ia), word_t'(ib), 8'd1);
      @(posedge clk); #1;
      chk(EU_O_CC == {ia < ib, ia == ib}, "compare sets C.C.");
      EU_I_PC = 32'h100; EU_I_Src1Address = 6'd12; EU_I_DstAddress = 6'd20;
      issue(RES_ALU, 0, 0, 1, 4'(i % 6 == 0 ? BR_BEQ : i % 6 == 1 ? BR_BNQ : i % 6 == 2 ? BR_BLT :
                                 i % 6 == 3 ? BR_BGT : i % 6 == 4 ? BR_BLE : BR_BGE), 0, 0, 8'hF0);
      EU_I_ControlWB = 2'b00;
      #1;
      case (i % 6)
        0: e = 32'(ia == ib);
        1: e = 32'(ia != ib);
        2: e = 32'(ia < ib);
        3: e = 32'(ia > ib);
        4: e = 32'(ia <= ib);
        default: e = 32'(ia >= ib);
      endcase
      chk(EU_O_Branch == e[0], $sformatf("branch cond %0d (%0d vs %0d)", i % 6, ia, ib));
      chk(EU_O_BranchAddress == 32'hE0 && EU_O_RenewQH == 5'd12 && EU_O_RenewQT == 5'd20,
          "branch target and renewed QH/QT");
      EU_I_ControlWB = 2'b10; EU_I_Src1Address = 6'd0; EU_I_DstAddress = 6'd7;
    end
    // ld address: d register + offset; st address: Src2 (d) + offset, data Src1
    EU_I_ControlMem = 2'b10;
    issue(RES_ADDR, 0, 0, 0, 4'd0, 32'h400, 32'h0, 8'hFE);
    @(posedge clk); #1;
    chk(EU_O_Result == 32'h3FE && EU_O_ControlMem == 2'b10, "ld address");
    EU_I_ControlMem = 2'b01;
    issue(RES_ADDR, 0, 0, 0, 4'd0, 32'hCAFE, 32'h500, 8'h05);
    @(posedge clk); #1;
    chk(EU_O_Result == 32'h505 && EU_O_WriteDataToMem == 32'hCAFE, "st address and data");
    EU_I_ControlMem = 2'b00;
    // four back-to-back byte sets of SPR d1 (address 0x21): the register file
    // still returns the old value 0, forwarding must compose the bytes
    EU_I_Src1Address = 6'h21; EU_I_DstAddress = 6'h21;
    for (int k = 0; k < 4; k++) begin
      issue(RES_SET, 0, 0, 0, 4'd0, 32'h0, 32'h0, 8'(8'h11 * (k + 1)));
      EU_I_ControlExe.byte_sel = 2'(k);
      @(posedge clk); #1;
    end
    chk(EU_O_Result == 32'h44332211, "set with SPR forwarding");
    // move from that SPR: forwarded value too
    EU_I_DstAddress = 6'd3;
    issue(RES_MOVE, 0, 0, 0, 4'd0, 32'h0, 32'h0, 8'h0);
    @(posedge clk); #1;
    chk(EU_O_Result == 32'h44332211, "move with SPR forwarding");
    // condition code survives an interrupt
    EU_I_Src1Address = 6'd0;
    issue(RES_ALU, 0, 1, 0, 4'd4, 32'd1, 32'd5, 8'd1);
    EU_I_IntReq = 1;
    @(posedge clk); #1;   // snapshot taken with the old C.C., new one written
    EU_I_IntReq = 0;
    chk(EU_O_CC == 2'b10, "compare 1 < 5");
    issue(RES_ALU, 0, 1, 0, 4'd4, 32'd5, 32'd5, 8'd1);
    @(posedge clk); #1;
    chk(EU_O_CC == 2'b01, "compare 5 == 5");
    issue(RES_ALU, 0, 0, 0, 4'd0, 32'd0, 32'd0, 8'd1);
    EU_I_RFI = 1;
    @(posedge clk); #1;
    EU_I_RFI = 0;
    chk(EU_O_CC == {ia < ib, ia == ib}, "rfi restores C.C.");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
