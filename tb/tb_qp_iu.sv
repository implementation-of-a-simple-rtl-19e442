// tb_qp_iu: self-checking test of the issue unit (register file). Writes
// random values to random QREG and SPR entries through the write-back port
// while reading random addresses on both read ports, and compares the
// registered operands with a model of the two register arrays (including
// the write-through of a same-cycle write). Also checks the a-register
// port, the flush, and that an interrupt snapshot taken part-way through
// is restored exactly by the return pulse.
module tb_qp_iu;
  import qp_pkg::*;
  logic clk = 0, rst_n = 0;
  raddr_t IU_I_Src1Address = 0, IU_I_Src2Address = 0, IU_I_DstAddress = 0, IU_I_WriteAddress = 0;
  logic [7:0] IU_I_Operand = 0;
  ctrl_exe_t IU_I_ControlExe = CEXE_NONE;
  logic [3:0] IU_I_ExeOp = 0;
  ctrl_mem_t IU_I_ControlMem = '0;
  ctrl_wb_t IU_I_ControlWB = '0;
  word_t IU_I_PC = 0, IU_I_WriteData = 0;
  logic IU_I_RegWrite = 0, IU_I_Flush = 0, IU_I_IntReq = 0, IU_I_RFI = 0;
  logic [1:0] IU_I_ARegAddress = 0;
  raddr_t IU_O_Src1Address, IU_O_Src2Address, IU_O_DstAddress;
  word_t IU_O_Src1, IU_O_Src2, IU_O_PC, IU_O_ARegValue;
  logic [7:0] IU_O_Operand;
  ctrl_exe_t IU_O_ControlExe;
  logic [3:0] IU_O_ExeOp;
  ctrl_mem_t IU_O_ControlMem;
  ctrl_wb_t IU_O_ControlWB;
  int checks = 0, failures = 0;
  word_t q [32], s [16], sq [32], ss [16];
  always #5 clk = ~clk;

  qp_iu dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic word_t model(raddr_t a);
    if (IU_I_RegWrite && IU_I_WriteAddress == a) return IU_I_WriteData;
    return a[5] ? s[a[3:0]] : q[a[4:0]];
  endfunction

  function automatic raddr_t rnd_addr();
    return ($urandom_range(0, 3) == 0) ? {2'b10, 4'($urandom)} : {1'b0, 5'($urandom)};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t e1, e2;
    foreach (q[i]) q[i] = 0;
    foreach (s[i]) s[i] = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      IU_I_RegWrite = 1'($urandom); IU_I_WriteAddress = rnd_addr(); IU_I_WriteData = $urandom;
      IU_I_Src1Address = rnd_addr(); IU_I_Src2Address = rnd_addr();
      if (i % 5 == 0) IU_I_Src1Address = IU_I_WriteAddress;
      IU_I_PC = 32'(i); IU_I_ARegAddress = 2'($urandom);
      IU_I_IntReq = (i == 150); IU_I_RFI = 0;
      #1;
      chk(IU_O_ARegValue == s[4 + IU_I_ARegAddress], "a-register port");
      e1 = model(IU_I_Src1Address); e2 = model(IU_I_Src2Address);
      @(posedge clk); #1;
      chk(IU_O_Src1 == e1 && IU_O_Src2 == e2, "operand read");
      chk(IU_O_Src1Address == IU_I_Src1Address && IU_O_PC == 32'(i), "fields passed on");
      if (i == 150) begin sq = q; ss = s; end
      if (IU_I_RegWrite) begin
        if (IU_I_WriteAddress[5]) s[IU_I_WriteAddress[3:0]] = IU_I_WriteData;
        else q[IU_I_WriteAddress[4:0]] = IU_I_WriteData;
      end
    end
    // return from interrupt: every register comes back from the snapshot
    @(negedge clk); IU_I_RegWrite = 0; IU_I_IntReq = 0; IU_I_RFI = 1;
    @(negedge clk); IU_I_RFI = 0;
    q = sq; s = ss;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); IU_I_Src1Address = {1'b0, 5'(i)}; IU_I_Src2Address = {2'b10, 4'(i % 16)};
      @(posedge clk); #1;
      chk(IU_O_Src1 == q[i] && IU_O_Src2 == s[i % 16], "restored registers");
    end
    @(negedge clk); IU_I_Flush = 1; IU_I_ControlWB = 2'b10;
    @(posedge clk); #1;
    chk(IU_O_ControlWB == 2'b00 && IU_O_Src1 == 0, "flush clears the stage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
