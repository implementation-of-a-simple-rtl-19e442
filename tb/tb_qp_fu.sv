// tb_qp_fu: self-checking test of the fetch unit. The instruction memory is
// loaded with word i = 0x1000 + i so the fetched instruction identifies
// its address. Checks sequential fetch (PC += 2 per clock), that a jump, a
// branch and an interrupt accept insert one nop and continue at the target,
// that hold produces nops without advancing, the interrupt return address
// in IAR, and the priority interrupt > rfi > jump > branch.
module tb_qp_fu;
  import qp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic IMEM_We = 0;
  logic [9:0] IMEM_Addr = '0;
  logic [15:0] IMEM_Data = '0;
  logic FU_I_Jump = 0, FU_I_Branch = 0, FU_I_IntReq = 0, FU_I_RFI = 0, FU_I_Hold = 0;
  word_t FU_I_JumpAddress = '0, FU_I_BranchAddress = '0, FU_I_IntAddress = '0;
  instr_t FU_O_Instruction;
  word_t FU_O_PC;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  qp_fu dut (.*);

  task automatic expect_fetch(input word_t pc, input bit is_nop, input string what);
    @(posedge clk); #1;
    checks++;
    if (is_nop) begin
      if (FU_O_Instruction !== NOP) begin
        failures++; $display("FAIL %s: expected nop, got %h", what, FU_O_Instruction);
      end
    end else if (FU_O_PC !== pc || FU_O_Instruction !== instr_t'(16'h1000 + pc[10:1])) begin
      failures++;
      $display("FAIL %s: pc %h instr %h, expected pc %h", what, FU_O_PC, FU_O_Instruction, pc);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); IMEM_We = 1; IMEM_Addr = 10'(i); IMEM_Data = 16'(16'h1000 + i);
    end
    @(negedge clk); IMEM_We = 0;
    @(negedge clk); rst_n = 1;
    expect_fetch(0, 0, "seq0");
    expect_fetch(2, 0, "seq1");
    expect_fetch(4, 0, "seq2");
    // jump to 0x40 while address 6 is being read: 6 is dropped
    @(negedge clk); FU_I_Jump = 1; FU_I_JumpAddress = 32'h40;
    expect_fetch(0, 1, "jump bubble");
    @(negedge clk); FU_I_Jump = 0;
    expect_fetch(32'h40, 0, "jump target");
    // branch to 0x100
    @(negedge clk); FU_I_Branch = 1; FU_I_BranchAddress = 32'h100;
    expect_fetch(0, 1, "branch bubble");
    @(negedge clk); FU_I_Branch = 0;
    expect_fetch(32'h100, 0, "branch target");
    // hold for three clocks: nops, PC stays at 0x102
    @(negedge clk); FU_I_Hold = 1;
    expect_fetch(0, 1, "hold 1");
    expect_fetch(0, 1, "hold 2");
    expect_fetch(0, 1, "hold 3");
    @(negedge clk); FU_I_Hold = 0;
    expect_fetch(32'h102, 0, "after hold");
    // interrupt accept together with a jump: interrupt wins, IAR = jump target
    @(negedge clk); FU_I_IntReq = 1; FU_I_IntAddress = 32'h200; FU_I_Jump = 1;
    FU_I_JumpAddress = 32'h300;
    expect_fetch(0, 1, "int bubble");
    @(negedge clk); FU_I_IntReq = 0; FU_I_Jump = 0;
    expect_fetch(32'h200, 0, "int routine");
    expect_fetch(32'h202, 0, "int routine+2");
    // rfi together with a branch: rfi wins, returns to IAR (0x300)
    @(negedge clk); FU_I_RFI = 1; FU_I_Branch = 1; FU_I_BranchAddress = 32'h380;
    expect_fetch(0, 1, "rfi bubble");
    @(negedge clk); FU_I_RFI = 0; FU_I_Branch = 0;
    expect_fetch(32'h300, 0, "return address");
    // jump together with a branch: jump wins (the DU gates it when flushing)
    @(negedge clk); FU_I_Jump = 1; FU_I_JumpAddress = 32'h3A0; FU_I_Branch = 1;
    expect_fetch(0, 1, "jump+branch bubble");
    @(negedge clk); FU_I_Jump = 0; FU_I_Branch = 0;
    expect_fetch(32'h3A0, 0, "jump priority");
    // interrupt with nothing else: IAR = PC, the address that was being read
    @(negedge clk); FU_I_IntReq = 1; FU_I_IntAddress = 32'h280;
    expect_fetch(0, 1, "int2 bubble");
    @(negedge clk); FU_I_IntReq = 0;
    expect_fetch(32'h280, 0, "int2 routine");
    @(negedge clk); FU_I_RFI = 1;
    expect_fetch(0, 1, "rfi2 bubble");
    @(negedge clk); FU_I_RFI = 0;
    expect_fetch(32'h3A2, 0, "return address 2");
    expect_fetch(32'h3A4, 0, "continue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
