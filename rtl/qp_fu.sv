// qp_fu: fetch unit (FU) of the queue processor.
//
// FU_PC_reg holds the byte address of the next instruction to fetch. Each
// clock the instruction memory is read at that address and the instruction
// plus its PC are handed to the decode unit one cycle later. The next PC is
// chosen in the specification's order of priority: interrupt accept (routine
// address), return from interrupt (the saved address in FU_IAR_reg), jump
// from the decode unit, taken branch from the execution unit, else PC + 2.
// When an interrupt is accepted IAR saves the address execution would have
// continued at: the jump/branch target if one is taken in that cycle, else
// the PC.
//
// Whenever the PC is redirected, or the interrupt controller holds fetching
// (FU_I_Hold), the instruction being read is discarded and a nop is sent
// instead, so there is no delay slot. The hold input is this design's
// addition; it lets the pipeline drain before an interrupt or a return.
// The instruction memory (qp_imem) sits inside this unit and is loaded
// through the IMEM_* port. Reset is synchronous and active low; the PC
// starts at 0.
module qp_fu
  import qp_pkg::*;
#(
  parameter int IMEM_DEPTH = 1024,
  localparam int IAW = $clog2(IMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  // program load
  input  logic           IMEM_We,
  input  logic [IAW-1:0] IMEM_Addr,
  input  logic [15:0]    IMEM_Data,
  // control
  input  logic           FU_I_Jump,
  input  logic           FU_I_Branch,
  input  word_t          FU_I_JumpAddress,
  input  word_t          FU_I_BranchAddress,
  input  logic           FU_I_IntReq,
  input  word_t          FU_I_IntAddress,
  input  logic           FU_I_RFI,
  input  logic           FU_I_Hold,
  // to decode
  output instr_t         FU_O_Instruction,
  output word_t          FU_O_PC
);
  word_t  FU_PC_reg, FU_IAR_reg, FU_NextPC_wire;
  word_t  FU_FetchPC_reg;
  logic   FU_Valid_reg;
  logic   FU_Redirect_wire;
  instr_t FU_IMemData_wire;

  qp_imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk  (clk),
    .we   (IMEM_We),
    .waddr(IMEM_Addr),
    .wdata(IMEM_Data),
    .raddr(FU_PC_reg[IAW:1]),
    .rdata(FU_IMemData_wire)
  );

  always_comb begin
    FU_Redirect_wire = 1'b1;
    if (FU_I_IntReq)      FU_NextPC_wire = FU_I_IntAddress;
    else if (FU_I_RFI)    FU_NextPC_wire = FU_IAR_reg;
    else if (FU_I_Jump)   FU_NextPC_wire = FU_I_JumpAddress;
    else if (FU_I_Branch) FU_NextPC_wire = FU_I_BranchAddress;
    else begin
      FU_Redirect_wire = 1'b0;
      FU_NextPC_wire   = FU_I_Hold ? FU_PC_reg : FU_PC_reg + 32'd2;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      FU_PC_reg      <= '0;
      FU_IAR_reg     <= '0;
      FU_FetchPC_reg <= '0;
      FU_Valid_reg   <= 1'b0;
    end else begin
      FU_PC_reg      <= FU_NextPC_wire;
      FU_FetchPC_reg <= FU_PC_reg;
      FU_Valid_reg   <= !(FU_Redirect_wire || FU_I_Hold);
      if (FU_I_IntReq) begin
        if (FU_I_Jump)        FU_IAR_reg <= FU_I_JumpAddress;
        else if (FU_I_Branch) FU_IAR_reg <= FU_I_BranchAddress;
        else                  FU_IAR_reg <= FU_PC_reg;
      end
    end
  end

  assign FU_O_Instruction = FU_Valid_reg ? FU_IMemData_wire : NOP;
  assign FU_O_PC          = FU_FetchPC_reg;
endmodule
