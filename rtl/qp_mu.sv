// qp_mu: memory unit (MU) of the queue processor.
//
// Drives the shared memory-mapped bus for ld and st: in the cycle an
// instruction is in this stage its read or write strobe
// (MU_O_ControlPeripheral, {read, write}), its address (the execution
// result) and, for st, its data are on the bus. Bus slaves answer reads
// one clock later, so MU_I_ReadDataFromPeripheral is aligned with the
// instruction's next stage and is handed straight on as
// MU_O_ReadDataFromMem. The result, destination and write-back controls
// go to the write-back unit through a pipeline register. The bus timing is
// this design's choice; the specification gives the ports only.
module qp_mu
  import qp_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  word_t     MU_I_Result,
  input  word_t     MU_I_WriteDataToMem,
  input  raddr_t    MU_I_DstAddress,
  input  ctrl_mem_t MU_I_ControlMem,
  input  ctrl_wb_t  MU_I_ControlWB,
  input  word_t     MU_I_ReadDataFromPeripheral,
  output word_t     MU_O_Result,
  output word_t     MU_O_ReadDataFromMem,
  output raddr_t    MU_O_DstAddress,
  output ctrl_wb_t  MU_O_ControlWB,
  output ctrl_mem_t MU_O_ControlPeripheral,
  output word_t     MU_O_PeripheralAddress,
  output word_t     MU_O_WriteDataToPeripheral
);
  assign MU_O_ControlPeripheral     = MU_I_ControlMem;
  assign MU_O_PeripheralAddress     = MU_I_Result;
  assign MU_O_WriteDataToPeripheral = MU_I_ControlMem.mem_write ? MU_I_WriteDataToMem : '0;
  assign MU_O_ReadDataFromMem       = MU_I_ReadDataFromPeripheral;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      MU_O_Result <= '0; MU_O_DstAddress <= '0; MU_O_ControlWB <= '0;
    end else begin
      MU_O_Result     <= MU_I_Result;
      MU_O_DstAddress <= MU_I_DstAddress;
      MU_O_ControlWB  <= MU_I_ControlWB;
    end
  end
endmodule
