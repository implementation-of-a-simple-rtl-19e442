// qp_iobus: memory-mapped bus decoder of the queue processor.
//
// Decodes the word address driven by the memory unit into selects for the
// data memory (0x400-0x7FF), the seven-segment register (0x80000000), the
// timer command and counter (0x80000010/0x80000011), the slide switches
// (0x80000018) and the push switches (0x80000020), as in the specification's
// memory map. Writes go to the selected register in the same clock. Reads
// return one clock later: the data memory's own registered output, or the
// peripheral value sampled here. Unmapped addresses read as 0 and ignore
// writes (this design's choice).
module qp_iobus
  import qp_pkg::*;
#(
  parameter int DMEM_DEPTH = 1024,
  localparam int DAW = $clog2(DMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  ctrl_mem_t      ctrl,
  input  word_t          addr,
  // data memory
  output logic           dmem_sel,
  output logic           dmem_we,
  output logic [DAW-1:0] dmem_addr,
  input  word_t          dmem_rdata,
  // peripherals
  output logic           seg7_we,
  output logic           tcmd_we,
  output logic           tcnt_we,
  input  word_t          seg7_rdata,
  input  logic [7:0]     tcmd_rdata,
  input  word_t          tcnt_rdata,
  input  word_t          sw_rdata,
  input  word_t          key_rdata,
  // read data back to the memory unit, one clock after the read
  output word_t          rdata
);
  logic  in_dmem, rd_dmem_q;
  word_t per_v, per_q;

  assign in_dmem   = addr >= DMEM_BASE && addr <= DMEM_LAST;
  assign dmem_sel  = in_dmem && (ctrl.mem_read || ctrl.mem_write);
  assign dmem_we   = in_dmem && ctrl.mem_write;
  assign dmem_addr = addr[DAW-1:0];
  assign seg7_we   = ctrl.mem_write && addr == SEG7_ADDR;
  assign tcmd_we   = ctrl.mem_write && addr == TCMD_ADDR;
  assign tcnt_we   = ctrl.mem_write && addr == TCNT_ADDR;

  always_comb begin
    unique case (addr)
      SEG7_ADDR: per_v = seg7_rdata;
      TCMD_ADDR: per_v = word_t'(tcmd_rdata);
      TCNT_ADDR: per_v = tcnt_rdata;
      SW_ADDR:   per_v = sw_rdata;
      KEY_ADDR:  per_v = key_rdata;
      default:   per_v = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_dmem_q <= 1'b0; per_q <= '0;
    end else begin
      rd_dmem_q <= in_dmem && ctrl.mem_read;
      per_q     <= ctrl.mem_read ? per_v : '0;
    end
  end

  assign rdata = rd_dmem_q ? dmem_rdata : per_q;
endmodule
