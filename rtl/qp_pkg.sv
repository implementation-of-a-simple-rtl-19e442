// qp_pkg: types and constants shared by the queue processor.
//
// The processor keeps its working operands in a circular queue register (QREG)
// addressed through a queue head (QH) and tail (QT), plus sixteen special
// purpose registers (SPR). Register addresses are 6 bits wide: bit 5 set
// selects an SPR (bits 3:0 index it), bit 5 clear selects a QREG entry (bits
// 4:0). Instructions are 16 bits: opcode in bits 15:8, an 8-bit operand
// (offset or immediate) in bits 7:0. The opcode values below are this
// design's own assignment; the instruction classes, the ALU function numbers
// and the branch condition codes follow the specification.
package qp_pkg;

  localparam int DATA_W = 32;
  localparam int QREG_N = 32;            // queue register entries
  localparam int SPR_N  = 16;            // d0-d3, a0-a3, r0-r7
  localparam int QIDX_W = $clog2(QREG_N);
  localparam int RADDR_W = 6;            // {is_spr, index[4:0]}

  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [15:0]        instr_t;
  typedef logic [RADDR_W-1:0] raddr_t;
  typedef logic [QIDX_W-1:0]  qidx_t;

  localparam instr_t NOP = 16'h0000;

  // ALU function numbers (Exe_op) for ALU instructions.
  typedef enum logic [3:0] {
    OP_ADD = 4'd0, OP_SUB = 4'd1, OP_OR  = 4'd2, OP_AND = 4'd3,
    OP_CMP = 4'd4, OP_SLL = 4'd5, OP_SRL = 4'd6, OP_SRA = 4'd7,
    OP_NOT = 4'd8
  } alu_op_e;

  // Branch condition codes (Exe_op[2:0] for branch instructions).
  localparam logic [2:0] BR_BNQ = 3'b000;
  localparam logic [2:0] BR_BGE = 3'b001;
  localparam logic [2:0] BR_BEQ = 3'b010;
  localparam logic [2:0] BR_BLE = 3'b011;
  localparam logic [2:0] BR_BGT = 3'b100;
  localparam logic [2:0] BR_BLT = 3'b101;

  // What the execution unit puts on its result bus.
  typedef enum logic [2:0] {
    RES_ALU   = 3'd0,   // Src1 func Src2_selected
    RES_SET   = 3'd1,   // SPR with one byte replaced by the operand
    RES_MOVE  = 3'd2,   // Src1 passed through (with SPR forwarding)
    RES_MULT  = 3'd3,   // signed product, low 32 bits
    RES_ADDR  = 3'd4    // base + sign-extended offset (ld/st)
  } res_sel_e;

  typedef struct packed {
    res_sel_e   res_sel;
    logic       immediate;   // second ALU operand is the operand field
    logic       cc_write;    // compare: update condition code
    logic       branch;      // conditional branch
    logic [1:0] byte_sel;    // set: 0 LL, 1 LH, 2 HL, 3 HH
  } ctrl_exe_t;

  typedef struct packed {
    logic mem_read;
    logic mem_write;
  } ctrl_mem_t;

  typedef struct packed {
    logic reg_write;
    logic mem_to_reg;        // Result_Sel: 1 = memory data, 0 = result
  } ctrl_wb_t;

  localparam ctrl_exe_t CEXE_NONE = '{res_sel: RES_ALU, immediate: 1'b0,
                                      cc_write: 1'b0, branch: 1'b0, byte_sel: 2'd0};

  // Opcode map (bits 15:8).
  localparam logic [3:0] CL_MISC  = 4'h0;  // 0x00 nop
  localparam logic [3:0] CL_SETD  = 4'h1;  // 0x1{byte,reg} setd
  localparam logic [3:0] CL_SETA  = 4'h2;  // 0x2{byte,reg} seta
  localparam logic [3:0] CL_MOVE  = 4'h3;  // 0x30 movsq, 0x31 movqs
  localparam logic [3:0] CL_LDST  = 4'h4;  // 0x40+n ld dn, 0x44+n st dn
  localparam logic [3:0] CL_ALU   = 4'h5;  // 0x50+op
  localparam logic [3:0] CL_ALUI  = 4'h6;  // 0x60+op
  localparam logic [3:0] CL_MUL   = 4'h7;  // 0x70 mul
  localparam logic [3:0] CL_BR    = 4'h8;  // 0x80+cond
  localparam logic [3:0] CL_JUMP  = 4'h9;  // 0x90 b, 0x94+n jmp an
  localparam logic [3:0] CL_INT   = 4'hA;  // 0xA0 eint, 0xA1 dint, 0xA2 rfi

  // Memory map (word addresses).
  localparam word_t DMEM_BASE  = 32'h0000_0400;
  localparam word_t DMEM_LAST  = 32'h0000_07FF;
  localparam word_t SEG7_ADDR  = 32'h8000_0000;
  localparam word_t TCMD_ADDR  = 32'h8000_0010;
  localparam word_t TCNT_ADDR  = 32'h8000_0011;
  localparam word_t SW_ADDR    = 32'h8000_0018;
  localparam word_t KEY_ADDR   = 32'h8000_0020;

  // Interrupt routine addresses (byte addresses in instruction memory).
  localparam word_t INT1_ADDR = 32'h0000_0200;  // push switch
  localparam word_t INT0_ADDR = 32'h0000_0280;  // timer

  function automatic word_t sext8(input logic [7:0] v);
    return {{24{v[7]}}, v};
  endfunction

endpackage
