// tb_qp_top: end-to-end test of the queue processor at its default size.
//
// A program is assembled in the testbench (helper functions below, one per
// instruction class), loaded through the instruction-memory port, and run.
// It exercises every ALU function (register and immediate forms), the
// multiplier, queue offsets, byte sets with SPR forwarding, SPR/queue
// moves, loads and stores to the data memory and to every peripheral,
// taken and not-taken conditional branches (with flush and queue pointer
// renewal), "b" and "jmp an", a timer interrupt taken while the main program
// waits with interrupts enabled, and a push-button interrupt whose routine reads the
// slide switches. Results are stored in data memory and compared with
// values worked out by hand; the seven-segment digits show 0x600D when the
// main program is done. The two-instruction spacing between a producer and
// its consumer that the pipeline needs is inserted by emit_s().
// Each mechanism is counted through the design hierarchy and must occur.
module tb_qp_top;
  import qp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic IMEM_We = 0;
  logic [9:0] IMEM_Addr = '0;
  logic [15:0] IMEM_Data = '0;
  logic [17:0] SW = 18'h2A5A5;
  logic [3:0] KEY = 4'hF;
  logic [7:0][6:0] HEX;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  qp_top dut (.*);

  // ---------------- assembler ----------------
  instr_t prog [1024];
  int pc = 0;
  function automatic instr_t I(logic [7:0] op, logic [7:0] opd); return {op, opd}; endfunction
  function automatic instr_t SETD(int r, int by, logic [7:0] v); return I(8'(32'h10 | (by << 2) | r), v); endfunction
  function automatic instr_t SETA(int r, int by, logic [7:0] v); return I(8'(32'h20 | (by << 2) | r), v); endfunction
  function automatic instr_t MOVSQ(int s); return I(8'h30, 8'(s)); endfunction
  function automatic instr_t LD(int d, int off); return I(8'(8'h40 | d), 8'(off)); endfunction
  function automatic instr_t ST(int d, int off); return I(8'(8'h44 | d), 8'(off)); endfunction
  function automatic instr_t ALU(int op, int off); return I(8'(8'h50 | op), 8'(off)); endfunction
  function automatic instr_t ALUI(int op, int imm); return I(8'(8'h60 | op), 8'(imm)); endfunction
  function automatic instr_t BR(logic [2:0] c); return I(8'(8'h80 | c), 8'h00); endfunction
  localparam instr_t MUL = 16'h7000, EINT = 16'hA000, RFI = 16'hA200, B0 = 16'h9000;
  localparam int LL = 0, LH = 1, HL = 2, HH = 3;

  function automatic void emit(instr_t x); prog[pc] = x; pc++; endfunction
  function automatic void emit_s(instr_t x); emit(x); emit(NOP); emit(NOP); endfunction
  function automatic int here(); return pc; endfunction
  // all four bytes of d register r, back to back (SPR forwarding)
  function automatic void setd32(int r, word_t v);
    emit(SETD(r, HH, v[31:24])); emit(SETD(r, HL, v[23:16])); emit(SETD(r, LH, v[15:8]));
    emit_s(SETD(r, LL, v[7:0]));
  endfunction
  // set the offset of the branch/jump at index i so that it lands on index t
  function automatic void patch(int i, int t); prog[i][7:0] = 8'(t - i); endfunction

  // expected data memory words (index = offset from 0x400)
  word_t expect_mem [int];

  task automatic assemble();
    int bi, li, ai;
    foreach (prog[i]) prog[i] = NOP;
    // reset entry: jmp a0 to the main program at 0x300, above the routines
    pc = 0;
    emit(SETA(0, LH, 8'h03)); emit_s(SETA(0, LL, 8'h00));
    emit(NOP); emit(NOP); emit(NOP);
    emit(I(8'h94, 8'h00));
    pc = 32'h300 / 2;
    // d0 = 0x400 (data memory); back-to-back byte sets use SPR forwarding
    emit(SETD(0, LH, 8'h04)); emit_s(SETD(0, LL, 8'h00));
    // clear the interrupt counters (SPR 8 is never written: reads 0)
    emit_s(MOVSQ(8)); emit_s(ST(0, 20));
    emit_s(MOVSQ(8)); emit_s(ST(0, 22));
    // operands: d1 = 7, d2 = 5, d3 = 0xFFFFFF00
    emit_s(SETD(1, LL, 8'd7));
    emit_s(SETD(2, LL, 8'd5));
    setd32(3, 32'hFFFF_FF00);
    // two-operand ALU functions, both operands from the queue head
    for (int op = 0; op < 4; op++) begin
      emit_s(MOVSQ(1)); emit_s(MOVSQ(2)); emit_s(ALU(op, 0)); emit_s(ST(0, op));
    end
    expect_mem[0] = 12; expect_mem[1] = 2; expect_mem[2] = 7; expect_mem[3] = 5;
    emit_s(MOVSQ(1)); emit_s(ALU(8, 0)); emit_s(ST(0, 4));           // not
    expect_mem[4] = 32'hFFFF_FFF8;
    emit_s(MOVSQ(1)); emit_s(ALUI(5, 3)); emit_s(ST(0, 5));          // slli 3
    expect_mem[5] = 56;
    emit_s(MOVSQ(3)); emit_s(ALUI(6, 4)); emit_s(ST(0, 6));          // srli 4
    expect_mem[6] = 32'h0FFF_FFF0;
    emit_s(MOVSQ(3)); emit_s(ALUI(7, 4)); emit_s(ST(0, 7));          // srai 4
    expect_mem[7] = 32'hFFFF_FFF0;
    emit_s(MOVSQ(1)); emit_s(MOVSQ(3)); emit_s(MUL); emit_s(ST(0, 8)); // 7 * -256
    expect_mem[8] = 32'hFFFF_F900;
    emit_s(MOVSQ(1)); emit_s(ALUI(0, -3)); emit_s(ST(0, 9));         // addi -3
    expect_mem[9] = 4;
    // timer: initial value 60, Number Set + Start; it requests int_req0 after
    // 61 clocks, while the queue is empty and interrupts are enabled
    setd32(3, 32'h8000_0011);
    emit_s(SETD(1, LL, 8'd60));
    emit_s(MOVSQ(1)); emit_s(ST(3, 0));
    emit_s(SETD(3, LL, 8'h10));
    emit_s(SETD(1, LL, 8'h05));
    emit_s(MOVSQ(1)); emit_s(ST(3, 0));
    // Interrupt routines share the queue pointers of the interrupted code,
    // so interrupts are enabled only while the queue is empty. The
    // instruction after eint may still enter before the interrupt.
    emit_s(EINT);
    for (int k = 0; k < 100; k++) emit(NOP);
    emit_s(I(8'hA1, 8'h00));   // dint
    // the timer set-up used d1 and d3: load the operands again
    emit_s(SETD(1, LL, 8'd7));
    setd32(3, 32'hFFFF_FF00);
    // offset operand: queue 7,5,7; sub offset 2 = 7 - 7, consumes one
    emit_s(MOVSQ(1)); emit_s(MOVSQ(2)); emit_s(MOVSQ(1)); emit_s(ALU(1, 2));
    emit_s(ST(0, 10)); emit_s(ST(0, 11)); emit_s(ST(0, 12));
    expect_mem[10] = 5; expect_mem[11] = 7; expect_mem[12] = 0;
    // loads: 12 + 2
    emit_s(LD(0, 0)); emit_s(LD(0, 1)); emit_s(ALU(0, 0)); emit_s(ST(0, 13));
    expect_mem[13] = 14;
    // compare 7 vs 5, bgt taken over a wrong path that would push and store
    emit_s(MOVSQ(1)); emit_s(MOVSQ(2)); emit(ALU(4, 0));
    bi = here(); emit(BR(BR_BGT));
    // (the first wrong-path instruction reaches issue before the flush)
    emit(SETD(1, LL, 8'h77)); emit(MOVSQ(1)); emit(ST(0, 14)); emit(ST(0, 14));
    li = here(); patch(bi, li);
    emit_s(MOVSQ(2)); emit_s(ST(0, 14));
    expect_mem[14] = 5;
    // compare 7 vs 5, blt not taken: falls through
    emit_s(MOVSQ(1)); emit_s(MOVSQ(2)); emit(ALU(4, 0));
    bi = here(); emit(BR(BR_BLT)); patch(bi, bi + 20);
    emit_s(MOVSQ(1)); emit_s(ST(0, 15));
    expect_mem[15] = 7;
    // compare 5 vs 5 (immediate), beq taken
    emit_s(MOVSQ(2)); emit(ALUI(4, 5));
    bi = here(); emit(BR(BR_BEQ));
    emit(MOVSQ(2)); emit(ST(0, 16)); emit(NOP);
    li = here(); patch(bi, li);
    emit_s(MOVSQ(1)); emit_s(ST(0, 16));
    expect_mem[16] = 7;
    // b over a wrong path
    bi = here(); emit(B0);
    emit(MOVSQ(2)); emit(ST(0, 17));
    li = here(); patch(bi, li);
    emit_s(MOVSQ(3)); emit_s(ST(0, 17));
    expect_mem[17] = 32'hFFFF_FF00;
    // jmp a0: a0 = byte address of the landing point
    ai = here();
    emit(SETA(0, LH, 8'h00)); emit_s(SETA(0, LL, 8'h00));
    emit(NOP); emit(NOP); emit(NOP);
    bi = here(); emit(I(8'h94, 8'h00));
    emit(MOVSQ(2)); emit(ST(0, 18));
    li = here();
    prog[ai]     = SETA(0, LH, 8'((2 * li) >> 8));
    prog[ai + 1] = SETA(0, LL, 8'(2 * li));
    emit_s(MOVSQ(1)); emit_s(MOVSQ(1)); emit_s(ALU(0, 0)); emit_s(ST(0, 18));
    expect_mem[18] = 14;
    // movqs: queue head -> SPR 9 -> queue
    emit_s(MOVSQ(2)); emit_s(I(8'h31, 8'd9)); emit_s(MOVSQ(9)); emit_s(ST(0, 19));
    expect_mem[19] = 5;
    // done: show 0x600D on the seven-segment digits, then loop forever
    setd32(3, 32'h8000_0000);
    emit(SETD(1, LH, 8'h60)); emit_s(SETD(1, LL, 8'h0D));
    emit_s(MOVSQ(1)); emit_s(ST(3, 0));
    emit_s(EINT);
    emit(B0);
    if (pc > 1024) $fatal(1, "program too long");

    // push-switch routine at 0x200: store the switches, count
    pc = 32'h200 / 2;
    setd32(3, 32'h8000_0018);
    emit_s(LD(3, 0)); emit_s(ST(0, 21));
    emit_s(LD(0, 22)); emit_s(ALUI(0, 1)); emit_s(ST(0, 22));
    emit_s(SETD(1, LL, 8'h99)); emit_s(MOVSQ(1));      // clobber d1 and the queue
    emit(RFI);
    // timer routine at 0x280: stop the timer, count, clobber state
    pc = 32'h280 / 2;
    setd32(3, 32'h8000_0010);
    emit_s(MOVSQ(8)); emit_s(ST(3, 0));
    emit_s(LD(0, 20)); emit_s(ALUI(0, 1)); emit_s(ST(0, 20));
    emit_s(SETD(1, LL, 8'h55)); emit_s(MOVSQ(1)); emit_s(MOVSQ(1));
    emit(RFI);
    expect_mem[20] = 1;
    expect_mem[21] = 32'h2A5A5;
    expect_mem[22] = 1;
  endtask

  // ---------------- mechanism counters ----------------
  int n_taken, n_not_taken, n_jump, n_int_timer, n_int_key, n_rfi, n_hold;
  int n_fwd, n_qwrap, n_ld_mem, n_ld_io, n_st_mem, n_st_io, n_cycles;
  logic [4:0] qh_prev;
  always @(posedge clk) if (rst_n) begin
    n_cycles++;
    if (dut.e_branch) n_taken++;
    if (dut.i_cexe.branch && !dut.e_branch) n_not_taken++;
    if (dut.du_jump) n_jump++;
    if (dut.int_acc && dut.int_addr == INT0_ADDR) n_int_timer++;
    if (dut.int_acc && dut.int_addr == INT1_ADDR) n_int_key++;
    if (dut.rfi_rst) n_rfi++;
    if (dut.hold) n_hold++;
    if (dut.i_src1a[5] && dut.i_src1a == dut.u_eu.EU_SPRAddress_reg) n_fwd++;
    if (dut.u_qcu.QCU_QH_reg < qh_prev) n_qwrap++;
    qh_prev = dut.u_qcu.QCU_QH_reg;
    if (dut.bus_ctrl.mem_read)  begin if (dut.dmem_sel) n_ld_mem++; else n_ld_io++; end
    if (dut.bus_ctrl.mem_write) begin if (dut.dmem_sel) n_st_mem++; else n_st_io++; end
  end

  function automatic logic [3:0] digit(logic [6:0] segs);
    logic [6:0] g [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                           7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
    for (int d = 0; d < 16; d++) if (~segs == g[d]) return 4'(d);
    return 4'hx;
  endfunction
  function automatic word_t shown();
    word_t v;
    for (int i = 0; i < 8; i++) v[4*i +: 4] = digit(HEX[i]);
    return v;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_done;
    assemble();
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); IMEM_We = 1; IMEM_Addr = 10'(i); IMEM_Data = prog[i];
    end
    @(negedge clk); IMEM_We = 0;
    repeat (2) @(negedge clk);
    rst_n = 1; qh_prev = 0;
    n_cycles = 0;
    // main program
    for (t_done = 0; t_done < 3000 && shown() != 32'h600D; t_done++) @(negedge clk);
    chk(shown() == 32'h600D, "main program finished (seven-segment shows 600D)");
    $display("main program done after %0d cycles", t_done);
    // push button interrupt
    repeat (20) @(negedge clk);
    KEY[2] = 0;
    repeat (20) @(negedge clk);
    KEY[2] = 1;
    repeat (150) @(negedge clk);
    foreach (expect_mem[k])
      chk(dut.u_dmem.mem[k] == expect_mem[k],
          $sformatf("mem[0x%0h] = %h, expected %h", 32'h400 + k, dut.u_dmem.mem[k], expect_mem[k]));
    chk(dut.u_timer.cmd == 8'h00, "timer stopped by its routine");
    chk(dut.u_du.DU_O_IntEnable, "interrupts enabled again after rfi");
    $display("taken %0d, not taken %0d, jumps %0d, timer int %0d, key int %0d, rfi %0d, hold %0d",
             n_taken, n_not_taken, n_jump, n_int_timer, n_int_key, n_rfi, n_hold);
    $display("SPR forwards %0d, queue wraps %0d, ld mem/io %0d/%0d, st mem/io %0d/%0d",
             n_fwd, n_qwrap, n_ld_mem, n_ld_io, n_st_mem, n_st_io);
    chk(n_taken > 0, "taken branch with flush");
    chk(n_not_taken > 0, "branch not taken");
    chk(n_jump > 0, "jump in decode");
    chk(n_int_timer == 1, "one timer interrupt");
    chk(n_int_key == 1, "one push-switch interrupt");
    chk(n_rfi == 2, "two returns from interrupt");
    chk(n_hold >= 4 * 7, "pipeline drains");
    chk(n_fwd > 0, "SPR forwarding in execute");
    chk(n_qwrap > 0, "queue head wrapped around");
    chk(n_ld_mem > 0 && n_ld_io > 0 && n_st_mem > 0 && n_st_io > 0, "bus traffic of all kinds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
