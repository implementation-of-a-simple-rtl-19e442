// qp_intc: interrupt controller of the queue processor.
//
// Latches the two interrupt requests, int_req0 from the timer and int_req1
// from the push switches, until they are served. When a request is pending
// and the decode unit's interrupt enable is set, the controller holds the
// fetch unit (no new instructions enter the pipeline) for DRAIN cycles, so
// that every instruction already issued has written back. It then pulses
// IntAccept for one clock together with IntAddress: the fetch unit jumps to
// the routine (0x200 for int_req1, 0x280 for int_req0) and saves its return
// address, and the queue, register and execution units copy their state to
// the shadow registers. int_req1 is served first when both are pending.
//
// When the decode unit decodes rfi the same drain happens, after which
// RfiRestore pulses: all units copy their saved state back and fetching
// resumes at the saved address. The specification asks for a synchronous
// interrupt without flushing that saves QREG, SPR, QH, QT, PC and the
// condition code; draining before the snapshot is this design's way of
// making that snapshot consistent.
module qp_intc
  import qp_pkg::*;
#(
  parameter int          DRAIN     = 6,
  parameter logic [31:0] INT0_VEC  = 32'h0000_0280,
  parameter logic [31:0] INT1_VEC  = 32'h0000_0200
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  IntReq0,
  input  logic  IntReq1,
  input  logic  IntEnable,
  input  logic  RFI,
  output logic  Hold,
  output logic  IntAccept,
  output word_t IntAddress,
  output logic  RfiRestore
);
  typedef enum logic [1:0] {IDLE, ENTER, LEAVE} state_e;
  state_e state;
  logic [$clog2(DRAIN+1)-1:0] cnt;
  logic pend0, pend1, start_enter, start_leave, last;

  assign start_enter = state == IDLE && IntEnable && (pend0 || pend1);
  assign start_leave = state == IDLE && !start_enter && RFI;
  assign last        = cnt == ($bits(cnt))'(DRAIN);
  assign Hold        = start_enter || start_leave || state != IDLE;
  assign IntAccept   = state == ENTER && last;
  assign RfiRestore  = state == LEAVE && last;
  assign IntAddress  = pend1 ? INT1_VEC : INT0_VEC;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE; cnt <= '0; pend0 <= 1'b0; pend1 <= 1'b0;
    end else begin
      if (IntReq0) pend0 <= 1'b1;
      if (IntReq1) pend1 <= 1'b1;
      unique case (state)
        IDLE: begin
          cnt <= 1;
          if (start_enter)      state <= ENTER;
          else if (start_leave) state <= LEAVE;
        end
        ENTER, LEAVE: begin
          cnt <= cnt + 1'b1;
          if (last) begin
            state <= IDLE;
            if (state == ENTER) begin
              if (pend1) pend1 <= IntReq1;
              else       pend0 <= IntReq0;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
