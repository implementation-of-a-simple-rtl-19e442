// qp_timer: interval timer of the queue processor (interrupt source 0).
//
// Two bus registers: the command at 0x80000010 and the counter value at
// 0x80000011. A store to the counter address sets the initial value. A
// store to the command address with bit 2 (Number Set) copies the initial
// value into the counter; bit 0 (Start/Stop) runs the counter when 1 and
// stops it when 0. While running, the counter decrements once per clock;
// when it is 0 the timer raises irq for one clock and reloads the initial
// value, so requests repeat every (initial value + 1) clocks. Loads read the
// command register and the current count. The command bits follow the
// specification; the clock-rate counting and the periodic reload are this
// design's choices.
module qp_timer
  import qp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_we,
  input  logic       cnt_we,
  input  word_t      wdata,
  output logic [7:0] cmd,
  output word_t      count,
  output logic       irq
);
  word_t init_reg;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cmd <= '0; init_reg <= '0; count <= '0; irq <= 1'b0;
    end else begin
      irq <= 1'b0;
      if (cnt_we) init_reg <= wdata;
      if (cmd_we) begin
        cmd <= wdata[7:0];
        if (wdata[2]) count <= init_reg;
      end else if (cmd[0]) begin
        if (count == '0) begin
          irq   <= 1'b1;
          count <= init_reg;
        end else begin
          count <= count - 1'b1;
        end
      end
    end
  end
endmodule
