// timer16: the 16-bit free-running timer, the core of the subsystem.
//
// The counter advances by one on every clock edge at which it is enabled
// (en_i) and the clock controller's pulse (tick_i) is present. After FFFFh
// it restarts at 0000h. While the count is FFFFh and the timer is enabled,
// the carry out overflow_o is high: that is one period of the selected
// timer clock, ending with the wrap to 0000h. The low LOW_WIDTH bits go to
// the comparators; the upper bits only lengthen the overflow period. rst
// clears the count at once (asynchronous, active high). Counting, the
// enable, the wrap and the one-pulse overflow follow the description of the
// design; taking the selected pulse as a clock enable is this design's
// choice.
//
// Interface: clk, rst, en_i, tick_i -> count_o[WIDTH], low_o[LOW_WIDTH],
// overflow_o.
// Timing: count_o changes on the edge ending a cycle with en_i && tick_i.
module timer16 #(
  parameter int unsigned WIDTH     = mcu_timer_pkg::TIMER_WIDTH,
  parameter int unsigned LOW_WIDTH = mcu_timer_pkg::DATA_WIDTH
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en_i,
  input  logic                 tick_i,
  output logic [WIDTH-1:0]     count_o,
  output logic [LOW_WIDTH-1:0] low_o,
  output logic                 overflow_o
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                  count_o <= '0;
    else if (en_i && tick_i)  count_o <= count_o + 1'b1;  // wraps FFFFh -> 0000h
  end

  assign low_o      = count_o[LOW_WIDTH-1:0];
  assign overflow_o = en_i && (count_o == '1);

endmodule
