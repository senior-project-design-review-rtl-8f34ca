// clock_controller: selects the pulse rate that drives the timer.
//
// A DIV_WIDTH-bit counter advances on every input clock while en_i is high.
// Counter bit k-1 is a square wave with a period of 2^k input clocks
// (Clock1, Clock2, Clock3 for k = 1, 2, 3); Clock0 is the input clock
// itself. The 2-bit select picks one of the four, as a 4:1 multiplexer
// would. The counter, its enable and the four selectable periods follow the
// description of the design; the fourth counter bit is not selectable there
// and only appears on div_o.
//
// Instead of sending a divided clock to the timer, this design gives a
// one-cycle strobe, tick_o, in the input-clock cycle at whose end the
// selected square wave would rise (for select k > 0: counter bits k-1..0
// equal 0 followed by ones, with en_i high). The timer and register
// controller then use tick_o as a clock enable, so everything runs on one
// clock. For select 0, tick_o is high in every cycle, as Clock0 does not
// pass through the counter. rst clears the counter (asynchronous, active
// high); the design's counter reset is not described, so this is an
// assumption.
//
// Interface: clk, rst, en_i, sel_i[2] -> tick_o, div_o[DIV_WIDTH].
// Timing: with select k > 0 and en_i held high, tick_o is high one cycle in
// every 2^k.
module clock_controller #(
  parameter int unsigned DIV_WIDTH = mcu_timer_pkg::DIV_WIDTH
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         en_i,
  input  mcu_timer_pkg::clk_sel_e      sel_i,
  output logic                         tick_o,
  output logic [DIV_WIDTH-1:0]         div_o
);

  import mcu_timer_pkg::*;

  logic [DIV_WIDTH-1:0] cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       cnt <= '0;
    else if (en_i) cnt <= cnt + 1'b1;
  end

  // For select k > 0 the selected wave is cnt[k-1]; it rises when the low k
  // counter bits go from 0111..1 to 1000..0.
  always_comb begin
    unique case (sel_i)
      CLK_DIV1: tick_o = 1'b1;
      CLK_DIV2: tick_o = en_i && (cnt[0]   == 1'b0);
      CLK_DIV4: tick_o = en_i && (cnt[1:0] == 2'b01);
      CLK_DIV8: tick_o = en_i && (cnt[2:0] == 3'b011);
      default:  tick_o = 1'b0;
    endcase
  end

  assign div_o = cnt;

  initial begin
    assert (DIV_WIDTH >= 3)
      else $fatal(1, "clock_controller: DIV_WIDTH must be at least 3");
  end

endmodule
