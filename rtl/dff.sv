// dff: one-bit D flip-flop, the storage cell of every register bit.
//
// On each rising clock edge the flip-flop takes d_i when en_i is high and
// keeps its value otherwise; rst clears it at once (asynchronous, active
// high). The original cell is a gate-level edge-triggered D flip-flop whose
// clock is switched on by the register controller only when the register is
// written. Here the clock runs continuously and en_i plays the part of that
// switched clock, which keeps the whole subsystem on one clock (this
// design's choice). The reset input follows the register code of the
// design, which gives each register a reset.
//
// Interface: clk, rst, en_i, d_i -> q_o. Timing: q_o changes one clock edge
// after en_i and d_i are sampled.
module dff (
  input  logic clk,
  input  logic rst,
  input  logic en_i,
  input  logic d_i,
  output logic q_o
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       q_o <= 1'b0;
    else if (en_i) q_o <= d_i;
  end

endmodule
