// register8: one 8-bit compare register built from eight D flip-flops.
//
// The register takes the accumulator value d_i on the clock edge at which
// its load strobe load_i is high, and otherwise holds what it has until the
// next load writes over it. rst clears it to zero (asynchronous, active
// high). The structure, eight one-bit flip-flops sharing one load control,
// follows the description of the design; using a load enable in place of a
// switched clock, and the zero reset value, are this design's choices.
//
// Interface: clk, rst, load_i, d_i[WIDTH] -> q_o[WIDTH].
// Timing: q_o shows the new value one clock after load_i.
module register8 #(
  parameter int unsigned WIDTH = mcu_timer_pkg::DATA_WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load_i,
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o
);

  for (genvar b = 0; b < WIDTH; b++) begin : g_bit
    dff u_dff (
      .clk  (clk),
      .rst  (rst),
      .en_i (load_i),
      .d_i  (d_i[b]),
      .q_o  (q_o[b])
    );
  end

endmodule
