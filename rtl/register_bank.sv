// register_bank: the four 8-bit compare registers.
//
// All registers see the same accumulator value d_i; register n takes it on
// the clock edge at which load_i[n] is high and holds it otherwise. Each
// register's value q_o[n] goes to comparator n. Four registers, all fed
// from the accumulator and each loaded by its own strobe from the register
// controller, follow the description of the design.
//
// Interface: clk, rst, load_i[NUM_REGS], d_i[WIDTH] -> q_o[NUM_REGS][WIDTH].
// Timing: one clock from load strobe to new register value.
module register_bank #(
  parameter int unsigned NUM_REGS = mcu_timer_pkg::NUM_REGS,
  parameter int unsigned WIDTH    = mcu_timer_pkg::DATA_WIDTH
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [NUM_REGS-1:0]           load_i,
  input  logic [WIDTH-1:0]              d_i,
  output logic [NUM_REGS-1:0][WIDTH-1:0] q_o
);

  for (genvar n = 0; n < NUM_REGS; n++) begin : g_reg
    register8 #(.WIDTH(WIDTH)) u_reg (
      .clk    (clk),
      .rst    (rst),
      .load_i (load_i[n]),
      .d_i    (d_i),
      .q_o    (q_o[n])
    );
  end

endmodule
