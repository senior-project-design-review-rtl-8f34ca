// mcu_timer_top: timer and output-compare subsystem of a small
// 68HC11-like microcontroller.
//
// The user loads four 8-bit compare registers and lets a 16-bit timer run;
// each of the four match outputs goes high while the timer's low byte equals
// its register, which gives four programmable delays, and the timer's carry
// out flags every 65536 timer steps.
//
//   clock_controller : picks the timer rate, the input clock divided by 1, 2,
//                      4 or 8 (clk_sel_i), counting while clk_en_i is high.
//   timer16          : counts the selected pulses while clk_en_i is high;
//                      rst clears it.
//   reg_controller   : on a selected pulse with reg_en_i high, strobes the
//                      register chosen by reg_sel_i.
//   register_bank    : four 8-bit registers, all fed from acc_i.
//   comparator x4    : match_o[n] = (register n == timer bits 7..0).
//
// The blocks and their connections follow the description of the design.
// Its own choices: one clock for all flip-flops, with the selected pulse used
// as a clock enable (tick) instead of a divided or switched clock; the
// clock-controller enable also starting and stopping the timer; and the
// single rst clearing the divider and the registers as well as the timer.
// The register controller takes its pulse from the clock controller, so a
// register load waits for the next selected pulse.
//
// Ports: clk, rst (asynchronous, active high), acc_i[8], reg_sel_i[2],
// reg_en_i, clk_sel_i[2], clk_en_i -> match_o[4], overflow_o.
// Timing: a register loads on the clock edge ending the first selected
// pulse with reg_en_i high; match_o and overflow_o follow the timer in the
// same cycle (combinational from the flip-flops).
module mcu_timer_top #(
  parameter int unsigned DATA_WIDTH  = mcu_timer_pkg::DATA_WIDTH,
  parameter int unsigned TIMER_WIDTH = mcu_timer_pkg::TIMER_WIDTH,
  parameter int unsigned NUM_REGS    = mcu_timer_pkg::NUM_REGS,
  parameter int unsigned DIV_WIDTH   = mcu_timer_pkg::DIV_WIDTH
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [DATA_WIDTH-1:0]       acc_i,
  input  logic [$clog2(NUM_REGS)-1:0] reg_sel_i,
  input  logic                        reg_en_i,
  input  logic [1:0]                  clk_sel_i,
  input  logic                        clk_en_i,
  output logic [NUM_REGS-1:0]         match_o,
  output logic                        overflow_o
);

  logic                                 tick;
  logic [DIV_WIDTH-1:0]                 div;
  logic [TIMER_WIDTH-1:0]               count;
  logic [DATA_WIDTH-1:0]                timer_low;
  logic [NUM_REGS-1:0]                  load;
  logic [NUM_REGS-1:0][DATA_WIDTH-1:0]  regs;

  clock_controller #(.DIV_WIDTH(DIV_WIDTH)) u_clkctl (
    .clk    (clk),
    .rst    (rst),
    .en_i   (clk_en_i),
    .sel_i  (mcu_timer_pkg::clk_sel_e'(clk_sel_i)),
    .tick_o (tick),
    .div_o  (div)
  );

  timer16 #(.WIDTH(TIMER_WIDTH), .LOW_WIDTH(DATA_WIDTH)) u_timer (
    .clk        (clk),
    .rst        (rst),
    .en_i       (clk_en_i),
    .tick_i     (tick),
    .count_o    (count),
    .low_o      (timer_low),
    .overflow_o (overflow_o)
  );

  reg_controller #(.NUM_REGS(NUM_REGS)) u_regctl (
    .sel_i   (reg_sel_i),
    .en_i    (reg_en_i),
    .pulse_i (tick),
    .load_o  (load)
  );

  register_bank #(.NUM_REGS(NUM_REGS), .WIDTH(DATA_WIDTH)) u_regs (
    .clk    (clk),
    .rst    (rst),
    .load_i (load),
    .d_i    (acc_i),
    .q_o    (regs)
  );

  for (genvar n = 0; n < NUM_REGS; n++) begin : g_cmp
    comparator #(.WIDTH(DATA_WIDTH)) u_cmp (
      .r_i  (regs[n]),
      .t_i  (timer_low),
      .eq_o (match_o[n])
    );
  end

  // The carry out can only be high when the low byte is all ones.
  always_comb begin
    assert (!overflow_o || (timer_low == '1))
      else $error("mcu_timer_top: overflow with timer low byte not all ones");
  end

endmodule
