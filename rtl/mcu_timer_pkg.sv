// mcu_timer_pkg: sizes and types shared by the timer/compare subsystem.
//
// The subsystem is the timer block of a small 68HC11-like microcontroller:
// an 8-bit data path, a 16-bit free-running timer, four compare registers
// and a 2-bit clock-divider select. All of these numbers follow the
// description of the design; only the type names are this design's own.
package mcu_timer_pkg;

  localparam int unsigned DATA_WIDTH  = 8;   // accumulator, registers, compare
  localparam int unsigned TIMER_WIDTH = 16;  // timer counter
  localparam int unsigned NUM_REGS    = 4;   // compare registers / comparators
  localparam int unsigned DIV_WIDTH   = 4;   // clock-divider counter
  localparam int unsigned SEL_WIDTH   = 2;   // register and clock selects

  typedef logic [DATA_WIDTH-1:0]  data_t;
  typedef logic [TIMER_WIDTH-1:0] count_t;

  // Clock controller select: which pulse drives the timer.
  typedef enum logic [SEL_WIDTH-1:0] {
    CLK_DIV1 = 2'd0,  // Clock0: the input clock itself
    CLK_DIV2 = 2'd1,  // Clock1: period of two input clocks
    CLK_DIV4 = 2'd2,  // Clock2: period of four input clocks
    CLK_DIV8 = 2'd3   // Clock3: period of eight input clocks
  } clk_sel_e;

endpackage
