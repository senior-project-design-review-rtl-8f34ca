// reg_controller: chooses which compare register takes the accumulator value.
//
// A 1-to-4 decoder: register n gets a load strobe when the 2-bit select
// equals n, the controller is enabled and the incoming clock pulse is
// present, so load_o[n] = en_i & pulse_i & (sel_i == n). At most one strobe
// is ever high, which an assertion checks. The decode (select value n to
// register n, gated by enable and clock) follows the description of the
// design. In the original the strobe is the register's switched clock; here
// it is a one-cycle load enable for registers on the common clock (this
// design's choice), and pulse_i is the clock controller's tick.
//
// Interface: sel_i[$clog2(NUM_REGS)], en_i, pulse_i -> load_o[NUM_REGS].
// Timing: combinational; the register loads on the clock edge ending the
// cycle in which its strobe is high.
module reg_controller #(
  parameter int unsigned NUM_REGS = mcu_timer_pkg::NUM_REGS
) (
  input  logic [$clog2(NUM_REGS)-1:0] sel_i,
  input  logic                        en_i,
  input  logic                        pulse_i,
  output logic [NUM_REGS-1:0]         load_o
);

  always_comb begin
    load_o = '0;
    if (en_i && pulse_i) load_o[sel_i] = 1'b1;
  end

  // Only one register may be written at a time.
  always_comb begin
    assert ($onehot0(load_o))
      else $error("reg_controller: more than one register selected");
  end

endmodule
