// comparator: equality compare of one register with the low timer byte.
//
// Each bit pair is XORed, giving a 1 wherever the register and the timer
// differ, and an 8-input NOR of those bits gives eq_o = 1 only when every
// bit agrees. This XOR-then-NOR structure follows the description of the
// design. The block is purely combinational: eq_o is high for as long as
// the timer's low byte equals the register, i.e. for one timer step.
//
// Interface: r_i[WIDTH] (register), t_i[WIDTH] (timer low bits) -> eq_o.
module comparator #(
  parameter int unsigned WIDTH = mcu_timer_pkg::DATA_WIDTH
) (
  input  logic [WIDTH-1:0] r_i,
  input  logic [WIDTH-1:0] t_i,
  output logic             eq_o
);

  logic [WIDTH-1:0] diff;

  always_comb begin
    diff = r_i ^ t_i;   // one XOR per bit
    eq_o = ~|diff;      // NOR of all difference bits
  end

endmodule
