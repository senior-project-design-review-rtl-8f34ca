// comparator_tb: exhaustive test of the 8-bit equality comparator.
//
// Applies all 65536 pairs of register and timer values and checks that
// eq_o is 1 exactly when the two are equal.
module comparator_tb;

  localparam int W = 8;

  logic         clk = 1'b0;
  logic [W-1:0] r, t;
  logic         eq;
  int           checks = 0, failures = 0;
  int           equal_seen = 0;

  comparator #(.WIDTH(W)) dut (.r_i(r), .t_i(t), .eq_o(eq));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("comparator_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << W); a++) begin
      for (int b = 0; b < (1 << W); b++) begin
        logic exp;
        r = W'(a);
        t = W'(b);
        #1;
        exp = (a == b);
        checks++;
        if (exp) equal_seen++;
        if (eq !== exp) begin
          failures++;
          if (failures < 10)
            $display("comparator_tb: r=%02h t=%02h eq=%0b expected %0b", r, t, eq, exp);
        end
      end
    end
    checks++;
    if (equal_seen != (1 << W)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
