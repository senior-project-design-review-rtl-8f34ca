// reg_controller_tb: exhaustive test of the register-select decoder.
//
// For every select value, enable and pulse level, checks that the load
// strobe goes to exactly the selected register when both enable and pulse
// are high, and to none otherwise.
module reg_controller_tb;

  localparam int N = 4;

  logic         clk = 1'b0;
  logic [1:0]   sel;
  logic         en, pulse;
  logic [N-1:0] load;
  int           checks = 0, failures = 0;

  reg_controller #(.NUM_REGS(N)) dut (.sel_i(sel), .en_i(en), .pulse_i(pulse), .load_o(load));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("reg_controller_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int s = 0; s < N; s++) begin
        for (int e = 0; e < 2; e++) begin
          for (int p = 0; p < 2; p++) begin
            logic [N-1:0] exp;
            sel = 2'(s); en = 1'(e); pulse = 1'(p);
            @(negedge clk);
            exp = '0;
            if (e == 1 && p == 1) exp[s] = 1'b1;
            checks++;
            if (load !== exp) begin
              failures++;
              $display("reg_controller_tb: sel=%0d en=%0d pulse=%0d load=%b expected %b",
                       s, e, p, load, exp);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
