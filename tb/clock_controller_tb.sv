// clock_controller_tb: self-checking test of the timer clock selector.
//
// For each select value (divide by 1, 2, 4, 8) it runs the controller with
// the enable high and checks: the counter advances by one per clock; the
// strobe comes exactly once every 2^k clocks; and each strobe coincides
// with the edge at which counter bit k-1 (the divided square wave) rises.
// With the enable low the counter must freeze and the divided selects
// must give no strobe, while divide-by-1 still strobes every cycle.
module clock_controller_tb;

  import mcu_timer_pkg::*;

  localparam int DW = 4;

  logic          clk = 1'b0;
  logic          rst, en;
  clk_sel_e      sel;
  logic          tick;
  logic [DW-1:0] div;
  int            checks = 0, failures = 0;

  clock_controller #(.DIV_WIDTH(DW)) dut (
    .clk(clk), .rst(rst), .en_i(en), .sel_i(sel), .tick_o(tick), .div_o(div));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("clock_controller_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("clock_controller_tb: %s at %0t (sel=%0d div=%0d tick=%0b)",
               what, $time, sel, div, tick);
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; sel = CLK_DIV1;
    #12 rst = 1'b0;
    for (int k = 0; k < 4; k++) begin
      int period, last_tick, nticks;
      period = 1 << k;
      // restart the divider for a clean count
      @(negedge clk) rst = 1'b1; sel = clk_sel_e'(k); en = 1'b1;
      #1 rst = 1'b0;
      last_tick = -1; nticks = 0;
      for (int c = 0; c < 400; c++) begin
        logic [DW-1:0] div_before;
        logic          tick_now;
        div_before = div;
        tick_now   = tick;
        expect_true(div_before == DW'(c), "counter does not advance once per clock");
        @(posedge clk); #1;
        if (k > 0)
          // strobe exactly at the rising edge of counter bit k-1
          expect_true(tick_now == (!div_before[k-1] && div[k-1]),
                      "strobe not at rising edge of divided clock");
        else
          expect_true(tick_now, "divide-by-1 must strobe every cycle");
        if (tick_now) begin
          if (last_tick >= 0)
            expect_true(c - last_tick == period, "wrong strobe period");
          last_tick = c;
          nticks++;
        end
        @(negedge clk);
      end
      expect_true(nticks == 400 / period, "wrong number of strobes");
      // enable low: counter freezes, no divided strobe
      @(negedge clk) en = 1'b0;
      for (int c = 0; c < 40; c++) begin
        logic [DW-1:0] div_before;
        @(negedge clk);
        div_before = div;
        expect_true(tick == (k == 0), "strobe with enable low");
        @(posedge clk); #1;
        expect_true(div == div_before, "counter moved with enable low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
