// timer16_tb: self-checking test of the 16-bit timer.
//
// Runs the timer through more than a full 65536-step cycle with random
// pulse and enable patterns and checks, after every clock, the count and
// its low byte against a reference counter, and the carry out against the
// rule "high while the count is FFFFh and the timer is enabled". Also
// counts the wraps from FFFFh to 0000h (at least two must happen), checks
// that a disabled timer holds its value, and that reset clears it at once.
module timer16_tb;

  localparam int W  = 16;
  localparam int LW = 8;

  logic          clk = 1'b0;
  logic          rst, en, tick;
  logic [W-1:0]  count;
  logic [LW-1:0] low;
  logic          ovf;
  int            checks = 0, failures = 0;
  int            wraps = 0, ovf_seen = 0, held = 0;
  int unsigned   ref_count;

  timer16 #(.WIDTH(W), .LOW_WIDTH(LW)) dut (
    .clk(clk), .rst(rst), .en_i(en), .tick_i(tick),
    .count_o(count), .low_o(low), .overflow_o(ovf));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("timer16_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20)
        $display("timer16_tb: %s at %0t (count=%04h ref=%04h ovf=%0b)",
                 what, $time, count, ref_count[15:0], ovf);
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; tick = 1'b0; ref_count = 0;
    #12 rst = 1'b0;
    expect_true(count == 16'h0000, "reset value");
    for (int c = 0; c < 200000; c++) begin
      @(negedge clk);
      // mostly running, sometimes paused by the enable or a missing pulse
      en   = ($urandom % 16) != 0;
      tick = ($urandom % 8) != 0;
      #1;
      expect_true(ovf == (en && (ref_count == 32'hFFFF)), "carry out");
      if (ovf) ovf_seen++;
      @(posedge clk); #1;
      if (en && tick) begin
        if (ref_count == 32'hFFFF) begin
          ref_count = 0;
          wraps++;
        end else begin
          ref_count++;
        end
      end else begin
        held++;
      end
      expect_true(count == ref_count[15:0], "count");
      expect_true(low == ref_count[7:0], "low byte");
    end
    expect_true(wraps >= 2, "timer never wrapped twice");
    expect_true(ovf_seen >= 2, "carry out never seen");
    expect_true(held > 0, "timer never held");
    // asynchronous reset clears it mid-cycle
    @(negedge clk) #2 rst = 1'b1;
    #1 expect_true(count == 16'h0000, "async reset");
    @(negedge clk) rst = 1'b0;
    $display("timer16_tb: wraps=%0d overflow cycles=%0d held cycles=%0d", wraps, ovf_seen, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
