// dff_tb: self-checking test of the one-bit D flip-flop.
//
// Drives random data and enable for many cycles, with a few asynchronous
// resets in between, and compares q_o with a reference bit kept in the
// testbench: load on enable, hold otherwise, clear on reset.
module dff_tb;

  logic clk = 1'b0;
  logic rst, en, d, q;
  logic ref_q;
  int   checks = 0, failures = 0;

  dff dut (.clk(clk), .rst(rst), .en_i(en), .d_i(d), .q_o(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("dff_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("dff_tb: %s: q=%0b expected %0b at %0t", what, q, exp, $time);
    end
  endtask

  initial begin
    rst = 1'b0; en = 1'b0; d = 1'b1; ref_q = 1'b0;
    #1 rst = 1'b1;
    #1;
    check(1'b0, "reset");
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      d  = 1'($urandom);
      @(posedge clk);
      if (en) ref_q = d;
      #1;
      check(ref_q, "clocked");
      if (i % 500 == 250) begin
        // asynchronous reset in the middle of a cycle
        rst = 1'b1; #1;
        ref_q = 1'b0;
        check(ref_q, "async reset");
        @(negedge clk); rst = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
