// register8_tb: self-checking test of the 8-bit compare register.
//
// Random load strobes and random data for many cycles; after every clock
// edge q_o is compared with a reference byte that is loaded on a strobe and
// held otherwise. Also checks that reset clears the register and that a
// value survives a long run of cycles without a strobe.
module register8_tb;

  localparam int W = 8;

  logic         clk = 1'b0;
  logic         rst, load;
  logic [W-1:0] d, q, ref_q;
  int           checks = 0, failures = 0;

  register8 #(.WIDTH(W)) dut (.clk(clk), .rst(rst), .load_i(load), .d_i(d), .q_o(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("register8_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("register8_tb: %s: q=%02h expected %02h at %0t", what, q, exp, $time);
    end
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; d = '0;
    repeat (2) @(posedge clk);
    #1 check('0, "reset");
    @(negedge clk) rst = 1'b0;
    ref_q = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      load = ($urandom % 3) == 0;
      d    = W'($urandom);
      @(posedge clk);
      if (load) ref_q = d;
      #1 check(ref_q, "random load/hold");
    end
    // hold for a long time with changing data but no strobe
    @(negedge clk) load = 1'b1; d = 8'hA5;
    @(negedge clk) load = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk) d = W'($urandom);
      @(posedge clk) #1 check(8'hA5, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
