// register_bank_tb: self-checking test of the four compare registers.
//
// Each cycle strobes a random register (or none) with random data and
// checks all four outputs against reference bytes, so a strobe must change
// exactly the register it names and leave the other three alone. Reset
// must clear all four.
module register_bank_tb;

  localparam int N = 4;
  localparam int W = 8;

  logic                 clk = 1'b0;
  logic                 rst;
  logic [N-1:0]         load;
  logic [W-1:0]         d;
  logic [N-1:0][W-1:0]  q;
  logic [W-1:0]         ref_q [N];
  int                   checks = 0, failures = 0;
  int                   loads_seen [N];

  register_bank #(.NUM_REGS(N), .WIDTH(W)) dut (
    .clk(clk), .rst(rst), .load_i(load), .d_i(d), .q_o(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("register_bank_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input string what);
    for (int n = 0; n < N; n++) begin
      checks++;
      if (q[n] !== ref_q[n]) begin
        failures++;
        $display("register_bank_tb: %s: reg %0d = %02h expected %02h at %0t",
                 what, n, q[n], ref_q[n], $time);
      end
    end
  endtask

  initial begin
    rst = 1'b1; load = '0; d = '0;
    for (int n = 0; n < N; n++) begin ref_q[n] = '0; loads_seen[n] = 0; end
    repeat (2) @(posedge clk);
    #1 check_all("reset");
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      int unsigned pick;
      @(negedge clk);
      pick = $urandom % (N + 1);          // N means no strobe
      load = (pick < N) ? N'(1) << pick : '0;
      d    = W'($urandom);
      @(posedge clk);
      if (pick < N) begin
        ref_q[pick] = d;
        loads_seen[pick]++;
      end
      #1 check_all("load");
    end
    for (int n = 0; n < N; n++) begin
      checks++;
      if (loads_seen[n] == 0) begin
        failures++;
        $display("register_bank_tb: register %0d never loaded", n);
      end
    end
    // reset clears every register
    @(negedge clk) rst = 1'b1; load = '0;
    #1 for (int n = 0; n < N; n++) ref_q[n] = '0;
    check_all("reset after use");
    @(negedge clk) rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
