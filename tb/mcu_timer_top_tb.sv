// mcu_timer_top_tb: end-to-end test of the timer and output-compare
// subsystem at its default sizes (16-bit timer, four 8-bit registers).
//
// A reference model in the testbench keeps its own divider count, timer
// value and register contents, derived from the rules of the design:
//   - the timer steps at each rising edge of the selected divided clock
//     (counter bit k-1 going from 0 to 1 for select k, every clock for
//     select 0), only while the clock enable is high;
//   - a register loads the accumulator when the register enable is high
//     and a timer step occurs;
//   - match n is high while register n equals timer bits 7..0;
//   - the carry out is high while the timer is FFFFh and enabled.
// Every cycle it compares match_o and overflow_o with the model. It also
// measures each comparator's repeat interval and width at every divide
// ratio: 256 x 2^k and 2^k input clocks.
//
// The test loads all four registers, runs each divide ratio, runs a full
// 65536-step timer cycle through the carry out and wrap, stops the timer
// with the enable, reloads registers while the timer runs at divide-by-8
// (each load waits for the next divided pulse), resets mid-run, and ends
// with a random phase. It counts each of these events and fails if one
// never happens.
module mcu_timer_top_tb;

  localparam int N  = 4;
  localparam int DW = 8;
  localparam int TW = 16;

  logic               clk = 1'b0;
  logic               rst;
  logic [DW-1:0]      acc;
  logic [1:0]         reg_sel;
  logic               reg_en;
  logic [1:0]         clk_sel;
  logic               clk_en;
  logic [N-1:0]       match;
  logic               ovf;

  int checks = 0, failures = 0;

  mcu_timer_top dut (
    .clk(clk), .rst(rst), .acc_i(acc), .reg_sel_i(reg_sel), .reg_en_i(reg_en),
    .clk_sel_i(clk_sel), .clk_en_i(clk_en), .match_o(match), .overflow_o(ovf));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("mcu_timer_top_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  logic [3:0]    m_div;
  logic [TW-1:0] m_timer;
  logic [DW-1:0] m_regs [N];

  // mechanism counters
  int n_load [N];
  int n_match_edge [N];
  int n_rate_check [4];
  int n_overflow, n_wrap, n_hold, n_wait_load, n_reset_run;
  int n_sel_cycles [4];

  function automatic logic model_step();
    logic [3:0] nxt;
    int k;
    k = int'(clk_sel);
    if (k == 0) return 1'b1;
    nxt = m_div + 4'd1;
    return clk_en && !m_div[k-1] && nxt[k-1];
  endfunction

  always @(posedge clk or posedge rst) begin
    if (rst) begin
      m_div   <= '0;
      m_timer <= '0;
      for (int n = 0; n < N; n++) m_regs[n] <= '0;
    end else begin
      logic step;
      step = model_step();
      if (clk_en) m_div <= m_div + 4'd1;
      if (clk_en && step) begin
        m_timer <= m_timer + 1'b1;
        if (m_timer == '1) n_wrap++;
      end
      if (reg_en && step) begin
        m_regs[reg_sel] <= acc;
        n_load[reg_sel]++;
      end
      if (!clk_en) n_hold++;
      n_sel_cycles[clk_sel]++;
    end
  end

  // ---------------------------------------------------------------- checker
  longint       cyc = 0;
  longint       last_rise [N];
  longint       rise_at [N];
  longint       stable_since = 0;
  logic [1:0]   prev_sel = '0;
  logic         prev_en = 1'b0;
  logic [N-1:0] prev_match = '0;
  logic         prev_ovf = 1'b0;

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20)
        $display("mcu_timer_top_tb: %s at cycle %0d (timer=%04h match=%b ovf=%0b)",
                 what, cyc, m_timer, match, ovf);
    end
  endtask

  always @(negedge clk) begin
    cyc++;
    if (rst || clk_sel != prev_sel || clk_en != prev_en) begin
      stable_since = cyc;
      for (int n = 0; n < N; n++) last_rise[n] = -1;
    end
    prev_sel = clk_sel;
    prev_en  = clk_en;
    if (!rst) begin
      for (int n = 0; n < N; n++) begin
        logic exp;
        exp = (m_regs[n] == m_timer[DW-1:0]);
        expect_true(match[n] == exp, $sformatf("match %0d", n));
        // rising edge: check the repeat interval while nothing changed
        if (match[n] && !prev_match[n]) begin
          n_match_edge[n]++;
          if (last_rise[n] >= 0 && last_rise[n] >= stable_since && clk_en) begin
            expect_true(cyc - last_rise[n] == (longint'(256) << clk_sel),
                        $sformatf("match %0d repeat interval", n));
            n_rate_check[clk_sel]++;
          end
          last_rise[n] = cyc;
          rise_at[n]   = cyc;
        end
        // falling edge: check the width while nothing changed
        if (!match[n] && prev_match[n] && rise_at[n] > stable_since && clk_en)
          expect_true(cyc - rise_at[n] == (longint'(1) << clk_sel),
                      $sformatf("match %0d width", n));
      end
      expect_true(ovf == (clk_en && m_timer == '1), "carry out");
      if (ovf && !prev_ovf) n_overflow++;
      prev_ovf = ovf;
      // internal timer value against the model
      expect_true(dut.u_timer.count_o == m_timer, "timer value");
    end
    prev_match = match;
  end

  // ---------------------------------------------------------------- stimulus
  task automatic cycles(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // hold the register enable until the model has taken the value
  task automatic load_reg(input int n, input logic [DW-1:0] v);
    int loads_before, waited;
    loads_before = n_load[n];
    reg_sel = 2'(n); acc = v; reg_en = 1'b1;
    waited = 0;
    while (n_load[n] == loads_before) begin
      cycles(1);
      waited++;
    end
    reg_en = 1'b0;
    if (waited > 1) n_wait_load++;
    checks++;
    if (dut.u_regs.q_o[n] != v) begin
      failures++;
      $display("mcu_timer_top_tb: register %0d = %02h after load of %02h",
               n, dut.u_regs.q_o[n], v);
    end
  endtask

  initial begin
    logic [DW-1:0] vals [N];
    for (int n = 0; n < N; n++) begin n_load[n] = 0; n_match_edge[n] = 0; end
    for (int k = 0; k < 4; k++) begin n_rate_check[k] = 0; n_sel_cycles[k] = 0; end
    n_overflow = 0; n_wrap = 0; n_hold = 0; n_wait_load = 0; n_reset_run = 0;

    rst = 1'b1; acc = '0; reg_sel = '0; reg_en = 1'b0; clk_sel = 2'd0; clk_en = 1'b0;
    cycles(3);
    rst = 1'b0;

    // 1. load the four compare registers with the timer stopped
    vals[0] = 8'h10; vals[1] = 8'h80; vals[2] = 8'hFF; vals[3] = 8'h00;
    for (int n = 0; n < N; n++) load_reg(n, vals[n]);

    // 2. each divide ratio, long enough for three matches per register
    for (int k = 0; k < 4; k++) begin
      clk_sel = 2'(k); clk_en = 1'b1;
      cycles((3 * 256 + 2) << k);
    end

    // 3. a full timer cycle through the carry out and the wrap, divide by 1
    clk_sel = 2'd0;
    cycles(66000);

    // 4. stop the timer with the enable: outputs must hold
    clk_en = 1'b0;
    cycles(300);
    clk_en = 1'b1;

    // 5. reload registers while the timer runs at divide by 8
    clk_sel = 2'd3;
    cycles(5);
    for (int n = 0; n < N; n++) load_reg(n, 8'(8'h40 + 8'(n) * 8'h31));
    cycles(3 * 256 * 8);

    // 6. carry out at divide by 2: a full cycle at twice the period
    clk_sel = 2'd1;
    cycles(2 * 66000);

    // 7. reset in the middle of a run
    rst = 1'b1; cycles(2); rst = 1'b0; n_reset_run++;
    for (int n = 0; n < N; n++) load_reg(n, 8'($urandom));

    // 8. random phase
    for (int i = 0; i < 20000; i++) begin
      if ($urandom % 64 == 0) clk_sel = 2'($urandom);
      clk_en  = ($urandom % 8) != 0;
      reg_en  = ($urandom % 16) == 0;
      reg_sel = 2'($urandom);
      acc     = 8'($urandom);
      cycles(1);
    end
    reg_en = 1'b0;
    cycles(2);

    // every mechanism must have happened
    for (int n = 0; n < N; n++) begin
      expect_true(n_load[n] > 0, $sformatf("register %0d never loaded", n));
      expect_true(n_match_edge[n] > 0, $sformatf("comparator %0d never matched", n));
    end
    for (int k = 0; k < 4; k++)
      expect_true(n_rate_check[k] > 0, $sformatf("no match interval checked at select %0d", k));
    expect_true(n_overflow >= 2, "carry out seen fewer than two times");
    expect_true(n_wrap >= 2, "timer wrapped fewer than two times");
    expect_true(n_hold > 0, "timer never stopped by the enable");
    expect_true(n_wait_load > 0, "no register load waited for a divided pulse");
    expect_true(n_reset_run > 0, "no reset during a run");

    $display("mcu_timer_top_tb: loads=%0d/%0d/%0d/%0d matches=%0d/%0d/%0d/%0d",
             n_load[0], n_load[1], n_load[2], n_load[3],
             n_match_edge[0], n_match_edge[1], n_match_edge[2], n_match_edge[3]);
    $display("mcu_timer_top_tb: interval checks by select=%0d/%0d/%0d/%0d overflows=%0d wraps=%0d",
             n_rate_check[0], n_rate_check[1], n_rate_check[2], n_rate_check[3], n_overflow, n_wrap);
    $display("mcu_timer_top_tb: held cycles=%0d waited loads=%0d resets=%0d cycles=%0d",
             n_hold, n_wait_load, n_reset_run, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
