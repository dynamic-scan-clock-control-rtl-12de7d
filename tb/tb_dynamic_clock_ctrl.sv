// tb_dynamic_clock_ctrl: self-checking test of the dynamic scan clock logic.
//
// Part A runs the worked example of the scheme: 1000 flip-flops, 8 clock
// steps of one to eight fast cycles, a modulo-125 counter and no count-down.
// The chain is first filled with alternating bits (bit 0 = 1) and then 1000
// ones are scanned in. Every bit is a non-transition, so bits 1..125 must
// shift every 8 cycles, 126..250 every 7, ..., 876..1000 every cycle: 4500
// cycles instead of 8000, a 43.75 % saving. An alternating input must keep
// all 1000 shifts at 8 cycles.
//
// Part B runs two chains of 24 with count-down (threshold 6, 4 steps) against
// an independent reference model of the chains, the counter and the
// frequency ladder, for random captured contents and scan-in streams whose
// activity changes half way. It checks the interval of every shift, the step,
// and the chain contents, and counts speed-ups, slow-downs, saturation at
// both ends and shifts at the fast clock; each must occur.
module tb_dynamic_clock_ctrl;

  // ---------------- Part A: the 1000 flip-flop example ----------------
  localparam int unsigned LA = 1000;
  localparam int unsigned VA = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  logic          a_se = 1'b0, a_cap = 1'b0;
  logic [0:0]    a_si = 1'b0;
  logic [LA-1:0] a_capd, a_q;
  logic [0:0]    a_so;
  logic          a_shift, a_dclk, a_up, a_down;
  logic [2:0]    a_step;

  dynamic_clock_ctrl #(
    .NUM_CHAINS(1), .CHAIN_LEN(LA), .NUM_FREQ(VA), .ALPHA_PEAK_PCT(100),
    .COUNT_DOWN_EN(1'b0)
  ) dut_a (
    .clk_fast(clk), .rst_n, .scan_enable(a_se), .capture_en(a_cap),
    .scan_in(a_si), .capture_d(a_capd), .q(a_q), .scan_out(a_so),
    .shift_en(a_shift), .dyn_clk(a_dclk), .freq_step(a_step),
    .speed_up(a_up), .slow_down(a_down)
  );

  int unsigned a_dclk_edges = 0;
  // The reset cycle itself is not a shift; if the previous scan-in ended at
  // the fast clock, dyn_clk still shows that cycle's fast edge, so it is not
  // counted.
  always @(posedge a_dclk) if (a_se && !dut_a.scan_rst) a_dclk_edges++;

  // Load the chain with alternating bits, bit 0 = 1, then scan in LA bits of
  // the stream (alternate = 0: all ones, 1: 1,0,1,0,...) and check timing.
  task automatic run_a(input bit alternate, output int unsigned total);
    int unsigned last, n, expect_iv, iv;
    bit bitval;
    for (int i = 0; i < LA; i++) a_capd[i] = (i % 2 == 0);
    @(negedge clk) a_cap = 1'b1;
    @(negedge clk) a_cap = 1'b0;
    check(a_q == a_capd, "part A capture");
    // Stream value for the first shift: equal to bit 0 for the all-ones run,
    // different from it for the alternating run.
    bitval = alternate ? 1'b0 : 1'b1;
    a_si = bitval;
    a_dclk_edges = 0;
    a_se = 1'b1;                       // clear cycle starts here
    last = cycle + 1;
    n = 0;
    total = 0;
    while (n < LA) begin
      @(negedge clk);
      if (a_shift) begin
        iv = cycle - last + 1;
        expect_iv = alternate ? VA : VA - (n / (LA / VA));
        check(iv == expect_iv, $sformatf("part A shift %0d interval %0d expected %0d", n + 1, iv, expect_iv));
        total += iv;
        last = cycle + 1;
        n++;
        @(posedge clk);
        #1;
        if (alternate) bitval = ~bitval;
        a_si = bitval;
      end
    end
    a_se = 1'b0;
    check(a_dclk_edges == LA,
          $sformatf("part A dynamic clock edges %0d for %0d shifts", a_dclk_edges, LA));
  endtask

  // ---------------- Part B: two chains with count-down ----------------
  localparam int unsigned CB = 2;
  localparam int unsigned LB = 24;
  localparam int unsigned VB = 4;
  localparam int unsigned TB = 6;

  logic             b_se = 1'b0, b_cap = 1'b0;
  logic [CB-1:0]    b_si = '0;
  logic [CB*LB-1:0] b_capd = '0, b_q;
  logic [CB-1:0]    b_so;
  logic             b_shift, b_dclk, b_up, b_down;
  logic [1:0]       b_step;

  dynamic_clock_ctrl #(
    .NUM_CHAINS(CB), .CHAIN_LEN(LB), .NUM_FREQ(VB), .THRESHOLD(TB),
    .COUNT_DOWN_EN(1'b1)
  ) dut_b (
    .clk_fast(clk), .rst_n, .scan_enable(b_se), .capture_en(b_cap),
    .scan_in(b_si), .capture_d(b_capd), .q(b_q), .scan_out(b_so),
    .shift_en(b_shift), .dyn_clk(b_dclk), .freq_step(b_step),
    .speed_up(b_up), .slow_down(b_down)
  );

  // reference model state
  logic [CB*LB-1:0] r_q;
  int               r_step, r_count;
  int n_speed = 0, n_slow = 0, n_sat_max = 0, n_sat_min = 0, n_fast = 0, n_capture = 0;

  task automatic ref_shift(input logic [CB-1:0] si);
    int ups = 0, downs = 0, s;
    for (int c = 0; c < CB; c++) begin
      if (si[c] == r_q[c*LB]) ups++;
      if (r_q[c*LB+LB-2] == r_q[c*LB+LB-1]) downs++;
      r_q[c*LB +: LB] = {r_q[c*LB +: LB-1], si[c]};
    end
    s = r_count + ups - downs;
    if (s >= int'(TB)) begin
      if (r_step == int'(VB) - 1) begin r_count = TB - 1; n_sat_max++; end
      else begin r_step++; r_count = s - TB; n_speed++; end
    end else if (s < 0) begin
      if (r_step == 0) begin r_count = 0; n_sat_min++; end
      else begin r_step--; r_count = s + TB; n_slow++; end
    end else r_count = s;
  endtask

  task automatic run_b(input int vec);
    int unsigned last, iv;
    int pt_lo, pt_hi;
    // captured content: high half (leaves first) random-alternating, low half mostly constant
    for (int c = 0; c < CB; c++)
      for (int i = 0; i < LB; i++)
        b_capd[c*LB+i] = (i >= LB/2) ? ((i % 2 == 0) ^ ($urandom_range(0, 9) == 0))
                                     : ((vec % 2 == 0) ? 1'b0 : 1'(($urandom_range(0, 3) == 0)));
    @(negedge clk) b_cap = 1'b1;
    @(negedge clk) b_cap = 1'b0;
    n_capture++;
    check(b_q == b_capd, "part B capture");
    r_q = b_capd; r_step = 0; r_count = 0;
    pt_lo = $urandom_range(0, 2);
    pt_hi = $urandom_range(7, 10);
    b_si = 2'($urandom());
    b_se = 1'b1;
    last = cycle + 1;
    for (int n = 0; n < LB; ) begin
      @(negedge clk);
      check(b_step == 2'(r_step), $sformatf("part B step %0d ref %0d", b_step, r_step));
      if (b_step == 2'(VB - 1)) n_fast++;
      if (b_shift) begin
        iv = cycle - last + 1;
        check(iv == VB - r_step, $sformatf("part B shift %0d interval %0d expected %0d", n, iv, VB - r_step));
        ref_shift(b_si);
        last = cycle + 1;
        n++;
        @(posedge clk);
        #1;
        check(b_q == r_q, "part B chain contents");
        for (int c = 0; c < CB; c++)
          if ($urandom_range(0, 9) < ((n < int'(LB/2)) ? pt_lo : pt_hi)) b_si[c] = ~b_si[c];
      end
    end
    @(negedge clk) b_se = 1'b0;
  endtask

  // ---------------- sequence and watchdog ----------------
  initial begin
    int unsigned t_ones, t_alt;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_a(1'b0, t_ones);
    run_a(1'b1, t_alt);
    check(t_ones == 4500, $sformatf("1000 ones take %0d cycles, expected 4500", t_ones));
    check(t_alt == 8000, $sformatf("alternating input takes %0d cycles, expected 8000", t_alt));
    $display("part A: all ones %0d cycles, alternating %0d cycles, saving %0.2f %%",
             t_ones, t_alt, 100.0 * (1.0 - real'(t_ones) / real'(t_alt)));
    for (int v = 0; v < 40; v++) run_b(v);
    $display("part B: speed_up %0d slow_down %0d sat_max %0d sat_min %0d fast cycles %0d captures %0d",
             n_speed, n_slow, n_sat_max, n_sat_min, n_fast, n_capture);
    check(n_speed > 0, "speed-up never happened");
    check(n_slow > 0, "slow-down never happened");
    check(n_sat_max > 0, "saturation at the fastest step never happened");
    check(n_sat_min > 0, "saturation at the slowest step never happened");
    check(n_fast > 0, "fast clock never selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
