// tb_scan_in_time_sweep: scan-in time saving of the dynamic clock on a
// 1000 flip-flop chain with peak activity factor 1 (count-down off), the
// set-up of the random-vector study of the scheme.
//
// Sweep 1: 2, 4, 8, 16, 32, 64 and 128 clock steps at input activity 0.5.
// Sweep 2: 8 clock steps at input activity 0, 0.1, ..., 1.
// Every vector starts from a chain of alternating bits (the worst-case
// captured state) and scans in 1000 bits in which each bit differs from the
// previous one with probability alpha_in. The saving is 1 - (fast cycles
// spent shifting) / (1000 * v), averaged over VECS vectors. It is compared
// with the closed-form expectation (1 - alpha_in)/2 - 1/(2v) for v >= 4,
// floored at 0, and must lie within 2.5 percentage points of it; for 2
// steps the saving must be below 2 %. The analytic values at 8 steps are
// 43.75, 38.75, 33.75, ..., 3.75, 0, 0 %.
module tb_scan_in_time_sweep;
  localparam int unsigned L    = 1000;
  localparam int unsigned VECS = 12;
  localparam int unsigned NV   = 7;
  localparam int unsigned VS [NV] = '{2, 4, 8, 16, 32, 64, 128};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  real saving_v [NV];
  bit  done_v   [NV];
  real saving_a [11];
  bit  done_a;

  // Scan in VECS vectors with toggle probability alpha_pm (per mille) on one
  // instance; returns the mean saving in percent.
  `define SCAN_RUN(SE, CAP, SI, CAPD, SHIFT, V, ALPHA_PM, RESULT)                       \
    begin                                                                             \
      longint unsigned spent;                                                         \
      spent = 0;                                                                      \
      for (int vec = 0; vec < int'(VECS); vec++) begin                                \
        for (int i = 0; i < int'(L); i++) CAPD[i] = (i % 2 == 0);                     \
        @(negedge clk) CAP = 1'b1;                                                    \
        @(negedge clk) CAP = 1'b0;                                                    \
        SI = ($urandom_range(0, 999) < (ALPHA_PM)) ? 1'b0 : 1'b1;                     \
        SE = 1'b1;                                                                    \
        @(negedge clk);                                                               \
        for (int n = 0; n < int'(L); ) begin                                          \
          @(negedge clk);                                                             \
          spent++;                                                                    \
          if (SHIFT) begin                                                            \
            n++;                                                                      \
            @(posedge clk); #1;                                                       \
            if ($urandom_range(0, 999) < (ALPHA_PM)) SI = ~SI;                        \
          end                                                                         \
        end                                                                           \
        SE = 1'b0;                                                                    \
      end                                                                             \
      RESULT = 100.0 * (1.0 - real'(spent) / real'(longint'(VECS) * L * (V)));        \
    end

  for (genvar g = 0; g < int'(NV); g++) begin : g_v
    localparam int unsigned V = VS[g];
    logic          se = 1'b0, cap = 1'b0, shift, dclk, up, down;
    logic [0:0]    si = 1'b0, so;
    logic [L-1:0]  capd = '0, q;
    logic [$clog2(V)-1:0] step;
    dynamic_clock_ctrl #(
      .NUM_CHAINS(1), .CHAIN_LEN(L), .NUM_FREQ(V), .ALPHA_PEAK_PCT(100), .COUNT_DOWN_EN(1'b0)
    ) dut (
      .clk_fast(clk), .rst_n, .scan_enable(se), .capture_en(cap), .scan_in(si),
      .capture_d(capd), .q, .scan_out(so), .shift_en(shift), .dyn_clk(dclk),
      .freq_step(step), .speed_up(up), .slow_down(down)
    );
    initial begin
      real r;
      done_v[g] = 1'b0;
      wait (rst_n);
      `SCAN_RUN(se, cap, si, capd, shift, V, 500, r)
      saving_v[g] = r;
      if (V == 8) begin
        for (int a = 0; a <= 10; a++) begin
          `SCAN_RUN(se, cap, si, capd, shift, V, a * 100, r)
          saving_a[a] = r;
        end
        done_a = 1'b1;
      end
      done_v[g] = 1'b1;
    end
  end

  function automatic real expected(input real alpha, input int unsigned v);
    real e = (1.0 - alpha) / 2.0 - 1.0 / (2.0 * real'(v));
    return (e < 0.0) ? 0.0 : 100.0 * e;
  endfunction

  task automatic cmp(input real got, input real alpha, input int unsigned v);
    real e = expected(alpha, v);
    real d = got - e;
    checks++;
    if (v == 2) begin
      if (got > 2.0) failures++;
    end else if (d > 2.5 || d < -2.5) failures++;
    $display("  steps %3d  alpha_in %0.1f  saving %6.2f %%  closed form %6.2f %%", v, alpha, got, e);
  endtask

  initial begin
    done_a = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done_a);
    for (int g = 0; g < int'(NV); g++) wait (done_v[g]);
    $display("saving against number of clock steps, alpha_in = 0.5:");
    for (int g = 0; g < int'(NV); g++) cmp(saving_v[g], 0.5, VS[g]);
    $display("saving against alpha_in, 8 clock steps:");
    for (int a = 0; a <= 10; a++) cmp(saving_a[a], real'(a) / 10.0, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
