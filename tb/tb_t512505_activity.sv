// tb_t512505_activity: scan-in time saving of the generalised scheme
// (count-down on) at its default size: one chain of 76714 flip-flops, 512
// clock speeds, peak activity factor 0.65 (threshold 98).
//
// For each point the chain is first loaded with a captured vector whose
// adjacent bits differ with probability alpha_out, then one vector whose bits
// toggle with probability alpha_in is scanned in. The saving is
// 1 - (fast cycles of the scan-in) / (76714 * 512). Reported values for this
// configuration, and the closed form (alpha_out - alpha_in)/(2*0.65) - 1/1024
// they follow, are
//   alpha_in 0.0, alpha_out 0.65: 49.90 %     alpha_in 0.0, alpha_out 0.3: 22.98 %
//   alpha_in 0.3, alpha_out 0.65: 26.83 %     alpha_in 0.3, alpha_out 0.3:  0 %
//   alpha_in 0.5, alpha_out 0.2 :  0 %
// The measured saving must be within 2 percentage points of each. The number
// of speed-ups and slow-downs is counted and both must occur.
module tb_t512505_activity;
  localparam int unsigned L = 76714;
  localparam int unsigned V = 512;
  localparam int unsigned NPT = 5;
  localparam int unsigned AIN  [NPT] = '{0,   0,   300, 300, 500};   // per mille
  localparam int unsigned AOUT [NPT] = '{650, 300, 650, 300, 200};
  localparam real         REP  [NPT] = '{49.90, 22.98, 26.83, 0.0, 0.0};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned n_up = 0, n_down = 0;

  logic          se = 1'b0, cap = 1'b0, shift, dclk, up, down;
  logic [0:0]    si = 1'b0, so;
  logic [L-1:0]  capd = '0, q;
  logic [8:0]    step;

  dynamic_clock_ctrl dut (
    .clk_fast(clk), .rst_n, .scan_enable(se), .capture_en(cap), .scan_in(si),
    .capture_d(capd), .q, .scan_out(so), .shift_en(shift), .dyn_clk(dclk),
    .freq_step(step), .speed_up(up), .slow_down(down)
  );

  always @(negedge clk) begin
    if (up)   n_up++;
    if (down) n_down++;
  end

  initial begin
    longint unsigned spent;
    real saving, d;
    bit b;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < int'(NPT); p++) begin
      b = 1'($urandom());
      for (int i = 0; i < int'(L); i++) begin
        if ($urandom_range(0, 999) < AOUT[p]) b = ~b;
        capd[i] = b;
      end
      @(negedge clk) cap = 1'b1;
      @(negedge clk) cap = 1'b0;
      si = ($urandom_range(0, 999) < AIN[p]) ? ~q[0] : q[0];
      se = 1'b1;
      @(negedge clk);
      spent = 0;
      for (int n = 0; n < int'(L); ) begin
        @(negedge clk);
        spent++;
        if (shift) begin
          n++;
          @(posedge clk); #1;
          if ($urandom_range(0, 999) < AIN[p]) si = ~si;
        end
      end
      se = 1'b0;
      saving = 100.0 * (1.0 - real'(spent) / (real'(L) * real'(V)));
      d = saving - REP[p];
      checks++;
      if (d > 2.0 || d < -2.0) failures++;
      $display("alpha_in %0.2f alpha_out %0.2f: saving %6.2f %%, reported %6.2f %%",
               real'(AIN[p]) / 1000.0, real'(AOUT[p]) / 1000.0, saving, REP[p]);
    end
    $display("speed-ups %0d slow-downs %0d", n_up, n_down);
    checks += 2;
    if (n_up == 0) failures++;
    if (n_down == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
