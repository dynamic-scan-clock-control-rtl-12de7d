// tb_iscas_bist_sizes: whole BIST sessions at the scan lengths and clock
// speed counts of seven ISCAS89 benchmark circuits, peak activity factor 1
// (count-down off, threshold N/v), one chain, 16 patterns each:
//
//   circuit  scan FFs  speeds  reported saving
//   s27           8       2        7.49 %
//   s386         20       4       15.25 %
//   s1423        96       4       13.60 %
//   s9234       286       4       14.01 %
//   s13207      852       8       19.00 %
//   s35932     2083       8       18.74 %
//   s38584     1768       8       18.91 %
//
// With count-down off the speed depends only on the LFSR stream entering the
// chain, so the logic under test is modelled by a simple function. The test
// time of a session is compared with the same session at a fixed slowest
// clock (every shift v cycles, plus the reset cycle of each scan-in and the
// two capture cycles of each pattern). Checked: each session ends, and the
// saving is within 5 percentage points of the reported value for the five
// larger circuits and within 8 points for s27 and s386, where 8 and 20 bits
// make the saving depend strongly on the particular patterns.
module tb_iscas_bist_sizes;
  localparam int unsigned NC = 7;
  localparam int unsigned NS [NC] = '{8, 20, 96, 286, 852, 2083, 1768};
  localparam int unsigned VS [NC] = '{2, 4, 4, 4, 8, 8, 8};
  localparam real         RS [NC] = '{7.49, 15.25, 13.60, 14.01, 19.00, 18.74, 18.91};
  localparam int unsigned NP = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  real saving [NC];
  bit  fin    [NC];

  for (genvar g = 0; g < int'(NC); g++) begin : g_c
    localparam int unsigned N = NS[g];
    localparam int unsigned V = VS[g];
    logic start = 1'b0, busy, done, se, dclk;
    logic [22:0] sig;
    logic [N-1:0] stim, resp;
    logic [$clog2(V)-1:0] step;
    // model of the logic under test: a shifted, partly inverted copy
    always_comb for (int i = 0; i < int'(N); i++) resp[i] = stim[(i + 1) % N] ^ (i % 3 == 0);
    dsc_bist_top #(
      .NUM_CHAINS(1), .CHAIN_LEN(N), .NUM_FREQ(V), .ALPHA_PEAK_PCT(100),
      .COUNT_DOWN_EN(1'b0), .NUM_PATTERNS(NP)
    ) dut (
      .clk_fast(clk), .rst_n, .start, .busy, .done, .signature(sig), .cut_stim(stim),
      .cut_resp(resp), .scan_enable(se), .dyn_clk(dclk), .freq_step(step)
    );
    initial begin
      longint unsigned t = 0, base;
      fin[g] = 1'b0;
      wait (rst_n);
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      t = 1;
      while (!done) begin @(negedge clk); t++; end
      base = longint'(NP + 1) * (1 + longint'(N) * V) + 2 * NP;
      saving[g] = 100.0 * (1.0 - real'(t) / real'(base));
      fin[g] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < int'(NC); g++) wait (fin[g]);
    for (int g = 0; g < int'(NC); g++) begin
      real d = saving[g] - RS[g];
      real tol = (NS[g] < 96) ? 8.0 : 5.0;
      checks++;
      if (d > tol || d < -tol) failures++;
      $display("scan FFs %5d  speeds %0d  saving %6.2f %%  reported %6.2f %%", NS[g], VS[g], saving[g], RS[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
