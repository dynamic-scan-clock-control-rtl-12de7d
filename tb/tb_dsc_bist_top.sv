// tb_dsc_bist_top: end-to-end test of the dynamic scan clock BIST at reduced size (two chains of 32,
// 8 frequencies, peak activity factor 0.5, 12 patterns).
//
// The testbench plays the combinational logic of the circuit under test: at
// the settle cycle it computes the response from the scan flip-flops and
// drives it on cut_resp. Even patterns answer with a high-activity response
// (bit i = (i odd) XOR (s[i] AND s[i+1])); odd patterns answer with
// alternating bits in the upper half of each chain, which leaves first, and
// mostly constant bits in the lower half, so that non-transitions first pile
// up and then drain out of the chains. An independent reference model
// (dsc_ref_pkg) follows every shift. Checked: the length of every shift
// period, the scan chain contents at every capture, the number of scan-in
// resets and captures, the final signature, and done. Counted, and each
// required at least once: speed-up, slow-down, saturation at the fastest and
// at the slowest step, shifts at the fast clock (the multiplexer's divide-by-1
// path). The run reports the saved fraction of shift time against a fixed
// slowest scan clock.
module tb_dsc_bist_top;
  import dsc_pkg::*;
  import dsc_ref_pkg::*;

  localparam int unsigned NC = 2;
  localparam int unsigned L  = 32;
  localparam int unsigned V  = 8;
  localparam int unsigned K  = 50;
  localparam int unsigned NP = 12;
  localparam int unsigned N  = NC * L;
  localparam int unsigned T  = step_threshold(N, V, K);
  localparam int unsigned SW = (V > 1) ? $clog2(V) : 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start = 1'b0;
  logic          busy, done, scan_enable, dyn_clk;
  logic [22:0]   signature;
  logic [N-1:0]  cut_stim;
  logic [N-1:0]  cut_resp = '0;
  logic [SW-1:0] freq_step;

  dsc_bist_top #(
    .NUM_CHAINS(NC), .CHAIN_LEN(L), .NUM_FREQ(V), .ALPHA_PEAK_PCT(K),
    .NUM_PATTERNS(NP)
  ) u_dut (
    .clk_fast(clk), .rst_n, .start, .busy, .done, .signature, .cut_stim,
    .cut_resp, .scan_enable, .dyn_clk, .freq_step
  );

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  dsc_ref_model rm;
  longint unsigned last;
  int unsigned pattern = 0;
  int unsigned n_capture = 0, n_rst = 0;
  bit running = 1'b0;

  // model of the combinational logic
  task automatic drive_response();
    for (int unsigned c = 0; c < NC; c++)
      for (int unsigned i = 0; i < L; i++) begin
        bit v;
        if (pattern % 2 == 0)
          v = (i % 2 == 1) ^ (cut_stim[c*L + i] & cut_stim[c*L + (i + 1) % L]);
        else if (i >= L / 2)
          v = (i % 2 == 1);
        else
          v = (i % 8 == 7) ? cut_stim[c*L + i] : 1'b0;
        cut_resp[c*L + i] = v;
      end
  endtask

  always @(negedge clk) if (running) begin
    if (u_dut.u_dcc.scan_rst) begin
      rm.scan_clear();
      n_rst++;
      last = cycle + 1;
    end
    if (u_dut.u_dcc.shift_en) begin
      check(cycle - last + 1 == longint'(rm.ratio()),
            $sformatf("shift %0d period %0d expected %0d", rm.n_shifts, cycle - last + 1, rm.ratio()));
      check(freq_step == SW'(rm.step), "frequency step");
      rm.shift();
      last = cycle + 1;
    end
    if (u_dut.u_ctrl.state == ST_SETTLE) begin
      bit same = 1'b1;
      for (int unsigned c = 0; c < NC; c++)
        for (int unsigned i = 0; i < L; i++)
          if (cut_stim[c*L + i] != rm.get(c, i)) same = 1'b0;
      check(same, $sformatf("scan chain contents before capture %0d", pattern));
      drive_response();
    end
    if (u_dut.u_ctrl.capture_en) begin
      for (int unsigned c = 0; c < NC; c++)
        for (int unsigned i = 0; i < L; i++) rm.capture_bit(c, i, cut_resp[c*L + i]);
      rm.capture_done();
      n_capture++;
      pattern++;
    end
  end

  initial begin
    real saving;
    rm = new(NC, L, V, T, 1'b1, 23, 64'(POLY23_TAPS), 64'(23'h5A5A5A));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    rm.start_session();
    running = 1'b1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    wait (done);
    @(negedge clk);
    running = 1'b0;
    check(!busy, "not busy when done");
    check(n_capture == NP, $sformatf("captures %0d expected %0d", n_capture, NP));
    check(n_rst == NP + 1, $sformatf("scan-in resets %0d expected %0d", n_rst, NP + 1));
    check(rm.n_shifts == (NP + 1) * L, $sformatf("shifts %0d expected %0d", rm.n_shifts, (NP + 1) * L));
    check(signature == rm.sar[22:0], $sformatf("signature %h expected %h", signature, rm.sar[22:0]));
    saving = 100.0 * (1.0 - real'(rm.cycles_dynamic) / real'(rm.cycles_uniform));
    $display("N=%0d chains=%0d frequencies=%0d threshold=%0d patterns=%0d", N, NC, V, T, NP);
    $display("shift cycles: dynamic %0d, fixed slowest clock %0d, saving %0.2f %%",
             rm.cycles_dynamic, rm.cycles_uniform, saving);
    $display("speed_up %0d slow_down %0d sat_max %0d sat_min %0d fast-clock shifts %0d resets %0d captures %0d",
             rm.n_speed, rm.n_slow, rm.n_sat_max, rm.n_sat_min, rm.n_fast_shifts, n_rst, n_capture);
    check(rm.n_speed > 0, "speed-up never happened");
    check(rm.n_slow > 0, "slow-down never happened");
    check(rm.n_sat_min > 0, "saturation at the slowest step never happened");
    check(rm.n_sat_max > 0, "saturation at the fastest step never happened");
    check(rm.n_fast_shifts > 0, "fast clock never selected");
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
