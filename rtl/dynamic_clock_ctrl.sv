// dynamic_clock_ctrl: scan chains with dynamic scan clock control.
//
// The scan clock of a power-limited scan test is normally set by the worst
// case, every scan flip-flop toggling. This block watches the scan chains and
// speeds the scan clock up while the chains hold few transitions, in
// NUM_FREQ steps, and slows it down again when transitions come back, so that
// activity times frequency stays within the budget of the slowest clock.
//
//   scan_enable -> reset_generator -> scan_rst (clears counter, frequency
//                                     control and divider: slowest clock)
//   scan chains -> activity_monitor (XNOR at first / last flip-flop)
//               -> updown_counter   (speed_up / slow_down every THRESHOLD
//                                    net non-transitions)
//               -> frequency_control (step, division ratio NUM_FREQ - step)
//               -> frequency_divider -> clock_mux -> shift_en / dyn_clk
//
// Everything runs on clk_fast, the fastest (tester) clock. A shift of the
// chains happens in a cycle in which shift_en is high: shift_en is the clock
// enable of the multiplexer, gated by scan_enable and suppressed in the reset
// cycle. At step s the chains shift once every NUM_FREQ - s fast cycles
// (every cycle at the last step). The first shift of a scan-in comes
// NUM_FREQ cycles after the cycle in which scan_enable rose. capture_en loads
// capture_d into all flip-flops (normal-mode capture) when no shift happens.
// dyn_clk has one rising edge per shift, except that in the reset cycle of a
// scan-in that follows one which ended at the fastest step the multiplexer
// still passes that cycle's fast edge (no shift happens on it).
//
// COUNT_DOWN_EN = 1 is the generalised scheme for test sets whose peak
// activity factor is below 1 (non-transitions leaving the chains are
// subtracted); COUNT_DOWN_EN = 0 drops the output-side XNORs and is the
// variant for a peak activity factor of 1. The defaults are the 76714 scan
// flip-flops, 512 frequencies and peak activity factor 0.65 of the largest
// evaluated configuration, giving THRESHOLD = ceil(0.65*76714/512) = 98.
module dynamic_clock_ctrl
  import dsc_pkg::*;
#(
  parameter int unsigned NUM_CHAINS     = 1,
  parameter int unsigned CHAIN_LEN      = 76714,
  parameter int unsigned NUM_FREQ       = 512,
  parameter int unsigned ALPHA_PEAK_PCT = 65,
  parameter int unsigned THRESHOLD      = step_threshold(NUM_CHAINS * CHAIN_LEN, NUM_FREQ, ALPHA_PEAK_PCT),
  parameter bit          COUNT_DOWN_EN  = 1'b1,
  parameter int unsigned SW             = (NUM_FREQ > 1) ? $clog2(NUM_FREQ) : 1
) (
  input  logic                            clk_fast,
  input  logic                            rst_n,
  input  logic                            scan_enable,
  input  logic                            capture_en,
  input  logic [NUM_CHAINS-1:0]           scan_in,
  input  logic [NUM_CHAINS*CHAIN_LEN-1:0] capture_d,
  output logic [NUM_CHAINS*CHAIN_LEN-1:0] q,
  output logic [NUM_CHAINS-1:0]           scan_out,
  output logic                            shift_en,
  output logic                            dyn_clk,
  output logic [SW-1:0]                   freq_step,
  output logic                            speed_up,
  output logic                            slow_down
);

  localparam int unsigned RW = $clog2(NUM_FREQ + 1);
  localparam int unsigned CW = $clog2(THRESHOLD + 1);

  logic                  scan_rst;
  logic [NUM_CHAINS-1:0] first_q, last_d, nt_in, nt_out;
  logic [RW-1:0]         div_ratio;
  logic                  sel_fast, at_min, at_max;
  logic                  div_tick, div_clk, mux_en;
  logic [CW-1:0]         count;

  reset_generator u_rstgen (
    .clk(clk_fast), .rst_n, .scan_enable, .scan_rst
  );

  scan_chain #(.NUM_CHAINS(NUM_CHAINS), .CHAIN_LEN(CHAIN_LEN)) u_chain (
    .clk(clk_fast), .rst_n, .shift_en, .capture_en, .scan_in, .capture_d,
    .q, .scan_out
  );

  always_comb begin
    for (int c = 0; c < NUM_CHAINS; c++) begin
      first_q[c] = q[c*CHAIN_LEN];
      last_d[c]  = q[c*CHAIN_LEN + CHAIN_LEN - 2];
    end
  end

  activity_monitor #(.NUM_CHAINS(NUM_CHAINS), .MONITOR_OUT(COUNT_DOWN_EN)) u_mon (
    .first_d(scan_in), .first_q, .last_d, .last_q(scan_out), .nt_in, .nt_out
  );

  updown_counter #(
    .NUM_CHAINS(NUM_CHAINS), .THRESHOLD(THRESHOLD), .COUNT_DOWN_EN(COUNT_DOWN_EN), .CW(CW)
  ) u_cnt (
    .clk(clk_fast), .rst_n, .clear(scan_rst), .step(shift_en),
    .count_up(nt_in), .count_down(nt_out), .at_min, .at_max,
    .speed_up, .slow_down, .count
  );

  frequency_control #(.NUM_FREQ(NUM_FREQ), .SW(SW), .RW(RW)) u_fctl (
    .clk(clk_fast), .rst_n, .clear(scan_rst), .speed_up, .slow_down,
    .freq_step, .div_ratio, .sel_fast, .at_min, .at_max
  );

  frequency_divider #(.MAX_RATIO(NUM_FREQ), .RW(RW)) u_div (
    .clk(clk_fast), .rst_n, .clear(scan_rst), .restart(shift_en),
    .ratio(div_ratio), .tick(div_tick), .div_clk
  );

  clock_mux u_mux (
    .clk_fast, .div_clk, .div_tick, .sel_fast, .dyn_clk, .shift_en(mux_en)
  );

  assign shift_en = mux_en && scan_enable && !scan_rst;

endmodule
