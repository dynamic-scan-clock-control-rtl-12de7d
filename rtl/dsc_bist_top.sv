// dsc_bist_top: test-per-scan BIST with a dynamically controlled scan clock.
//
// The flip-flops of the circuit under test, including flip-flops added at its
// primary inputs and outputs, form NUM_CHAINS scan chains of CHAIN_LEN bits.
// An LFSR feeds the scan inputs, a signature analysis register (SAR)
// compresses the scan outputs, and the BIST controller alternates scan-in
// (overlapped with scan-out of the previous response) and capture for
// NUM_PATTERNS vectors. The scan clock is not fixed: dynamic_clock_ctrl
// starts every scan-in at the slowest clock allowed by the peak power budget
// and steps the clock up as non-transitions accumulate in the chains, and
// down as they leave.
//
// The combinational logic of the circuit under test is outside this design:
// cut_stim is the content of all scan flip-flops (bit i of chain c at
// c*CHAIN_LEN + i) and cut_resp is the logic's response, captured into the
// same flip-flops when the controller captures. cut_resp is sampled in the
// capture cycle and must be stable from the settle cycle on (scan_enable low).
//
// Interface: start (one cycle) begins a session; busy is high during it; done
// stays high at its end, when signature holds the final SAR state. All logic
// is clocked by clk_fast, the fast tester clock; dyn_clk is the dynamic scan
// clock, brought out for observation, and freq_step the current clock step
// (0 = slowest). Defaults: one chain of 76714 flip-flops, 512 frequencies and
// a peak activity factor of 0.65, the largest configuration evaluated for the
// scheme; 23-bit LFSR and SAR as in the BIST built for its evaluation.
// The block structure follows the scheme; clocking everything from the fast
// clock with enables, the polynomial, seed and pattern count are this
// design's choices.
module dsc_bist_top
  import dsc_pkg::*;
#(
  parameter int unsigned           NUM_CHAINS     = 1,
  parameter int unsigned           CHAIN_LEN      = 76714,
  parameter int unsigned           NUM_FREQ       = 512,
  parameter int unsigned           ALPHA_PEAK_PCT = 65,
  parameter int unsigned           THRESHOLD      = step_threshold(NUM_CHAINS * CHAIN_LEN, NUM_FREQ, ALPHA_PEAK_PCT),
  parameter bit                    COUNT_DOWN_EN  = 1'b1,
  parameter int unsigned           NUM_PATTERNS   = 4,
  parameter int unsigned           LFSR_WIDTH     = 23,
  parameter logic [LFSR_WIDTH-1:0] LFSR_TAPS      = LFSR_WIDTH'(POLY23_TAPS),
  parameter logic [LFSR_WIDTH-1:0] LFSR_SEED      = LFSR_WIDTH'(23'h5A5A5A),
  parameter int unsigned           SW             = (NUM_FREQ > 1) ? $clog2(NUM_FREQ) : 1
) (
  input  logic                            clk_fast,
  input  logic                            rst_n,
  input  logic                            start,
  output logic                            busy,
  output logic                            done,
  output logic [LFSR_WIDTH-1:0]           signature,
  output logic [NUM_CHAINS*CHAIN_LEN-1:0] cut_stim,
  input  logic [NUM_CHAINS*CHAIN_LEN-1:0] cut_resp,
  output logic                            scan_enable,
  output logic                            dyn_clk,
  output logic [SW-1:0]                   freq_step
);

  localparam int unsigned PW = $clog2(NUM_PATTERNS + 1);

  initial begin
    assert (NUM_CHAINS <= LFSR_WIDTH) else $error("dsc_bist_top: more chains than LFSR bits");
  end

  logic                  shift_en, capture_en, lfsr_load, lfsr_en, sar_clear, sar_en;
  logic                  speed_up, slow_down;
  logic [LFSR_WIDTH-1:0] lfsr_state;
  logic [NUM_CHAINS-1:0] scan_in, scan_out;
  logic [PW-1:0]         patterns_applied;
  bist_state_e           state;

  bist_controller #(
    .CHAIN_LEN(CHAIN_LEN), .NUM_PATTERNS(NUM_PATTERNS), .PW(PW)
  ) u_ctrl (
    .clk(clk_fast), .rst_n, .start, .shift_en, .scan_enable, .capture_en,
    .lfsr_load, .lfsr_en, .sar_clear, .sar_en, .busy, .done,
    .patterns_applied, .state
  );

  lfsr #(.WIDTH(LFSR_WIDTH), .TAPS(LFSR_TAPS), .SEED(LFSR_SEED)) u_lfsr (
    .clk(clk_fast), .rst_n, .load(lfsr_load), .en(lfsr_en), .state(lfsr_state)
  );

  always_comb begin
    for (int c = 0; c < NUM_CHAINS; c++) scan_in[c] = lfsr_state[LFSR_WIDTH-1-c];
  end

  dynamic_clock_ctrl #(
    .NUM_CHAINS(NUM_CHAINS), .CHAIN_LEN(CHAIN_LEN), .NUM_FREQ(NUM_FREQ),
    .ALPHA_PEAK_PCT(ALPHA_PEAK_PCT), .THRESHOLD(THRESHOLD),
    .COUNT_DOWN_EN(COUNT_DOWN_EN), .SW(SW)
  ) u_dcc (
    .clk_fast, .rst_n, .scan_enable, .capture_en, .scan_in,
    .capture_d(cut_resp), .q(cut_stim), .scan_out, .shift_en, .dyn_clk,
    .freq_step, .speed_up, .slow_down
  );

  sar #(.WIDTH(LFSR_WIDTH), .NUM_IN(NUM_CHAINS), .TAPS(LFSR_TAPS)) u_sar (
    .clk(clk_fast), .rst_n, .clear(sar_clear), .en(sar_en), .din(scan_out),
    .signature
  );

endmodule
