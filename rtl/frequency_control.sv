// frequency_control: holds the current scan clock frequency step and turns
// it into the division ratio of the frequency divider.
//
// The step runs from 0 (slowest clock, period NUM_FREQ fast-clock cycles)
// to NUM_FREQ-1 (fastest clock, period of one fast cycle). speed_up raises
// the step by one and slow_down lowers it by one; the step never goes past
// either end whatever the counter asks. clear (the start-of-scan-in reset)
// returns it to the slowest clock. The division ratio is NUM_FREQ - step, so
// the i-th frequency (i = step + 1) has period (NUM_FREQ - i + 1) fast-clock
// periods, the linear ladder of the scheme (80, 70, ..., 10 ns for eight steps
// of a 10 ns clock). sel_fast is high at the last step, where the
// multiplexer passes the fastest clock itself. at_min and at_max tell the
// up-down counter that a further request would be ignored. The reset to the
// slowest clock, the saturation and the linear ladder follow the scheme; the
// step register itself is this design's way of holding the division ratio.
module frequency_control #(
  parameter int unsigned NUM_FREQ = 512,
  parameter int unsigned SW       = (NUM_FREQ > 1) ? $clog2(NUM_FREQ) : 1,
  parameter int unsigned RW       = $clog2(NUM_FREQ + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          speed_up,
  input  logic          slow_down,
  output logic [SW-1:0] freq_step,
  output logic [RW-1:0] div_ratio,
  output logic          sel_fast,
  output logic          at_min,
  output logic          at_max
);

  localparam logic [SW-1:0] MAX_STEP = SW'(NUM_FREQ - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      freq_step <= '0;
    end else if (clear) begin
      freq_step <= '0;
    end else if (speed_up && !at_max) begin
      freq_step <= freq_step + 1'b1;
    end else if (slow_down && !at_min) begin
      freq_step <= freq_step - 1'b1;
    end
  end

  assign at_min    = (freq_step == '0);
  assign at_max    = (freq_step == MAX_STEP);
  assign sel_fast  = at_max;
  assign div_ratio = RW'(NUM_FREQ) - RW'(freq_step);

  assert property (@(posedge clk) disable iff (!rst_n) freq_step <= MAX_STEP);

endmodule
