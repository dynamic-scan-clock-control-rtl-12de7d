// updown_counter: counts the net number of non-transitions in the scan
// chains and asks the frequency control to step the scan clock up or down.
//
// At each shift (step high) the counter adds the number of non-transitions
// that entered the chains (popcount of count_up) and subtracts the number
// that left them (popcount of count_down, only when COUNT_DOWN_EN is set).
// The count is kept in the range 0 .. THRESHOLD-1, so that together with the
// frequency step it forms one level: level = step * THRESHOLD + count.
//   * Reaching THRESHOLD raises speed_up for that cycle and the count restarts
//     from the excess over THRESHOLD (0 with a single chain).
//   * Going below 0 raises slow_down and the count continues from
//     THRESHOLD plus the (negative) sum (THRESHOLD-1 with a single chain).
//   * At the fastest step (at_max) the count saturates at THRESHOLD-1, and
//     at the slowest step (at_min) it saturates at 0; no request is raised.
// clear (the start-of-scan-in reset) returns the count to 0.
//
// speed_up and slow_down are combinational and valid in the cycle in which
// step is high; the frequency control takes them at the same clock edge at
// which the chains shift, so a new frequency applies from the next shift.
// Counting up by popcount for several chains follows the multiple-chain
// variant of the scheme. The saturation at both ends and carrying the excess
// are this design's choices. THRESHOLD must be at least NUM_CHAINS so that
// one shift never crosses more than one step.
module updown_counter #(
  parameter int unsigned NUM_CHAINS    = 1,
  parameter int unsigned THRESHOLD     = 98,
  parameter bit          COUNT_DOWN_EN = 1'b1,
  parameter int unsigned CW            = $clog2(THRESHOLD + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  step,
  input  logic [NUM_CHAINS-1:0] count_up,
  input  logic [NUM_CHAINS-1:0] count_down,
  input  logic                  at_min,
  input  logic                  at_max,
  output logic                  speed_up,
  output logic                  slow_down,
  output logic [CW-1:0]         count
);

  localparam int unsigned PW = $clog2(NUM_CHAINS + 1);
  localparam int unsigned SW = CW + PW + 2;   // signed working width

  initial begin
    assert (THRESHOLD >= 1 && THRESHOLD >= NUM_CHAINS)
      else $error("updown_counter: THRESHOLD must be >= max(1, NUM_CHAINS)");
  end

  logic [PW-1:0]        n_up, n_down;
  logic signed [SW-1:0] sum;
  logic [CW-1:0]        count_next;

  parallel_counter #(.WIDTH(NUM_CHAINS), .CW(PW)) u_pc_up (
    .in(count_up), .count(n_up)
  );
  parallel_counter #(.WIDTH(NUM_CHAINS), .CW(PW)) u_pc_down (
    .in(COUNT_DOWN_EN ? count_down : '0), .count(n_down)
  );

  localparam logic signed [SW-1:0] THR = SW'(THRESHOLD);

  always_comb begin
    sum        = $signed(SW'(count)) + $signed(SW'(n_up)) - $signed(SW'(n_down));
    speed_up   = 1'b0;
    slow_down  = 1'b0;
    count_next = count;
    if (step) begin
      if (sum >= THR) begin
        if (at_max) begin
          count_next = CW'(THRESHOLD - 1);
        end else begin
          speed_up   = 1'b1;
          count_next = CW'(sum - THR);
        end
      end else if (sum < 0) begin
        if (at_min) begin
          count_next = '0;
        end else begin
          slow_down  = 1'b1;
          count_next = CW'(sum + THR);
        end
      end else begin
        count_next = CW'(sum);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else            count <= count_next;
  end

  // A request is only raised in a shift cycle and never both at once.
  assert property (@(posedge clk) disable iff (!rst_n) !(speed_up && slow_down));
  assert property (@(posedge clk) disable iff (!rst_n) (speed_up || slow_down) |-> step);
  assert property (@(posedge clk) disable iff (!rst_n) count < CW'(THRESHOLD));

endmodule
