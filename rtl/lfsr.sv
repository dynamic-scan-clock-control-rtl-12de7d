// lfsr: pattern generator of the test-per-scan BIST.
//
// A WIDTH-bit Fibonacci linear feedback shift register. On en the state
// shifts towards the most significant bit and the XOR of the tapped bits
// (TAPS, a mask over the state) enters at bit 0. load (the start of a BIST
// session) sets the state to SEED. The scan input of chain j is state bit
// WIDTH-1-j, so the first chain receives the register's serial output. The
// default is a 23-bit register, as in the BIST built for the evaluation; the
// polynomial x^23 + x^18 + 1 (maximal length, period 2^23 - 1) and the seed
// are this design's choices. SEED must not be 0.
module lfsr
  import dsc_pkg::*;
#(
  parameter int unsigned       WIDTH = 23,
  parameter logic [WIDTH-1:0]  TAPS  = WIDTH'(POLY23_TAPS),
  parameter logic [WIDTH-1:0]  SEED  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             en,
  output logic [WIDTH-1:0] state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= SEED;
    else if (en)   state <= {state[WIDTH-2:0], ^(state & TAPS)};
  end

  assert property (@(posedge clk) disable iff (!rst_n) state != '0);

endmodule
