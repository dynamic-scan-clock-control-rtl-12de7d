// reset_generator: produces the start-of-scan-in reset.
//
// At the positive edge of scan enable, i.e. at the start of the scan-in of
// every vector, the up-down counter, the frequency control and the frequency
// divider must be reset so that each scan-in starts at the slowest scan clock.
// The generator is clocked by the fastest clock: it keeps the previous value
// of scan_enable and raises scan_rst for exactly the first fast-clock cycle in
// which scan_enable is high. scan_rst is combinational from scan_enable and
// is used as a synchronous clear by the blocks it resets. What is reset and
// when follows the scheme; the edge detector on the fast clock, and the
// requirement that scan_enable be a synchronous signal, are this design's.
module reset_generator (
  input  logic clk,
  input  logic rst_n,
  input  logic scan_enable,
  output logic scan_rst
);

  logic se_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) se_q <= 1'b0;
    else        se_q <= scan_enable;
  end

  assign scan_rst = scan_enable & ~se_q;

endmodule
