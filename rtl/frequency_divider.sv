// frequency_divider: divides the fastest (tester) clock by a variable ratio.
//
// A counter runs from 0 to ratio-1 on the fast clock. tick is high in the
// last cycle of each period; the edge that ends that cycle is the edge of the
// divided scan clock at which the scan chains shift. div_clk is the divided
// clock itself: it goes high at that edge and stays high for ceil(ratio/2)
// fast cycles, so it has exactly one rising edge per shift. Like the divider of the scheme this one does not divide by 1:
// a ratio below 2 is treated as 2, and the clock multiplexer passes the fast
// clock instead. A new ratio takes effect from the period that follows the
// one in progress. restart, raised with every shift of the scan chains,
// starts a new period at once; it matters when the multiplexer hands the
// scan clock back from the fast clock to the divider, so that the first
// divided period is a full one. clear (the start-of-scan-in reset) restarts
// the period from 0 and holds div_clk low until the next tick. The first
// tick after clear comes ratio cycles after the clear cycle.
module frequency_divider #(
  parameter int unsigned MAX_RATIO = 512,
  parameter int unsigned RW        = $clog2(MAX_RATIO + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          restart,
  input  logic [RW-1:0] ratio,
  output logic          tick,
  output logic          div_clk
);

  logic [RW-1:0] cnt, cnt_next, r;

  assign r        = (ratio < RW'(2)) ? RW'(2) : ratio;
  assign tick     = !clear && (cnt >= r - 1'b1);
  assign cnt_next = (tick || restart) ? '0 : cnt + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      div_clk <= 1'b0;
    end else if (clear) begin
      cnt     <= '0;
      div_clk <= 1'b0;
    end else begin
      cnt     <= cnt_next;
      div_clk <= (tick || restart) || (div_clk && (cnt_next < ((r + 1'b1) >> 1)));
    end
  end

endmodule
