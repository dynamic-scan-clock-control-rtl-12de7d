// clock_mux: the multiplexer in front of the dynamic scan clock.
//
// The frequency divider cannot divide by 1, so at the fastest step the
// multiplexer selects the fastest clock itself; at every other step it
// selects the divider output. dyn_clk is that clock, for observation or for
// clocking logic outside this design; shift_en is the matching clock enable
// (high in every fast cycle when the fast clock is selected, the divider's
// tick otherwise) with which the scan chains are actually clocked here.
// dyn_clk can be shortened when sel_fast changes; the scan logic does not use
// it, so no glitch-free switch is built. Combinational. The selection
// follows the scheme; the added enable output is this design's.
module clock_mux (
  input  logic clk_fast,
  input  logic div_clk,
  input  logic div_tick,
  input  logic sel_fast,
  output logic dyn_clk,
  output logic shift_en
);

  assign dyn_clk  = sel_fast ? clk_fast : div_clk;
  assign shift_en = sel_fast ? 1'b1     : div_tick;

endmodule
