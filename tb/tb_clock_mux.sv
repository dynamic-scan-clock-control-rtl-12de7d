// tb_clock_mux: checks both paths of the multiplexer: with sel_fast the
// dynamic clock follows the fast clock and the shift enable is always high;
// otherwise both follow the divider.
module tb_clock_mux;
  logic clk_fast = 1'b0, div_clk, div_tick, sel_fast, dyn_clk, shift_en;
  int checks = 0, failures = 0;
  clock_mux dut (.*);
  initial begin
    for (int n = 0; n < 400; n++) begin
      {sel_fast, div_clk, div_tick} = 3'($urandom());
      clk_fast = n[0];
      #1;
      checks += 2;
      if (dyn_clk  != (sel_fast ? clk_fast : div_clk)) failures++;
      if (shift_en != (sel_fast ? 1'b1 : div_tick)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
