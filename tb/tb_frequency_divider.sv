// tb_frequency_divider: for every ratio 1..16 (1 behaves as 2) samples tick
// and div_clk for 60 cycles after a clear and checks them against the
// expected waveform: a tick every ratio cycles, the first one ratio cycles
// after the clear cycle, and div_clk high for ceil(ratio/2) cycles after
// each tick. Then checks that a restart in mid-period starts a full period.
module tb_frequency_divider;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear = 1'b0, restart = 1'b0, tick, div_clk;
  logic [4:0] ratio = 5'd4;
  int checks = 0, failures = 0;
  frequency_divider #(.MAX_RATIO(16)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    int r, half, last_tick;
    bit exp_d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rr = 1; rr <= 16; rr++) begin
      r = (rr < 2) ? 2 : rr;
      half = (r + 1) / 2;
      ratio = 5'(rr);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      last_tick = -1000;
      for (int j = 1; j <= 60; j++) begin
        exp_d = (j - last_tick >= 1) && (j - last_tick <= half);
        chk(tick == (j % r == 0), $sformatf("ratio %0d cycle %0d tick %0d", rr, j, tick));
        chk(div_clk == exp_d, $sformatf("ratio %0d cycle %0d div_clk %0d", rr, j, div_clk));
        if (tick) last_tick = j;
        @(negedge clk);
      end
      // restart one cycle into a period: next tick r cycles later
      while (!tick) @(negedge clk);
      @(negedge clk);
      restart = 1'b1;
      @(negedge clk);
      restart = 1'b0;
      for (int j = 1; j <= r; j++) begin
        chk(tick == (j == r), $sformatf("ratio %0d restart cycle %0d", rr, j));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
