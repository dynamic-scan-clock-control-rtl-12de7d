// tb_lfsr: checks the default 23-bit LFSR: the state never becomes 0, it
// returns to the seed after exactly 2^23 - 1 steps (maximal length), the
// sequence matches a bit-level model for the first steps, load restores the
// seed and the state holds without en. A 4-bit instance (x^4 + x^3 + 1) must
// have period 15.
module tb_lfsr;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic load = 1'b0, en = 1'b0;
  logic [22:0] state, m;
  logic [3:0]  s4;
  int checks = 0, failures = 0;
  lfsr #(.SEED(23'h5A5A5A)) dut (.clk, .rst_n, .load, .en, .state);
  lfsr #(.WIDTH(4), .TAPS(4'b1100), .SEED(4'h1)) dut4 (.clk, .rst_n, .load, .en, .state(s4));
  initial begin
    int unsigned period = 0, p4 = 0;
    bit seen4 = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++; if (state != 23'h5A5A5A) failures++;
    m = state;
    en = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      m = {m[21:0], m[22] ^ m[17]};
      checks++; if (state != m) failures++;
    end
    en = 1'b0;
    @(negedge clk); @(negedge clk);
    checks++; if (state != m) failures++;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    checks++; if (state != 23'h5A5A5A || s4 != 4'h1) failures++;
    en = 1'b1;
    do begin
      @(negedge clk);
      period++;
      if (!seen4) begin p4++; if (s4 == 4'h1) seen4 = 1'b1; end
      if (state == '0) begin failures++; break; end
    end while (state != 23'h5A5A5A && period < 9000000);
    checks += 2;
    if (period != 8388607) failures++;
    if (p4 != 15) failures++;
    $display("period %0d, 4-bit period %0d", period, p4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (9000100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
