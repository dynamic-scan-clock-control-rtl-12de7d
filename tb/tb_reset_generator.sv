// tb_reset_generator: drives a random scan enable and checks that scan_rst
// is high exactly in the first cycle after every rise, and never otherwise.
module tb_reset_generator;
  logic clk = 1'b0, rst_n = 1'b0, scan_enable = 1'b0, scan_rst, prev = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, pulses = 0;
  reset_generator dut (.*);
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      scan_enable = ($urandom_range(0, 3) != 0) ? scan_enable : ~scan_enable;
      #1;
      checks++;
      if (scan_rst != (scan_enable && !prev)) failures++;
      if (scan_rst) pulses++;
      prev = scan_enable;
    end
    checks++; if (pulses < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
