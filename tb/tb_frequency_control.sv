// tb_frequency_control: random speed_up / slow_down / clear requests on an
// 8-frequency control; checks the step (saturating at both ends), the
// division ratio 8 - step, sel_fast and the end flags against a model, and
// that both ends were reached.
module tb_frequency_control;
  localparam int unsigned V = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear = 1'b0, speed_up = 1'b0, slow_down = 1'b0;
  logic [2:0] freq_step;
  logic [3:0] div_ratio;
  logic sel_fast, at_min, at_max;
  int checks = 0, failures = 0, r = 0, hit_max = 0, hit_min = 0;
  frequency_control #(.NUM_FREQ(V)) dut (.*);
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks += 5;
      if (freq_step != 3'(r)) failures++;
      if (div_ratio != 4'(V - r)) failures++;
      if (sel_fast != (r == V - 1)) failures++;
      if (at_max != (r == V - 1)) failures++;
      if (at_min != (r == 0)) failures++;
      if (r == V - 1) hit_max++;
      if (r == 0) hit_min++;
      clear     = ($urandom_range(0, 99) == 0);
      speed_up  = ($urandom_range(0, 9) < ((n / 300) % 2 == 0 ? 7 : 2));
      slow_down = !speed_up && ($urandom_range(0, 1) == 0);
      if (clear) r = 0;
      else if (speed_up) r = (r == V - 1) ? r : r + 1;
      else if (slow_down) r = (r == 0) ? 0 : r - 1;
    end
    checks += 2;
    if (hit_max < 10) failures++;
    if (hit_min < 10) failures++;
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
