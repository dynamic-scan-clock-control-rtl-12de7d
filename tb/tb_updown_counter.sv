// tb_updown_counter: drives a 3-input up-down counter (threshold 5) with
// random up/down vectors and random end flags, and a single-input counter
// with count-down disabled (threshold 125, the worked example's modulo-125
// counter), and checks count, speed_up and slow_down against a model of the
// level arithmetic. Each kind of event must occur.
module tb_updown_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_smax = 0, n_smin = 0;

  logic       clear = 1'b0, step = 1'b0, at_min = 1'b1, at_max = 1'b0;
  logic [2:0] cu = '0, cd = '0;
  logic       su, sd;
  logic [2:0] count;
  int         r;

  updown_counter #(.NUM_CHAINS(3), .THRESHOLD(5), .COUNT_DOWN_EN(1'b1)) dut (
    .clk, .rst_n, .clear, .step, .count_up(cu), .count_down(cd), .at_min, .at_max,
    .speed_up(su), .slow_down(sd), .count);

  logic       b_step = 1'b0, b_up = 1'b0;
  logic       b_su, b_sd;
  logic [6:0] b_count;
  int         br = 0, b_speeds = 0;
  updown_counter #(.NUM_CHAINS(1), .THRESHOLD(125), .COUNT_DOWN_EN(1'b0)) dut_b (
    .clk, .rst_n, .clear(1'b0), .step(b_step), .count_up(b_up), .count_down(1'b1),
    .at_min(1'b1), .at_max(1'b0), .speed_up(b_su), .slow_down(b_sd), .count(b_count));

  function automatic int ones(input logic [2:0] x);
    return int'(x[0]) + int'(x[1]) + int'(x[2]);
  endfunction

  initial begin
    int s;
    bit e_su, e_sd;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    r = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      clear  = ($urandom_range(0, 63) == 0);
      step   = ($urandom_range(0, 3) != 0);
      cu     = 3'($urandom());
      cd     = 3'($urandom());
      at_min = ($urandom_range(0, 2) == 0);
      at_max = !at_min && ($urandom_range(0, 2) == 0);
      b_step = ($urandom_range(0, 1) == 0);
      b_up   = ($urandom_range(0, 3) != 0);
      #1;
      s = r + ones(cu) - ones(cd);
      e_su = step && s >= 5 && !at_max;
      e_sd = step && s < 0 && !at_min;
      checks += 3;
      if (su != e_su) failures++;
      if (sd != e_sd) failures++;
      if (int'(count) != r) begin failures++; if (failures < 10) $display("FAIL count %0d ref %0d", count, r); end
      if (step) begin
        if (s >= 5) begin
          if (at_max) begin r = 4; n_smax++; end else begin r = s - 5; n_up++; end
        end else if (s < 0) begin
          if (at_min) begin r = 0; n_smin++; end else begin r = s + 5; n_down++; end
        end else r = s;
      end
      if (clear) r = 0;
      // single-chain, up-only counter
      checks += 3;
      if (b_su != (b_step && b_up && br == 124)) failures++;
      if (b_sd) failures++;
      if (int'(b_count) != br) failures++;
      if (b_step && b_up) begin
        if (br == 124) begin br = 0; b_speeds++; end else br++;
      end
    end
    checks += 5;
    if (n_up == 0 || n_down == 0 || n_smax == 0 || n_smin == 0 || b_speeds == 0) failures++;
    $display("speed_up %0d slow_down %0d sat_max %0d sat_min %0d modulo-125 wraps %0d",
             n_up, n_down, n_smax, n_smin, b_speeds);
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
