// tb_sar: feeds random serial data into a single-input and a 3-input
// signature register and compares every state with a bit-level model; also
// checks clear and hold, and that a single flipped input bit changes the
// final signature.
module tb_sar;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear = 1'b0, en = 1'b0;
  logic [0:0] d1 = '0;
  logic [2:0] d3 = '0;
  logic [22:0] s1, s3, m1, m3;
  int checks = 0, failures = 0;
  sar dut1 (.clk, .rst_n, .clear, .en, .din(d1), .signature(s1));
  sar #(.NUM_IN(3)) dut3 (.clk, .rst_n, .clear, .en, .din(d3), .signature(s3));

  task automatic run(input int unsigned seed, input int flip_at, output logic [22:0] sig);
    void'($urandom(seed));
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    m1 = '0; m3 = '0;
    checks++; if (s1 != '0 || s3 != '0) failures++;
    for (int n = 0; n < 500; n++) begin
      en = ($urandom_range(0, 3) != 0);
      d1 = 1'($urandom()) ^ 1'(n == flip_at);
      d3 = 3'($urandom());
      @(negedge clk);
      if (en) begin
        m1 = {m1[21:0], m1[22] ^ m1[17]} ^ 23'(d1);
        m3 = {m3[21:0], m3[22] ^ m3[17]} ^ 23'(d3);
      end
      checks += 2;
      if (s1 != m1) failures++;
      if (s3 != m3) failures++;
    end
    en = 1'b0;
    sig = s1;
  endtask

  initial begin
    logic [22:0] a, b;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(7, -1, a);
    run(7, 250, b);
    checks++; if (a == b) failures++;
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
