// tb_parallel_counter: exhaustive check of the 1s count for widths 1, 5 and
// 12 against a bit-by-bit loop.
module tb_parallel_counter;
  logic [0:0]  a;  logic [0:0] ca;
  logic [4:0]  b;  logic [2:0] cb;
  logic [11:0] d;  logic [3:0] cd;
  int checks = 0, failures = 0;
  parallel_counter #(.WIDTH(1))  d1 (.in(a), .count(ca));
  parallel_counter #(.WIDTH(5))  d5 (.in(b), .count(cb));
  parallel_counter #(.WIDTH(12)) d12 (.in(d), .count(cd));
  function automatic int ones(input logic [11:0] x);
    int n = 0;
    for (int i = 0; i < 12; i++) if (x[i]) n++;
    return n;
  endfunction
  initial begin
    for (int v = 0; v < 4096; v++) begin
      a = 1'(v); b = 5'(v); d = 12'(v);
      #1;
      checks += 3;
      if (int'(ca) != ones(12'(a))) failures++;
      if (int'(cb) != ones(12'(b))) failures++;
      if (int'(cd) != ones(d)) failures++;
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
