// tb_scan_chain: checks shifting, capture, priority of shift over capture and
// scan_out of a 3 x 10 scan chain against a reference array, with random
// data and random enables.
module tb_scan_chain;
  localparam int unsigned C = 3, L = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic shift_en = 1'b0, capture_en = 1'b0;
  logic [C-1:0] scan_in = '0, scan_out;
  logic [C*L-1:0] capture_d = '0, q, r_q;
  int checks = 0, failures = 0;

  scan_chain #(.NUM_CHAINS(C), .CHAIN_LEN(L)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (q != '0) failures++;
    rst_n = 1'b1;
    r_q = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (q != r_q) begin failures++; if (failures < 10) $display("FAIL chain %h ref %h", q, r_q); end
      for (int c = 0; c < C; c++) begin
        checks++; if (scan_out[c] != r_q[c*L+L-1]) failures++;
      end
      shift_en   = ($urandom_range(0, 2) == 0);
      capture_en = ($urandom_range(0, 5) == 0);
      scan_in    = C'($urandom());
      capture_d  = {$urandom(), $urandom()};
      if (shift_en)
        for (int c = 0; c < C; c++)
          for (int i = L - 1; i >= 0; i--) r_q[c*L+i] = (i == 0) ? scan_in[c] : r_q[c*L+i-1];
      else if (capture_en) r_q = capture_d;
    end
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
