// tb_bist_controller: runs two sessions of a controller for 6-bit chains and
// 3 patterns with shift_en pulses at random intervals, and checks the whole
// sequence: 4 scan passes of exactly 6 shifts each, scan_enable low for
// exactly two cycles between passes with capture_en in the second, 3
// captures, lfsr_en on every shift, sar_en on every shift except those of
// the first pass, lfsr_load/sar_clear only at start, busy and done.
module tb_bist_controller;
  import dsc_pkg::*;
  localparam int unsigned L = 6, NP = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, shift_en = 1'b0;
  logic scan_enable, capture_en, lfsr_load, lfsr_en, sar_clear, sar_en, busy, done;
  logic [1:0] patterns_applied;
  bist_state_e state;
  int checks = 0, failures = 0;
  bist_controller #(.CHAIN_LEN(L), .NUM_PATTERNS(NP)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic session();
    int pass = 0, shifts = 0, captures = 0, low = 0;
    @(negedge clk);
    start = 1'b1;
    #1;
    chk(lfsr_load && sar_clear, "load and clear at start");
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      shift_en = scan_enable && ($urandom_range(0, 2) == 0);
      #1;
      chk(!lfsr_load && !sar_clear, "no load during session");
      chk(busy, "busy during session");
      chk(lfsr_en == shift_en, "lfsr_en follows shifts");
      chk(sar_en == (shift_en && pass > 0), "sar_en except first pass");
      if (scan_enable) begin
        if (low != 0) begin chk(low == 2, $sformatf("scan enable low for %0d cycles", low)); low = 0; end
        chk(!capture_en, "no capture while scanning");
        if (shift_en) begin
          shifts++;
          if (shifts == int'(L)) begin pass++; shifts = 0; end
        end
      end else begin
        low++;
        chk(capture_en == (low == 2), "capture in second low cycle");
        if (capture_en) captures++;
      end
      @(negedge clk);
      shift_en = 1'b0;
    end
    chk(pass == NP + 1, $sformatf("%0d scan passes", pass));
    chk(shifts == 0, "whole passes");
    chk(captures == NP, $sformatf("%0d captures", captures));
    chk(!busy && !scan_enable && !capture_en, "idle outputs when done");
    repeat (3) @(negedge clk);
    chk(done, "done holds");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!busy && !done && !scan_enable, "idle after reset");
    session();
    session();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
