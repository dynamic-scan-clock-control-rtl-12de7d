// tb_activity_monitor: exhaustive check of the XNOR monitors for 4 chains,
// with and without the output-side monitor (which must then read 0).
module tb_activity_monitor;
  localparam int unsigned C = 4;
  logic [C-1:0] fd, fq, ld, lq, in1, out1, in0, out0;
  int checks = 0, failures = 0;
  activity_monitor #(.NUM_CHAINS(C), .MONITOR_OUT(1'b1)) dut1 (
    .first_d(fd), .first_q(fq), .last_d(ld), .last_q(lq), .nt_in(in1), .nt_out(out1));
  activity_monitor #(.NUM_CHAINS(C), .MONITOR_OUT(1'b0)) dut0 (
    .first_d(fd), .first_q(fq), .last_d(ld), .last_q(lq), .nt_in(in0), .nt_out(out0));
  initial begin
    for (int v = 0; v < 65536; v++) begin
      {fd, fq, ld, lq} = 16'(v);
      #1;
      for (int c = 0; c < C; c++) begin
        checks += 4;
        if (in1[c]  != (fd[c] == fq[c])) failures++;
        if (out1[c] != (ld[c] == lq[c])) failures++;
        if (in0[c]  != (fd[c] == fq[c])) failures++;
        if (out0[c] != 1'b0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
