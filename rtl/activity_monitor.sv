// activity_monitor: scan-chain activity monitor, one pair of XNOR gates per
// chain.
//
// The first XNOR compares the input and the output of the first flip-flop of
// a chain: it is 1 when the bit about to enter equals the bit already at the
// head, i.e. when a non-transition enters the chain (nt_in, the count_up
// signal). The second XNOR compares the input and the output of the last
// flip-flop: it is 1 when a non-transition leaves the chain (nt_out, the
// count_down signal). Both are purely combinational and are sampled by the
// up-down counter at the same clock edge at which the chain shifts.
//
// With MONITOR_OUT = 0 the second XNOR is left out and nt_out is 0, which is
// the variant for test sets whose peak activity factor is 1. The gates and
// where they sit follow the scheme; the port grouping is this design's.
module activity_monitor #(
  parameter int unsigned NUM_CHAINS  = 1,
  parameter bit          MONITOR_OUT = 1'b1
) (
  input  logic [NUM_CHAINS-1:0] first_d,  // scan input of each chain
  input  logic [NUM_CHAINS-1:0] first_q,  // output of the first flip-flop
  input  logic [NUM_CHAINS-1:0] last_d,   // input of the last flip-flop
  input  logic [NUM_CHAINS-1:0] last_q,   // output of the last flip-flop (scan out)
  output logic [NUM_CHAINS-1:0] nt_in,    // count_up: non-transition entering
  output logic [NUM_CHAINS-1:0] nt_out    // count_down: non-transition leaving
);

  assign nt_in  = ~(first_d ^ first_q);
  assign nt_out = MONITOR_OUT ? ~(last_d ^ last_q) : '0;

endmodule
