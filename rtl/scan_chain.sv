// scan_chain: the scan flip-flops of the circuit under test, organised as
// NUM_CHAINS chains of CHAIN_LEN mux-D scan flip-flops.
//
// Every flip-flop of the circuit (including the ones added at the primary
// inputs and outputs) is a scan flip-flop. When shift_en is high the chains
// shift by one position: bit 0 of each chain (the first flip-flop) loads the
// chain's scan_in and the last flip-flop drives scan_out. When capture_en is
// high every flip-flop loads its bit of capture_d, the response of the
// combinational logic (normal-mode capture). Shifting has priority.
//
// Bit i of chain c is q[c*CHAIN_LEN + i]. The design is clocked by the fast
// tester clock and shift_en is the one-cycle enable produced by the dynamic
// clock logic, so one pulse of shift_en stands for one edge of the dynamic
// scan clock. Using a clock enable in place of a separately routed scan clock
// and clearing the flip-flops on reset are this design's choices.
module scan_chain #(
  parameter int unsigned NUM_CHAINS = 1,
  parameter int unsigned CHAIN_LEN  = 76714
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             shift_en,
  input  logic                             capture_en,
  input  logic [NUM_CHAINS-1:0]            scan_in,
  input  logic [NUM_CHAINS*CHAIN_LEN-1:0]  capture_d,
  output logic [NUM_CHAINS*CHAIN_LEN-1:0]  q,
  output logic [NUM_CHAINS-1:0]            scan_out
);

  initial begin
    assert (CHAIN_LEN >= 2) else $error("scan_chain: CHAIN_LEN must be at least 2");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (shift_en) begin
      for (int c = 0; c < NUM_CHAINS; c++) begin
        q[c*CHAIN_LEN +: CHAIN_LEN] <= {q[c*CHAIN_LEN +: CHAIN_LEN-1], scan_in[c]};
      end
    end else if (capture_en) begin
      q <= capture_d;
    end
  end

  always_comb begin
    for (int c = 0; c < NUM_CHAINS; c++) begin
      scan_out[c] = q[c*CHAIN_LEN + CHAIN_LEN - 1];
    end
  end

endmodule
