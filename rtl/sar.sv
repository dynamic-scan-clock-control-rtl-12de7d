// sar: signature analysis register of the test-per-scan BIST.
//
// A WIDTH-bit register with the same feedback structure as the LFSR that
// compresses the scan outputs into a signature. On en the state shifts
// towards the most significant bit, the XOR of the tapped bits enters at
// bit 0, and scan output j is XORed into bit j (a single-input register for
// one chain, a multiple-input one for several). clear (the start of a BIST
// session) sets the state to 0. The width of 23 bits is the document's; the
// polynomial x^23 + x^18 + 1 and the way several inputs are merged are this
// design's choices.
module sar
  import dsc_pkg::*;
#(
  parameter int unsigned      WIDTH  = 23,
  parameter int unsigned      NUM_IN = 1,
  parameter logic [WIDTH-1:0] TAPS   = WIDTH'(POLY23_TAPS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              en,
  input  logic [NUM_IN-1:0] din,
  output logic [WIDTH-1:0]  signature
);

  initial begin
    assert (NUM_IN <= WIDTH) else $error("sar: NUM_IN must not exceed WIDTH");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     signature <= '0;
    else if (clear) signature <= '0;
    else if (en)    signature <= {signature[WIDTH-2:0], ^(signature & TAPS)}
                                 ^ WIDTH'(din);
  end

endmodule
