// parallel_counter: counts the 1s among WIDTH inputs (a population count).
//
// With several scan chains the XNOR outputs of all chains are summed here so
// that the up-down counter can advance by the number of non-transitions that
// entered (or left) the chains in one shift. Only the function of this block
// is fixed by the scheme; the adder loop below, which synthesis turns into an
// adder tree, is this design's choice. Combinational.
module parallel_counter #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned CW    = $clog2(WIDTH + 1)
) (
  input  logic [WIDTH-1:0] in,
  output logic [CW-1:0]    count
);

  always_comb begin
    count = '0;
    for (int i = 0; i < WIDTH; i++) begin
      count = count + CW'(in[i]);
    end
  end

endmodule
