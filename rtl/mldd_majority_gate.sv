// mldd_majority_gate: J-input majority vote over the check sums.
//
// maj is 1 when more than half of the J inputs are 1, i.e. when more check sums
// say "wrong" than "right"; a tie (possible because J = 2^S is even) leaves the
// bit alone. Combinational: a population count compared with J/2. The original
// architecture gives only this function, so the counter-and-compare form is this design's own.
module mldd_majority_gate #(
  parameter int unsigned J = 8
) (
  input  logic [J-1:0] b,
  output logic         maj
);

  localparam int unsigned CW = $clog2(J + 1);

  logic [CW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned i = 0; i < J; i++) ones = ones + CW'(b[i]);
    maj = (ones > CW'(J / 2));
  end

endmodule
