// mldd_shift_register: cyclic codeword register with the correction gate.
//
// Holds the N-bit codeword c[0..N-1]. With load high the word d is captured in
// parallel (load wins over shift_en). With shift_en high the register rotates by
// one position per clock: c[i] takes c[i-1], and the bit leaving c[N-1] goes back
// into c[0] through the correction XOR gate, inverted when corr is high. Because
// the code is cyclic, after k rotations the check sums orthogonal on c[N-1] decide
// the bit that was loaded at position N-1-k, and N rotations return every bit to
// its original place, each one having passed the correction gate once.
//
// The orientation (c[0] fed by the gate, checks orthogonal on c[N-1]) follows the
// (15,7) decoder drawing of the original architecture. Q is the register itself, no extra delay.
// The register has no reset: it is always loaded before it is read.
module mldd_shift_register #(
  parameter int unsigned N = 63
) (
  input  logic         clk,
  input  logic         load,
  input  logic         shift_en,
  input  logic         corr,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (load) q <= d;
    else if (shift_en) q <= {q[N-2:0], q[N-1] ^ corr};
  end

endmodule
