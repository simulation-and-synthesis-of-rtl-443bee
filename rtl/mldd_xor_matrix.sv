// mldd_xor_matrix: the J parity check sums of the majority logic decoder.
//
// Output b[k] is the XOR of the register bits that lie on the k-th line of the
// geometry EG(2, 2^S) through the point of bit N-1 (see eg_ldpc_pkg). The J sums
// are orthogonal on c[N-1]: every sum contains it, and no other bit appears in
// more than one sum. All of them are zero for a codeword. Purely combinational;
// the masks are elaboration-time constants, so each sum is a 2^S-input XOR tree.
// For S = 2 the sums are exactly c3^c11^c12^c14, c7^c8^c10^c14, c1^c5^c13^c14 and
// c0^c2^c6^c14.
module mldd_xor_matrix
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned S = 3,
  localparam int unsigned N = (1 << (2 * S)) - 1,
  localparam int unsigned J = 1 << S
) (
  input  logic [N-1:0] c,
  output logic [J-1:0] b
);

  for (genvar k = 0; k < J; k++) begin : g_sum
    localparam logic [MAX_N-1:0] FULL_MASK = check_mask(S, k);
    localparam logic [N-1:0]     MASK      = FULL_MASK[N-1:0];
    assign b[k] = ^(c & MASK);
  end

endmodule
