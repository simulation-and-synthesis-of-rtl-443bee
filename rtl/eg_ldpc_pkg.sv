// eg_ldpc_pkg: geometry of the one-step majority-decodable cyclic EG-LDPC codes.
//
// The codes are built on the two-dimensional Euclidean geometry EG(2, 2^S). Its
// points are the N = 2^(2S) - 1 nonzero elements of GF(2^(2S)), and codeword bit i
// belongs to the point alpha^i, alpha being a root of the primitive polynomial
// returned by prim_poly(). A line is the set {P + beta*D : beta in GF(2^S)}; the
// parity-check matrix has one row per line that misses the origin. The J = 2^S
// lines through the point alpha^(N-1) give the J check sums orthogonal on bit N-1:
// each holds 2^S bits, and any two share only bit N-1.
//
// check_mask(S, k) returns the k-th of those lines as a bit mask, computed at
// elaboration time from the field arithmetic, so no table is stored. For S = 2
// it yields the four check equations of the (15,7) code
// {3,11,12,14} {7,8,10,14} {1,5,13,14} {0,2,6,14}, and the resulting codes have
// 7, 37, 175 and 781 data bits for N = 15, 63, 255 and 1023. The choice of
// primitive polynomials (x^4+x+1, x^6+x+1, x^8+x^4+x^3+x^2+1, x^10+x^3+1) is
// this design's own; any primitive polynomial gives an equivalent code.
package eg_ldpc_pkg;

  // Largest supported geometry: S = 5, N = 1023, J = 32.
  localparam int unsigned MAX_S = 5;
  localparam int unsigned MAX_N = (1 << (2 * MAX_S)) - 1;

  function automatic int unsigned code_n(input int unsigned s);
    return (1 << (2 * s)) - 1;
  endfunction

  function automatic int unsigned code_j(input int unsigned s);
    return 1 << s;
  endfunction

  // Primitive polynomial of degree 2S, including the x^(2S) term.
  function automatic int unsigned prim_poly(input int unsigned s);
    case (s)
      2:       return 32'h13;   // x^4 + x + 1
      3:       return 32'h43;   // x^6 + x + 1
      4:       return 32'h11d;  // x^8 + x^4 + x^3 + x^2 + 1
      5:       return 32'h409;  // x^10 + x^3 + 1
      default: return 0;
    endcase
  endfunction

  // Bit mask of the k-th line (0 <= k < 2^S) through the point alpha^(N-1)
  // that does not pass through the origin.
  function automatic logic [MAX_N-1:0] check_mask(input int unsigned s, input int unsigned k);
    int unsigned m, n, q, poly, v, found, p;
    int unsigned exp_t[MAX_N];
    int unsigned log_t[MAX_N+1];
    logic [MAX_N-1:0] mask;
    logic through_origin;
    m    = 2 * s;
    n    = code_n(s);
    q    = code_j(s);
    poly = prim_poly(s);
    // Power table alpha^i and its inverse.
    v = 1;
    for (int unsigned i = 0; i < n; i++) begin
      exp_t[i] = v;
      log_t[v] = i;
      v = v << 1;
      if (((v >> m) & 1) != 0) v = v ^ poly;
    end
    found = 0;
    check_mask = '0;
    // Directions alpha^j, j = 0..q, represent the q+1 lines through a point
    // (GF(2^S)* is generated by alpha^(q+1)); exactly one of them meets the origin.
    for (int unsigned j = 0; j <= q; j++) begin
      mask = '0;
      mask[n-1] = 1'b1;
      through_origin = 1'b0;
      for (int unsigned t = 0; t + 1 < q; t++) begin
        p = exp_t[n-1] ^ exp_t[(t * (q + 1) + j) % n];
        if (p == 0) through_origin = 1'b1;
        else mask[log_t[p]] = 1'b1;
      end
      if (!through_origin) begin
        if (found == k) check_mask = mask;
        found++;
      end
    end
  endfunction

endpackage
