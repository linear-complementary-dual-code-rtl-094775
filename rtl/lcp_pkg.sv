// lcp_pkg: construction of the Linear Complementary Pair (LCP) of codes used to
// encode and mask the state register of a circuit.
//
// A k-bit state x and an (n-k)-bit random mask y are stored as the n-bit word
//     z = x*G ^ y*H,   G = (I_k | M),   H = (N | I_r),   r = n - k
// (row vectors, arithmetic over GF(2)). C = rowspace(G) carries the data, D =
// rowspace(H) carries the mask. The pair must be complementary, which holds
// exactly when A = I_r ^ N*M is invertible; decoding then is
//     y = (z2 ^ z1*M) * A^-1,   x = z1 ^ y*N
// with z1 = z[k-1:0] (the systematic copy of x) and z2 = z[n-1:k]. These two
// expressions are the decoding matrices J (z -> x) and K (z -> y) written in
// the factored form that follows from the block inverse of (G;H).
//
// Two code families are built here, entirely by constant functions, so that
// any state width k can be encoded without stored tables:
//
//  * LCP_BCH2 (d_Trigger = 5, d_Payload = 3). D is the dual of a shortened
//    double-error-correcting binary BCH code C' = [n, k, 5] with generator
//    polynomial g(x) = m1(x)*m3(x) over GF(2^m), m the smallest field with
//    2^m - 1 >= k + 2m, so r = 2m. Row i of N^T is x^(r+i) mod g(x), the
//    parity of the systematic C' codeword for message bit i; the dual distance
//    of D is therefore 5. For k = 109 this gives the [123,109,5,3] code, for
//    k = 37 the [49,37,5,3] code.
//    M is chosen with distinct rows of weight >= 2 (all weight-2 vectors in
//    increasing order, then weight 3, ...), which makes the minimum distance
//    of C at least 3. The candidate list is started at the smallest offset for
//    which A is invertible.
//  * LCP_PARITY (d_Trigger = 2, d_Payload = 1). r = 1, N = all ones (D is the
//    repetition code, dual of the single-parity code), M = 0. This is the
//    [k+1, k, 2, 1] code, [110,109,2,1] for k = 109.
//
// The code parameters and the systematic forms of G and H follow the LCP
// method. The BCH construction of C' (the method only asks for a shortest
// known code of the required distance) and the deterministic choice of M (the
// method draws M at random until A is invertible and C reaches d_Payload) are
// this design's own, so the matrices differ from those of any other
// implementation with the same parameters.
package lcp_pkg;

  localparam int KMAX = 128;  // largest state width supported
  localparam int RMAX = 16;   // largest redundancy (BCH2 over GF(2^8))

  typedef enum logic [0:0] {
    LCP_BCH2   = 1'b0,
    LCP_PARITY = 1'b1
  } lcp_family_e;

  // k rows of r bits (used for M and for N^T)
  typedef logic [KMAX-1:0][RMAX-1:0] kr_mat_t;
  // r rows of r bits (used for A^-1)
  typedef logic [RMAX-1:0][RMAX-1:0] rr_mat_t;

  // Field degree for the BCH2 family.
  function automatic int bch_m(input int k);
    int m;
    m = 3;
    while (((1 << m) - 1) < (k + 2 * m)) m++;
    return m;
  endfunction

  // Redundancy r = n - k of a family for state width k.
  function automatic int code_r(input lcp_family_e fam, input int k);
    if (fam == LCP_PARITY) return 1;
    return 2 * bch_m(k);
  endfunction

  function automatic int dist_trigger(input lcp_family_e fam);
    return (fam == LCP_PARITY) ? 2 : 5;
  endfunction

  function automatic int dist_payload(input lcp_family_e fam);
    return (fam == LCP_PARITY) ? 1 : 3;
  endfunction

  // Primitive polynomial of GF(2^m), bit i = coefficient of x^i.
  function automatic logic [8:0] prim_poly(input int m);
    case (m)
      3:       return 9'h00B;  // x^3 + x + 1
      4:       return 9'h013;  // x^4 + x + 1
      5:       return 9'h025;  // x^5 + x^2 + 1
      6:       return 9'h043;  // x^6 + x + 1
      7:       return 9'h089;  // x^7 + x^3 + 1
      default: return 9'h11D;  // x^8 + x^4 + x^3 + x^2 + 1
    endcase
  endfunction

  // Product in GF(2^m), elements as polynomials in alpha.
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b, input int m);
    logic [8:0] p, acc, aa;
    p   = prim_poly(m);
    acc = '0;
    aa  = {1'b0, a};
    for (int i = 0; i < m; i++) begin
      if (b[i]) acc ^= aa;
      aa = aa << 1;
      if (aa[m]) aa ^= p;
    end
    return acc[7:0];
  endfunction

  // Minimal polynomial over GF(2) of alpha^3: product of (x + beta) over the
  // conjugates beta = alpha^(3*2^j).
  function automatic logic [8:0] min_poly3(input int m);
    logic [7:0] c [9];
    logic [7:0] beta, b, prev;
    logic [8:0] res;
    beta = 8'd1;
    for (int i = 0; i < 3; i++) beta = gf_mul(beta, 8'd2, m);
    for (int i = 0; i < 9; i++) c[i] = (i == 0) ? 8'd1 : 8'd0;
    b = beta;
    for (int j = 0; j < m; j++) begin
      // c(x) <- c(x) * (x + b); alpha^3 has m distinct conjugates for 3 <= m <= 8
      prev = 8'd0;
      for (int i = 0; i < 9; i++) begin
        logic [7:0] cur;
        cur  = c[i];
        c[i] = prev ^ gf_mul(cur, b, m);
        prev = cur;
      end
      b = gf_mul(b, b, m);
    end
    for (int i = 0; i < 9; i++) res[i] = c[i][0];
    return res;
  endfunction

  // Generator polynomial of the double-error-correcting BCH code.
  function automatic logic [16:0] bch2_gen(input int m);
    logic [8:0]  m1, m3;
    logic [16:0] g;
    m1 = prim_poly(m);
    m3 = min_poly3(m);
    g  = '0;
    for (int i = 0; i < 9; i++)
      if (m3[i]) g ^= 17'(m1) << i;
    return g;
  endfunction

  // N^T: row i is the r-bit row of H's left part seen from data bit i.
  function automatic kr_mat_t make_nt(input lcp_family_e fam, input int k);
    kr_mat_t    nt;
    logic [16:0] g, rem;
    int         r;
    nt = '0;
    r  = code_r(fam, k);
    if (fam == LCP_PARITY) begin
      for (int i = 0; i < k; i++) nt[i][0] = 1'b1;
    end else begin
      g   = bch2_gen(bch_m(k));
      rem = 17'd1;
      for (int i = 0; i < r; i++) begin
        rem = rem << 1;
        if (rem[r]) rem ^= g;
      end
      // rem = x^r mod g
      for (int i = 0; i < k; i++) begin
        nt[i] = rem[RMAX-1:0];
        rem   = rem << 1;
        if (rem[r]) rem ^= g;
      end
    end
    return nt;
  endfunction

  // M for a given candidate offset: distinct rows of weight >= 2, in order of
  // weight and then value (next value of equal weight by Gosper's rule).
  function automatic kr_mat_t make_m_off(input lcp_family_e fam, input int k, input int off);
    kr_mat_t m;
    int      r, w, idx;
    logic [31:0] v, c, s;
    m = '0;
    if (fam == LCP_PARITY) return m;
    r   = code_r(fam, k);
    w   = 2;
    v   = 32'd3;
    idx = 0;
    while (idx < k + off && w <= r) begin
      if (idx >= off) m[idx-off] = v[RMAX-1:0];
      idx++;
      c = v & (~v + 32'd1);
      s = v + c;
      v = (((s ^ v) >> 2) / c) | s;
      if (v >= (32'd1 << r)) begin
        w++;
        v = (32'd1 << w) - 32'd1;
      end
    end
    return m;
  endfunction

  // A = I_r ^ N*M. Row a is the XOR of the rows of M whose data bit i has
  // N[a][i] = 1.
  function automatic rr_mat_t make_a(input kr_mat_t nt, input kr_mat_t m, input int k, input int r);
    rr_mat_t a;
    a = '0;
    for (int j = 0; j < r; j++) a[j][j] = 1'b1;
    for (int i = 0; i < k; i++)
      for (int j = 0; j < r; j++)
        if (nt[i][j]) a[j] ^= m[i];
    return a;
  endfunction

  // Gauss-Jordan elimination over GF(2) of A, applied alongside to I_r.
  // Rows 0..RMAX-1 of the result hold A^-1 when A is invertible; row RMAX is
  // all ones when A is singular and zero otherwise.
  function automatic logic [RMAX:0][RMAX-1:0] gf2_inv_ext(input rr_mat_t a_in, input int r);
    rr_mat_t a, inv;
    logic [RMAX-1:0] t;
    logic [RMAX:0][RMAX-1:0] res;
    int  piv;
    bit  singular;
    a        = a_in;
    inv      = '0;
    singular = 1'b0;
    for (int j = 0; j < r; j++) inv[j][j] = 1'b1;
    for (int col = 0; col < r; col++) begin
      piv = -1;
      for (int row = col; row < r; row++)
        if (piv < 0 && a[row][col]) piv = row;
      if (piv < 0) begin
        singular = 1'b1;
      end else begin
        t = a[piv];   a[piv]   = a[col];   a[col]   = t;
        t = inv[piv]; inv[piv] = inv[col]; inv[col] = t;
        for (int row = 0; row < r; row++)
          if (row != col && a[row][col]) begin
            a[row]   ^= a[col];
            inv[row] ^= inv[col];
          end
      end
    end
    res = '0;
    for (int j = 0; j < RMAX; j++) res[j] = inv[j];
    res[RMAX] = {RMAX{singular}};
    return res;
  endfunction

  // Smallest candidate offset giving an invertible A (LCP condition);
  // -1 if none of the first 32 offsets does.
  function automatic int m_offset(input lcp_family_e fam, input int k);
    kr_mat_t nt, m;
    rr_mat_t a;
    logic [RMAX:0][RMAX-1:0] res;
    int      r, found;
    found = -1;
    if (fam != LCP_PARITY) begin
      r  = code_r(fam, k);
      nt = make_nt(fam, k);
      for (int off = 0; off < 32; off++) begin
        if (found < 0) begin
          m   = make_m_off(fam, k, off);
          a   = make_a(nt, m, k, r);
          res = gf2_inv_ext(a, r);
          if (res[RMAX] == '0) found = off;
        end
      end
    end else begin
      found = 0;
    end
    return found;
  endfunction

  function automatic kr_mat_t make_m(input lcp_family_e fam, input int k);
    int off;
    off = m_offset(fam, k);
    return make_m_off(fam, k, off);
  endfunction

  // A^-1 for the chosen M.
  function automatic rr_mat_t make_ainv(input lcp_family_e fam, input int k);
    kr_mat_t nt, m;
    rr_mat_t a, inv;
    logic [RMAX:0][RMAX-1:0] res;
    int      r;
    r   = code_r(fam, k);
    nt  = make_nt(fam, k);
    m   = make_m(fam, k);
    a   = make_a(nt, m, k, r);
    res = gf2_inv_ext(a, r);
    for (int j = 0; j < RMAX; j++) inv[j] = res[j];
    return inv;
  endfunction

  // x*G for a constant x (used for the encoded reset value x0*G).
  function automatic logic [KMAX+RMAX-1:0] encode_const(input lcp_family_e fam, input int k,
                                                        input logic [KMAX-1:0] x);
    logic [KMAX+RMAX-1:0] z;
    logic [RMAX-1:0]      p;
    kr_mat_t              m;
    m = make_m(fam, k);
    p = '0;
    z = '0;
    for (int i = 0; i < k; i++) begin
      z[i] = x[i];
      if (x[i]) p ^= m[i];
    end
    for (int j = 0; j < code_r(fam, k); j++) z[k+j] = p[j];
    return z;
  endfunction

endpackage
