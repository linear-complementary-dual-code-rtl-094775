// lcp_rand_decoder: the random decoder K of the encoded circuit. From a stored
// word z = x*G ^ y*H it recovers the mask y. With z1 = z[K-1:0] and
// z2 = z[N-1:K], z2 ^ z1*M = y*(I_r ^ N*M) = y*A, so y = (z2 ^ z1*M)*A^-1;
// this is z*K with K = (M*A^-1 ; A^-1), the lower right block of the inverse
// of (G;H). A^-1 is computed at elaboration by lcp_pkg. A word that is not
// x*G ^ y*H for the registered y (a fault of weight below d_Payload, or an
// altered mask) yields a different y. Purely combinational.
module lcp_rand_decoder
  import lcp_pkg::*;
#(
  parameter int          K      = 109,
  parameter lcp_family_e FAMILY = LCP_BCH2,
  localparam int         R      = code_r(FAMILY, K),
  localparam int         N      = K + R
) (
  input  logic [N-1:0] z,
  output logic [R-1:0] y
);
  localparam kr_mat_t M    = make_m(FAMILY, K);
  localparam rr_mat_t AINV = make_ainv(FAMILY, K);

  logic [R-1:0] s;

  always_comb begin
    s = z[N-1:K];
    for (int i = 0; i < K; i++)
      if (z[i]) s ^= M[i][R-1:0];
    y = '0;
    for (int j = 0; j < R; j++)
      if (s[j]) y ^= AINV[j][R-1:0];
  end
endmodule
