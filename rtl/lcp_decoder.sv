// lcp_decoder: the data decoder J of the encoded circuit. From a stored word
// z = x*G ^ y*H it recovers the k-bit state x, which feeds the original
// circuit's combinational logic. It first recovers the mask,
// y = (z2 ^ z1*M)*A^-1 as in lcp_rand_decoder, then removes the mask from the
// systematic part: x = z1 ^ y*N. This equals z*J with
// J = ((I_k ^ M*N)^-1 ; N*(I_k ^ M*N)^-1); the factored form needs only the
// r x r inverse A^-1 = (I_r ^ N*M)^-1 and is this design's choice. Purely
// combinational.
module lcp_decoder
  import lcp_pkg::*;
#(
  parameter int          K      = 109,
  parameter lcp_family_e FAMILY = LCP_BCH2,
  localparam int         R      = code_r(FAMILY, K),
  localparam int         N      = K + R
) (
  input  logic [N-1:0] z,
  output logic [K-1:0] x
);
  localparam kr_mat_t M    = make_m(FAMILY, K);
  localparam kr_mat_t NT   = make_nt(FAMILY, K);
  localparam rr_mat_t AINV = make_ainv(FAMILY, K);

  logic [R-1:0] s, y;

  always_comb begin
    s = z[N-1:K];
    for (int i = 0; i < K; i++)
      if (z[i]) s ^= M[i][R-1:0];
    y = '0;
    for (int j = 0; j < R; j++)
      if (s[j]) y ^= AINV[j][R-1:0];
    for (int i = 0; i < K; i++) x[i] = z[i] ^ (^(y & NT[i][R-1:0]));
  end
endmodule
