// lcp_encoder: the data encoder G of the encoded circuit. It maps the k-bit
// next state x to the codeword x*G of the LCP data code C, G = (I_k | M):
// bits [K-1:0] of the result are x itself, bits [N-1:K] are the parity x*M.
// M is built at elaboration by lcp_pkg (distinct rows of weight >= 2, so C has
// minimum distance d_Payload = 3 for the BCH2 family). Purely combinational,
// no latency. Its output is XORed with the encoded mask y*H before it is
// stored.
module lcp_encoder
  import lcp_pkg::*;
#(
  parameter int          K      = 109,
  parameter lcp_family_e FAMILY = LCP_BCH2,
  localparam int         R      = code_r(FAMILY, K),
  localparam int         N      = K + R
) (
  input  logic [K-1:0] x,
  output logic [N-1:0] c
);
  localparam kr_mat_t M = make_m(FAMILY, K);

  logic [R-1:0] par;

  always_comb begin
    par = '0;
    for (int i = 0; i < K; i++)
      if (x[i]) par ^= M[i][R-1:0];
    c = {par, x};
  end
endmodule
