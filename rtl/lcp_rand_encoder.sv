// lcp_rand_encoder: the random encoder H of the encoded circuit. It maps the
// r-bit mask y from the random number generator to y*H, H = (N | I_r), a word
// of the mask code D. Bits [N-1:K] of the result are y itself, bit i < K is
// the parity of y over row i of N^T. For the BCH2 family D is the dual of a
// shortened [n,k,5] BCH code, so any d_Trigger - 1 = 4 bits of the masked
// state are uniformly distributed whatever the data. Purely combinational.
module lcp_rand_encoder
  import lcp_pkg::*;
#(
  parameter int          K      = 109,
  parameter lcp_family_e FAMILY = LCP_BCH2,
  localparam int         R      = code_r(FAMILY, K),
  localparam int         N      = K + R
) (
  input  logic [R-1:0] y,
  output logic [N-1:0] m
);
  localparam kr_mat_t NT = make_nt(FAMILY, K);

  always_comb begin
    for (int i = 0; i < K; i++) m[i] = ^(y & NT[i][R-1:0]);
    m[N-1:K] = y;
  end
endmodule
