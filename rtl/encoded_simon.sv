// encoded_simon: SIMON32/64 co-processor protected as an "encoded circuit".
//
// Every flip-flop of the co-processor (K = 109 bits of state) is replaced by
// an n-bit register that holds z = x*G ^ y*H: the state x encoded by the LCP
// data code C and masked by a fresh random y encoded by the mask code D
// (default [123,109,5,3]: a Trojan trigger reading fewer than 5 register bits
// learns nothing about x; a payload flipping fewer than 3 bits leaves an
// invalid word). Each cycle:
//   x     = J(z)                  decoder in front of the next-state logic
//   x'    = next_state(x, inputs) original combinational logic
//   z'    = G(x') ^ H(y')         y' fresh from the RNG, stored with z'
//   alarm = K(z) != y             mask decoded from z against the stored y
// The outputs come from a second decoder J feeding the original output logic.
// With RECOVER = 1 an alarm makes the next edge reload the encoded reset
// state (the encryption in progress is abandoned and the co-processor
// returns to idle); with RECOVER = 0 the alarm is only reported.
//
// Interface: start (one cycle, while idle or done) with plaintext and key;
// done rises 33 cycles later with the ciphertext, and stays until the next
// start. rng_en = 0 disables masking (y = 0). Reset is asynchronous, active
// low. The structure follows the encoded-circuit architecture; the code
// construction, RNG, recovery choice and handshake are this design's own.
module encoded_simon
  import lcp_pkg::*;
  import simon_pkg::*;
#(
  parameter lcp_family_e FAMILY  = LCP_BCH2,
  parameter bit          RECOVER = 1'b1,
  localparam int         K       = STATE_W,
  localparam int         R       = code_r(FAMILY, K),
  localparam int         N       = K + R
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rng_en,
  input  logic        start,
  input  logic [31:0] plaintext,
  input  logic [63:0] key,
  output logic [31:0] ciphertext,
  output logic        busy,
  output logic        done,
  output logic        alarm
);
  localparam logic [KMAX+RMAX-1:0] Z_RESET_EXT =
    encode_const(FAMILY, K, KMAX'(STATE_RESET));
  localparam logic [N-1:0] Z_RESET = Z_RESET_EXT[N-1:0];

  logic [N-1:0] z_q, z_d, c_data, c_mask;
  logic [R-1:0] y_q, y_new, y_dec;
  logic [K-1:0] x_in, x_out;
  simon_state_t cur_in, cur_out, nxt;

  // input side: decode, original next-state logic, encode and mask
  lcp_decoder #(.K(K), .FAMILY(FAMILY)) u_dec_in (.z(z_q), .x(x_in));
  assign cur_in = simon_state_t'(x_in);

  simon_next_state u_next (
    .cur(cur_in), .start(start), .plaintext(plaintext), .key(key), .nxt(nxt)
  );

  rng #(.W(R)) u_rng (.clk(clk), .rst_n(rst_n), .en(rng_en), .rnd(y_new));

  lcp_encoder      #(.K(K), .FAMILY(FAMILY)) u_enc_g (.x(K'(nxt)), .c(c_data));
  lcp_rand_encoder #(.K(K), .FAMILY(FAMILY)) u_enc_h (.y(y_new), .m(c_mask));
  assign z_d = c_data ^ c_mask;

  // sequential part
  encoded_state_reg #(.N(N), .R(R), .RESET_VALUE(Z_RESET)) u_state (
    .clk(clk), .rst_n(rst_n), .recover(RECOVER && alarm),
    .z_d(z_d), .y_d(y_new), .z_q(z_q), .y_q(y_q)
  );

  // fault detection
  lcp_rand_decoder #(.K(K), .FAMILY(FAMILY)) u_dec_k (.z(z_q), .y(y_dec));
  alarm_check #(.R(R)) u_alarm (.y_decoded(y_dec), .y_stored(y_q), .alarm(alarm));

  // output side: decode, original output logic
  lcp_decoder #(.K(K), .FAMILY(FAMILY)) u_dec_out (.z(z_q), .x(x_out));
  assign cur_out = simon_state_t'(x_out);

  simon_output u_out (.cur(cur_out), .ciphertext(ciphertext), .busy(busy), .done(done));
endmodule
