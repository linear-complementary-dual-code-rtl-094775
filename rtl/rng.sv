// rng: the random number generator that supplies a fresh W-bit mask y every
// clock cycle (W = n - k). It is a 64-bit xorshift generator (shifts 13, 7,
// 17) stepped once per cycle, with the low W bits of its state as the output.
// With en = 0 the generator holds and the output is zero, which is the "RNG
// deactivated" mode in which the state is encoded but not masked. The
// encoding method only asks for n - k random bits per clock and leaves the
// source open; this pseudo-random generator is a stand-in chosen by this
// design. A product would use a true random source here.
// Reset loads the nonzero seed SEED.
module rng #(
  parameter int          W    = 14,
  parameter logic [63:0] SEED = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] rnd
);
  logic [63:0] s_q, s_n;

  always_comb begin
    s_n = s_q ^ (s_q << 13);
    s_n = s_n ^ (s_n >> 7);
    s_n = s_n ^ (s_n << 17);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s_q <= SEED;
    else if (en) s_q <= s_n;
  end

  assign rnd = en ? s_q[W-1:0] : '0;

  initial assert (SEED != 64'd0) else $error("rng: SEED must be nonzero");
  initial assert (W >= 1 && W <= 64) else $error("rng: W out of range");
endmodule
