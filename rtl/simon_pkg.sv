// simon_pkg: state layout and round functions of the SIMON32/64 co-processor
// (16-bit words, 4 key words, 32 rounds, constant sequence z0).
//
// The whole sequential state of the co-processor is one packed struct of
// K = 109 bits, the number of flip-flops of the unprotected co-processor:
// the two data words x and y (32), the four key words of the key schedule
// window (64), a 5-bit round counter, a 5-bit LFSR that produces the round
// constant sequence z0, and a one-hot 3-state controller. Packing the state
// this way is this design's choice; the struct is what the LCP code encodes.
package simon_pkg;

  localparam int WORD   = 16;
  localparam int ROUNDS = 32;

  typedef enum logic [2:0] {
    S_IDLE = 3'b001,
    S_RUN  = 3'b010,
    S_DONE = 3'b100
  } simon_fsm_e;

  typedef struct packed {
    simon_fsm_e            fsm;
    logic [4:0]            round;
    logic [4:0]            zlfsr;  // z0[i+4:i], bit 0 is the constant of round i
    logic [3:0][WORD-1:0]  key;    // key[0] is the round key of the current round
    logic [WORD-1:0]       x;
    logic [WORD-1:0]       y;
  } simon_state_t;

  localparam int STATE_W = $bits(simon_state_t);

  // Reset state: idle, everything else zero.
  localparam simon_state_t STATE_RESET = '{fsm: S_IDLE, default: '0};

  // z0 = 11111010001001010110000111001101111101000100101011000011100110 obeys
  // z[i+5] = z[i] ^ z[i+1] ^ z[i+2] ^ z[i+4] and starts with five ones.
  localparam logic [4:0] ZLFSR_INIT = 5'b11111;

  function automatic logic [WORD-1:0] rotl(input logic [WORD-1:0] v, input int s);
    return (v << s) | (v >> (WORD - s));
  endfunction

  function automatic logic [WORD-1:0] rotr(input logic [WORD-1:0] v, input int s);
    return (v >> s) | (v << (WORD - s));
  endfunction

  // Round function f(x) = (S^1 x & S^8 x) ^ S^2 x.
  function automatic logic [WORD-1:0] simon_f(input logic [WORD-1:0] v);
    return (rotl(v, 1) & rotl(v, 8)) ^ rotl(v, 2);
  endfunction

  // Key schedule for four key words: k[i+4] from k[i], k[i+1], k[i+3], z[i].
  function automatic logic [WORD-1:0] simon_next_key(input logic [3:0][WORD-1:0] k, input logic z);
    logic [WORD-1:0] t;
    t = rotr(k[3], 3) ^ k[1];
    t = t ^ rotr(t, 1);
    return ~k[0] ^ t ^ {{(WORD-1){1'b0}}, z} ^ 16'h0003;
  endfunction

endpackage
