// simon_next_state: the next-state logic ("Combi" on the input side) of the
// SIMON32/64 co-processor, with the flip-flops removed. It takes the decoded
// current state and the inputs and returns the next state, one round per
// clock:
//   idle or done, start = 1 : load x,y from plaintext and the four key words,
//                             round = 0, z0 LFSR = 11111, go to run
//   run                     : x <- y ^ f(x) ^ key[0], y <- x, slide the key
//                             window by one new schedule word, step the
//                             LFSR, round + 1; after round 31 go to done
//   any other value         : go to idle (a controller code that is not
//                             one-hot can only come from a corrupted state)
// An encryption therefore takes 1 load cycle and 32 round cycles. The
// one-round-per-cycle schedule and the start/done handshake are this
// design's choice; the cipher is SIMON32/64 as specified by its designers.
module simon_next_state
  import simon_pkg::*;
(
  input  simon_state_t  cur,
  input  logic          start,
  input  logic [31:0]   plaintext,
  input  logic [63:0]   key,
  output simon_state_t  nxt
);
  always_comb begin
    nxt = cur;
    unique case (cur.fsm)
      S_IDLE, S_DONE: begin
        if (start) begin
          nxt.fsm   = S_RUN;
          nxt.round = '0;
          nxt.zlfsr = ZLFSR_INIT;
          nxt.key   = key;
          nxt.x     = plaintext[31:16];
          nxt.y     = plaintext[15:0];
        end
      end
      S_RUN: begin
        nxt.x     = cur.y ^ simon_f(cur.x) ^ cur.key[0];
        nxt.y     = cur.x;
        nxt.key   = {simon_next_key(cur.key, cur.zlfsr[0]), cur.key[3:1]};
        nxt.zlfsr = {cur.zlfsr[0] ^ cur.zlfsr[1] ^ cur.zlfsr[2] ^ cur.zlfsr[4], cur.zlfsr[4:1]};
        nxt.round = cur.round + 5'd1;
        if (cur.round == 5'(ROUNDS - 1)) nxt.fsm = S_DONE;
      end
      default: nxt = STATE_RESET;
    endcase
  end
endmodule
