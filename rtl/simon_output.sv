// simon_output: the output logic ("Combi" on the output side) of the
// SIMON32/64 co-processor. It is a Moore output function of the decoded
// state only: the ciphertext is the word pair {x, y}, valid while done is
// high; busy is high during the 32 round cycles. The ciphertext is forced to
// zero outside the done state so that intermediate round values do not reach
// the pins; that gating is this design's choice.
module simon_output
  import simon_pkg::*;
(
  input  simon_state_t cur,
  output logic [31:0]  ciphertext,
  output logic         busy,
  output logic         done
);
  always_comb begin
    done       = (cur.fsm == S_DONE);
    busy       = (cur.fsm == S_RUN);
    ciphertext = done ? {cur.x, cur.y} : 32'd0;
  end
endmodule
