// tb_simon_output: checks the output logic of the co-processor for random
// states in each controller state: ciphertext {x, y} and done only in the
// done state, busy only while running, ciphertext zero otherwise.
module tb_simon_output;
  import simon_pkg::*;
  simon_state_t s;
  logic [31:0] ct;
  logic busy, done;
  int checks = 0, failures = 0;

  simon_output dut (.cur(s), .ciphertext(ct), .busy(busy), .done(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 300; t++) begin
      s = simon_state_t'({$urandom, $urandom, $urandom, $urandom});
      case (t % 3)
        0: s.fsm = S_IDLE;
        1: s.fsm = S_RUN;
        default: s.fsm = S_DONE;
      endcase
      #1;
      check(done == (t % 3 == 2), "done");
      check(busy == (t % 3 == 1), "busy");
      check(ct == ((t % 3 == 2) ? {s.x, s.y} : 32'd0), "ciphertext");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
