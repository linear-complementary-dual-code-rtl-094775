// tb_alarm_check: checks the mask comparator: no alarm for equal masks, an
// alarm for every single-bit difference and for random differing pairs.
module tb_alarm_check;
  localparam int R = 14;
  logic [R-1:0] a, b;
  logic alarm;
  int checks = 0, failures = 0;

  alarm_check #(.R(R)) dut (.y_decoded(a), .y_stored(b), .alarm(alarm));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s a=%h b=%h", what, a, b);
    end
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      a = R'($urandom); b = a;
      #1 check(alarm == 1'b0, "equal masks");
      for (int i = 0; i < R; i++) begin
        b = a; b[i] = ~b[i];
        #1 check(alarm == 1'b1, "single-bit difference");
      end
      b = R'($urandom);
      #1 check(alarm == (a != b), "random pair");
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
