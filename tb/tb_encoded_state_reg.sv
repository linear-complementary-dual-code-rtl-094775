// tb_encoded_state_reg: checks the encoded state register: the reset value
// and zero mask after an asynchronous reset, one-edge capture of z and y,
// and the synchronous reload of the reset value on recover.
module tb_encoded_state_reg;
  localparam int          N  = 123;
  localparam int          R  = 14;
  localparam logic [N-1:0] RV = {3'b101, 120'h0123_4567_89AB_CDEF_0011_2233_4455};

  logic clk = 1'b0, rst_n, recover;
  logic [N-1:0] z_d, z_q;
  logic [R-1:0] y_d, y_q;
  int checks = 0, failures = 0;

  encoded_state_reg #(.N(N), .R(R), .RESET_VALUE(RV)) dut (
    .clk(clk), .rst_n(rst_n), .recover(recover), .z_d(z_d), .y_d(y_d), .z_q(z_q), .y_q(y_q)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [N-1:0] rnd_n();
    return N'({$urandom, $urandom, $urandom, $urandom});
  endfunction

  initial begin
    rst_n = 1'b1; recover = 1'b0;
    z_d = rnd_n(); y_d = R'($urandom);
    #2 rst_n = 1'b0;
    #1;
    check(z_q == RV && y_q == '0, "asynchronous reset value");
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 100; i++) begin
      logic [N-1:0] zz;
      logic [R-1:0] yy;
      zz = rnd_n(); yy = R'($urandom);
      z_d = zz; y_d = yy;
      recover = (i % 7 == 3);
      @(negedge clk);
      if (i % 7 == 3) check(z_q == RV && y_q == '0, "recover reloads the reset value");
      else            check(z_q == zz && y_q == yy, "captured on the clock edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
