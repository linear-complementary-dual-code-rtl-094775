// tb_simon_next_state: closes the next-state logic of the SIMON32/64
// co-processor through a plain register and checks encryptions against the
// published test vector and the independent reference model, the 33-cycle
// latency from start to done, that start is ignored while running, and that
// a non-one-hot controller code returns to idle.
module tb_simon_next_state;
  import simon_pkg::*;
  import simon_ref_pkg::*;

  logic         clk = 1'b0;
  logic         start;
  logic [31:0]  pt;
  logic [63:0]  key;
  simon_state_t cur, nxt;
  int           checks = 0, failures = 0;

  simon_next_state dut (.cur(cur), .start(start), .plaintext(pt), .key(key), .nxt(nxt));

  always #5 clk = ~clk;
  // register of the unencoded state; ld overrides it from the test sequence
  logic         ld;
  simon_state_t ld_val;
  always_ff @(posedge clk) cur <= ld ? ld_val : nxt;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_one(input logic [31:0] p, input logic [63:0] k, input logic [31:0] expect_ct);
    int cycles;
    @(negedge clk);
    pt = p; key = k; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    // start again while running: must be ignored
    pt = ~p; key = ~k; start = 1'b1;
    @(negedge clk);
    start = 1'b0; cycles++;
    while (cur.fsm != S_DONE && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == 33, $sformatf("latency %0d cycles, expected 33", cycles));
    check({cur.x, cur.y} == expect_ct,
          $sformatf("pt %h key %h: got %h expected %h", p, k, {cur.x, cur.y}, expect_ct));
    @(negedge clk);
    check(cur.fsm == S_DONE && {cur.x, cur.y} == expect_ct, "done state holds");
  endtask

  initial begin
    ld = 1'b1; ld_val = STATE_RESET;
    @(negedge clk);
    ld = 1'b0;
    start = 1'b0; pt = '0; key = '0;
    // published SIMON32/64 test vector
    check(encrypt(32'h6565_6877, 64'h1918_1110_0908_0100) == 32'hc69b_e9bb, "reference model test vector");
    run_one(32'h6565_6877, 64'h1918_1110_0908_0100, 32'hc69b_e9bb);
    for (int i = 0; i < 20; i++) begin
      logic [31:0] p;
      logic [63:0] k;
      p = $urandom;
      k = {$urandom, $urandom};
      run_one(p, k, encrypt(p, k));
    end
    // corrupted controller code
    @(negedge clk);
    ld_val = cur; ld_val.fsm = simon_fsm_e'(3'b011); ld = 1'b1;
    @(negedge clk);
    ld = 1'b0;
    #1;
    check(nxt == STATE_RESET, "invalid controller code goes to reset state");
    @(negedge clk);
    check(cur.fsm == S_IDLE, "idle after invalid code");
    // idle holds without start
    repeat (3) @(negedge clk);
    check(cur == STATE_RESET, "idle holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
