// tb_encoded_simon: end-to-end test of the encoded SIMON32/64 co-processor at
// its default parameters ([123,109,5,3] code, recovery on alarm).
//  * encryptions: published test vector and random plaintexts/keys against
//    the independent reference model, with the 33-cycle start-to-done
//    latency, with the RNG on and off
//  * masking: the same encryption repeated with the RNG on leaves a different
//    register content each time, every one of the 123 register bits takes
//    both values at a fixed cycle, and no alarm is raised; with the RNG off
//    the register contents repeat exactly
//  * fault detection: every single-bit flip and random double-bit flips of the
//    encoded state register, and single-bit flips of the mask register,
//    injected in the middle of an encryption, raise alarm in that cycle;
//    the next edge then reloads the reset state (recovery), the co-processor
//    is idle, and a following encryption is correct
// Each mechanism is counted; one that never happened counts as a failure.
module tb_encoded_simon;
  import simon_ref_pkg::*;
  localparam int N = 123;
  localparam int R = 14;

  logic        clk = 1'b0, rst_n, rng_en, start;
  logic [31:0] pt, ct;
  logic [63:0] key;
  logic        busy, done, alarm;
  int checks = 0, failures = 0;
  int n_enc_rng = 0, n_enc_norng = 0, n_masked = 0, n_unmasked = 0;
  int n_alarm1 = 0, n_alarm2 = 0, n_alarm_y = 0, n_recover = 0;
  int n_false_alarm = 0;

  encoded_simon dut (
    .clk(clk), .rst_n(rst_n), .rng_en(rng_en), .start(start),
    .plaintext(pt), .key(key), .ciphertext(ct), .busy(busy), .done(done), .alarm(alarm)
  );

  always #5 clk = ~clk;

  // an alarm must never fire on its own
  logic injecting = 1'b0;
  always @(negedge clk)
    if (rst_n && alarm && !injecting) n_false_alarm++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // run one encryption; snap = register contents 10 cycles after start
  task automatic encrypt_one(input logic [31:0] p, input logic [63:0] k, output logic [N-1:0] snap);
    int cycles;
    logic [31:0] expect_ct;
    expect_ct = encrypt(p, k);
    @(negedge clk);
    check(!busy, "idle or done before start");
    pt = p; key = k; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 100) begin
      @(negedge clk);
      cycles++;
      if (cycles == 10) snap = dut.z_q;
    end
    check(cycles == 33, $sformatf("latency %0d, expected 33", cycles));
    check(ct == expect_ct, $sformatf("pt %h key %h: ct %h expected %h", p, k, ct, expect_ct));
    if (done && ct == expect_ct) begin
      if (rng_en) n_enc_rng++;
      else        n_enc_norng++;
    end
  endtask

  // flip bits of the stored state (e) and of the mask register (ey) for one
  // cycle in the middle of an encryption, then check alarm and recovery
  task automatic inject(input logic [N-1:0] e, input logic [R-1:0] ey, output bit raised);
    logic [N-1:0] zf;
    logic [R-1:0] yf;
    pt = $urandom; key = {$urandom, $urandom};
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat ($urandom_range(2, 25)) @(negedge clk);
    check(busy && !alarm, "running without alarm before the fault");
    injecting = 1'b1;
    zf = dut.z_q ^ e;
    yf = dut.y_q ^ ey;
    force dut.u_state.z_q = zf;
    force dut.u_state.y_q = yf;
    #1;
    raised = alarm;
    #3;
    release dut.u_state.z_q;
    release dut.u_state.y_q;
    @(negedge clk);
    injecting = 1'b0;
    check(!alarm && !busy && !done, "recovered to idle after the alarm");
    if (!alarm && !busy && !done) n_recover++;
  endtask

  initial begin
    logic [N-1:0] snap, snap0, ones, zeros;
    bit raised;
    rst_n = 1'b0; rng_en = 1'b1; start = 1'b0; pt = '0; key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(!busy && !done && !alarm, "idle after reset");

    // test vector, RNG on and off
    encrypt_one(32'h6565_6877, 64'h1918_1110_0908_0100, snap);
    rng_en = 1'b0;
    encrypt_one(32'h6565_6877, 64'h1918_1110_0908_0100, snap0);
    encrypt_one(32'h6565_6877, 64'h1918_1110_0908_0100, snap);
    check(snap == snap0, "without RNG the register contents repeat");
    if (snap == snap0) n_unmasked++;
    rng_en = 1'b1;

    // masking: same encryption repeated with the RNG on
    ones = '0; zeros = '0;
    for (int i = 0; i < 24; i++) begin
      encrypt_one(32'h6565_6877, 64'h1918_1110_0908_0100, snap);
      check(snap != snap0, "with RNG the register contents change");
      if (snap != snap0) n_masked++;
      ones  |= snap;
      zeros |= ~snap;
    end
    check(ones == '1 && zeros == '1, "every register bit takes both values under masking");

    // random encryptions
    for (int i = 0; i < 30; i++) begin
      rng_en = (i % 5 != 4);
      encrypt_one($urandom, {$urandom, $urandom}, snap);
    end
    rng_en = 1'b1;

    // single-bit faults on every register bit
    for (int i = 0; i < N; i++) begin
      logic [N-1:0] e;
      e = '0; e[i] = 1'b1;
      inject(e, '0, raised);
      check(raised, $sformatf("single-bit fault on z[%0d] raises alarm", i));
      if (raised) n_alarm1++;
    end
    // random double-bit faults
    for (int t = 0; t < 100; t++) begin
      logic [N-1:0] e;
      int i, j;
      i = $urandom_range(0, N - 1);
      j = (i + $urandom_range(1, N - 1)) % N;
      e = '0; e[i] = 1'b1; e[j] = 1'b1;
      inject(e, '0, raised);
      check(raised, $sformatf("double fault on z[%0d], z[%0d] raises alarm", i, j));
      if (raised) n_alarm2++;
    end
    // faults on the mask register
    for (int a = 0; a < R; a++) begin
      logic [R-1:0] ey;
      ey = '0; ey[a] = 1'b1;
      inject('0, ey, raised);
      check(raised, $sformatf("fault on mask bit %0d raises alarm", a));
      if (raised) n_alarm_y++;
    end
    // after all the faults, an encryption is still correct
    encrypt_one(32'h6565_6877, 64'h1918_1110_0908_0100, snap);

    check(n_false_alarm == 0, $sformatf("%0d alarms without a fault", n_false_alarm));
    $display("mechanisms: enc_rng=%0d enc_norng=%0d masked=%0d unmasked=%0d alarm1=%0d alarm2=%0d alarm_mask=%0d recover=%0d",
             n_enc_rng, n_enc_norng, n_masked, n_unmasked, n_alarm1, n_alarm2, n_alarm_y, n_recover);
    check(n_enc_rng > 0, "encryption with RNG happened");
    check(n_enc_norng > 0, "encryption without RNG happened");
    check(n_masked > 0, "masking happened");
    check(n_unmasked > 0, "unmasked repeat happened");
    check(n_alarm1 > 0, "single-bit alarm happened");
    check(n_alarm2 > 0, "double-bit alarm happened");
    check(n_alarm_y > 0, "mask-register alarm happened");
    check(n_recover > 0, "recovery happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
