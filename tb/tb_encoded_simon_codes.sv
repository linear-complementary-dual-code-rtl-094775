// tb_encoded_simon_codes: the encoded co-processor in two further settings.
//  * [110,109,2,1] parity code (FAMILY = LCP_PARITY): encryptions are
//    correct with the RNG on and off; every stored bit takes both values
//    under masking (d_Trigger = 2); a flip of the mask bit raises alarm,
//    while a flip of a data bit goes unnoticed, as d_Payload = 1 promises no
//    detection.
//  * [123,109,5,3] code with RECOVER = 0: a single-bit fault raises alarm in
//    its cycle only (alarm-only mode, one alarm pulse per faulty cycle): the
//    next edge re-encodes the decoded, corrupted state as a valid word, and
//    the co-processor is not reset. It then ends in done or idle, depending
//    on which state bits the fault corrupted.
module tb_encoded_simon_codes;
  import lcp_pkg::*;
  import simon_ref_pkg::*;
  localparam int NP = 110;

  logic        clk = 1'b0, rst_n, rng_en, start;
  logic [31:0] pt, ct_p, ct_n;
  logic [63:0] key;
  logic        busy_p, done_p, alarm_p, busy_n, done_n, alarm_n;
  int checks = 0, failures = 0;
  int n_det_mask = 0, n_undet_data = 0, n_pulse = 0, n_runon = 0, n_enc = 0;

  encoded_simon #(.FAMILY(LCP_PARITY)) dut_p (
    .clk(clk), .rst_n(rst_n), .rng_en(rng_en), .start(start), .plaintext(pt), .key(key),
    .ciphertext(ct_p), .busy(busy_p), .done(done_p), .alarm(alarm_p)
  );
  encoded_simon #(.FAMILY(LCP_BCH2), .RECOVER(1'b0)) dut_n (
    .clk(clk), .rst_n(rst_n), .rng_en(rng_en), .start(start), .plaintext(pt), .key(key),
    .ciphertext(ct_n), .busy(busy_n), .done(done_n), .alarm(alarm_n)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic go(input logic [31:0] p, input logic [63:0] k);
    @(negedge clk);
    pt = p; key = k; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
  endtask

  initial begin
    logic [NP-1:0] ones, zeros;
    logic [31:0] p;
    logic [63:0] k;
    rst_n = 1'b0; rng_en = 1'b1; start = 1'b0; pt = '0; key = '0;
    ones = '0; zeros = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // plain encryptions on both instances
    for (int i = 0; i < 20; i++) begin
      rng_en = (i % 4 != 3);
      p = (i == 0) ? 32'h6565_6877 : $urandom;
      k = (i == 0) ? 64'h1918_1110_0908_0100 : {$urandom, $urandom};
      go(p, k);
      repeat (10) @(negedge clk);
      if (rng_en) begin
        ones |= dut_p.z_q;
        zeros |= ~dut_p.z_q;
      end
      repeat (22) @(negedge clk);
      check(done_p && ct_p == encrypt(p, k), "parity code: ciphertext after 33 cycles");
      check(done_n && ct_n == encrypt(p, k), "BCH code: ciphertext after 33 cycles");
      check(!alarm_p && !alarm_n, "no alarm without a fault");
      if (done_p && ct_p == encrypt(p, k)) n_enc++;
    end
    rng_en = 1'b1;
    check(ones == '1 && zeros == '1, "parity code: every stored bit masked");

    // parity code: mask-bit flip detected, data-bit flip not detected
    for (int t = 0; t < 20; t++) begin
      logic [NP-1:0] zf;
      int bitpos;
      bitpos = (t % 2 == 0) ? (NP - 1) : $urandom_range(0, NP - 2);
      go($urandom, {$urandom, $urandom});
      repeat (5) @(negedge clk);
      zf = dut_p.z_q;
      zf[bitpos] = ~zf[bitpos];
      force dut_p.u_state.z_q = zf;
      #1;
      if (bitpos == NP - 1) begin
        check(alarm_p, "parity code: mask bit flip raises alarm");
        if (alarm_p) n_det_mask++;
      end else begin
        check(!alarm_p, "parity code: data bit flip is below d_Payload = 1 and unseen");
        if (!alarm_p) n_undet_data++;
      end
      #3;
      release dut_p.u_state.z_q;
      repeat (30) @(negedge clk);
    end

    // BCH code without recovery: alarm pulse, computation runs on
    for (int t = 0; t < 20; t++) begin
      logic [122:0] zf;
      int cyc;
      go($urandom, {$urandom, $urandom});
      repeat (5) @(negedge clk);
      zf = dut_n.z_q;
      zf[$urandom_range(0, 122)] ^= 1'b1;
      force dut_n.u_state.z_q = zf;
      #1;
      check(alarm_n, "alarm raised without recovery");
      #3;
      release dut_n.u_state.z_q;
      @(negedge clk);
      check(!alarm_n, "alarm is a one-cycle pulse");
      if (!alarm_n) n_pulse++;
      if (busy_n) n_runon++;   // not reset: still running after the fault
      cyc = 0;
      while (busy_n && cyc < 40) begin
        @(negedge clk);
        check(!alarm_n, "no further alarm");
        cyc++;
      end
      check(!busy_n, "co-processor leaves the running state");
    end

    $display("mechanisms: enc=%0d det_mask=%0d undet_data=%0d pulse=%0d runon=%0d",
             n_enc, n_det_mask, n_undet_data, n_pulse, n_runon);
    check(n_enc > 0 && n_det_mask > 0 && n_undet_data > 0 && n_pulse > 0 && n_runon > 0,
          "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
