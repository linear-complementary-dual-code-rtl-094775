// tb_rng: checks the mask generator against an independent xorshift64
// reference (shifts 13, 7, 17 on a 64-bit state, output = low 14 bits): the
// seed after reset, the stream while enabled, zero output and a held state
// while disabled, and the continuation of the stream after re-enabling.
module tb_rng;
  localparam int          W    = 14;
  localparam logic [63:0] SEED = 64'h9E37_79B9_7F4A_7C15;

  logic clk = 1'b0, rst_n, en;
  logic [W-1:0] rnd;
  logic [63:0]  ref_s;
  int checks = 0, failures = 0, changes = 0;
  logic [W-1:0] prev;

  rng #(.W(W), .SEED(SEED)) dut (.clk(clk), .rst_n(rst_n), .en(en), .rnd(rnd));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [63:0] step(input logic [63:0] s);
    logic [63:0] t;
    t = s;
    t ^= t << 13;
    t ^= t >> 7;
    t ^= t << 17;
    return t;
  endfunction

  initial begin
    rst_n = 1'b0; en = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    ref_s = SEED;
    check(rnd == '0, "disabled output is zero");
    en = 1'b1;
    #1;
    check(rnd == ref_s[W-1:0], "first output is the seed");
    prev = rnd;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ref_s = step(ref_s);
      check(rnd == ref_s[W-1:0], $sformatf("output %0d", i));
      if (rnd != prev) changes++;
      prev = rnd;
      if (i == 150) begin
        en = 1'b0;
        repeat (5) begin
          @(negedge clk);
          check(rnd == '0, "disabled output is zero");
        end
        en = 1'b1;
        #1;
        check(rnd == ref_s[W-1:0], "state held while disabled");
      end
    end
    check(changes > 290, "fresh value almost every cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
