// tb_lcp_encoder: checks the data encoder G at the [123,109,5,3] size and the
// [110,109,2,1] parity family. For G = (I | M) it checks that the low k bits
// are the data, that encoding is linear, and, exhaustively over all data
// words of weight 1 and 2, that every nonzero codeword has weight >= 3 (so
// the minimum distance d_Payload is at least 3; words of weight >= 3 have it
// trivially). For the parity family the parity bit must be zero (d_Payload =
// 1).
module tb_lcp_encoder;
  import lcp_pkg::*;
  localparam int K = 109;
  localparam int N = 123;

  logic [K-1:0] xa, xb, xab;
  logic [N-1:0] ca, cb, cab;
  logic [K-1:0] xp;
  logic [K:0]   cp;
  int checks = 0, failures = 0;
  int minw;

  lcp_encoder #(.K(K), .FAMILY(LCP_BCH2)) dut_a (.x(xa), .c(ca));
  lcp_encoder #(.K(K), .FAMILY(LCP_BCH2)) dut_b (.x(xb), .c(cb));
  lcp_encoder #(.K(K), .FAMILY(LCP_BCH2)) dut_ab (.x(xab), .c(cab));
  lcp_encoder #(.K(K), .FAMILY(LCP_PARITY)) dut_p (.x(xp), .c(cp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [K-1:0] rnd_k();
    return K'({$urandom, $urandom, $urandom, $urandom});
  endfunction

  initial begin
    for (int t = 0; t < 200; t++) begin
      xa = rnd_k(); xb = rnd_k(); xab = xa ^ xb; xp = xa;
      #1;
      check(ca[K-1:0] == xa, "systematic part equals data");
      check(cab == (ca ^ cb), "encoding is linear");
      check(cp == {1'b0, xa}, "parity family: data plus zero parity bit");
    end
    minw = N;
    for (int i = 0; i < K; i++) begin
      xa = '0; xa[i] = 1'b1;
      #1;
      if ($countones(ca) < minw) minw = $countones(ca);
      check($countones(ca) >= 3, $sformatf("weight of codeword of e%0d", i));
      for (int j = i + 1; j < K; j++) begin
        xb = '0; xb[i] = 1'b1; xb[j] = 1'b1;
        #1;
        if ($countones(cb) < minw) minw = $countones(cb);
        check($countones(cb) >= 3, $sformatf("weight of codeword of e%0d+e%0d", i, j));
      end
    end
    $display("minimum weight over data words of weight 1 and 2: %0d", minw);
    check(minw == 3, "d_Payload is exactly 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
