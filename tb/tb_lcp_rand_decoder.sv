// tb_lcp_rand_decoder: checks the mask decoder K. For random x and y it must
// return y from z = x*G ^ y*H (BCH and parity families). Exhaustively over
// every error pattern of weight 1 and 2 on z (123 + 7503 patterns) the
// decoded mask must differ from y, which is the fault detection guarantee
// for d_Payload = 3; and a weight-3 codeword of C added to z must go
// unnoticed, showing that the bound is tight.
module tb_lcp_rand_decoder;
  import lcp_pkg::*;
  localparam int K = 109;
  localparam int R = 14;
  localparam int N = 123;

  logic [K-1:0] x, xw;
  logic [R-1:0] y, yd;
  logic         yp, ydp;
  logic [N-1:0] cg, ch, e, cw;
  logic [K:0]   cgp, chp;
  int checks = 0, failures = 0;

  lcp_encoder      #(.K(K), .FAMILY(LCP_BCH2))   enc_g (.x(x), .c(cg));
  lcp_rand_encoder #(.K(K), .FAMILY(LCP_BCH2))   enc_h (.y(y), .m(ch));
  lcp_rand_decoder #(.K(K), .FAMILY(LCP_BCH2))   dut   (.z(cg ^ ch ^ e), .y(yd));
  lcp_encoder      #(.K(K), .FAMILY(LCP_BCH2))   enc_w (.x(xw), .c(cw));
  lcp_encoder      #(.K(K), .FAMILY(LCP_PARITY)) enc_gp (.x(x), .c(cgp));
  lcp_rand_encoder #(.K(K), .FAMILY(LCP_PARITY)) enc_hp (.y(yp), .m(chp));
  lcp_rand_decoder #(.K(K), .FAMILY(LCP_PARITY)) dut_p  (.z(cgp ^ chp), .y(ydp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    e = '0; xw = '0;
    for (int t = 0; t < 500; t++) begin
      x  = K'({$urandom, $urandom, $urandom, $urandom});
      y  = R'($urandom);
      yp = 1'($urandom);
      #1;
      check(yd == y, "decoded mask");
      check(ydp == yp, "decoded mask, parity family");
    end
    x = K'({$urandom, $urandom, $urandom, $urandom});
    y = R'($urandom);
    for (int i = 0; i < N; i++) begin
      e = '0; e[i] = 1'b1;
      #1;
      check(yd != y, $sformatf("single-bit fault at %0d detected", i));
      for (int j = i + 1; j < N; j++) begin
        e = '0; e[i] = 1'b1; e[j] = 1'b1;
        #1;
        check(yd != y, $sformatf("double fault at %0d,%0d detected", i, j));
      end
    end
    // a weight-3 codeword of C: the codeword of some data bit whose row of M
    // has weight 2 (found by search), added to z, is invisible
    begin
      int found;
      found = -1;
      for (int i = 0; i < K; i++) begin
        xw = '0; xw[i] = 1'b1;
        #1;
        if (found < 0 && $countones(cw) == 3) found = i;
      end
      check(found >= 0, "C has a weight-3 codeword");
      if (found >= 0) begin
        xw = '0; xw[found] = 1'b1;
        #1;
        e = cw;
        #1;
        check(yd == y, "codeword-shaped fault of weight d_Payload is not detected");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
