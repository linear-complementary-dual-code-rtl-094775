// tb_lcp_codes: the code modules at the nanoprocessor size, k = 37, where
// the BCH2 family gives the [49,37,5,3] code. Checks the length n = 49, the
// decoders' round trip for random state and mask, d_Payload = 3 exhaustively
// over data words of weight 1 and 2, alarm on every single and double error,
// and the dual distance via orthogonality of D to the shortened BCH code
// generated by g(x) = x^12+x^10+x^8+x^5+x^4+x^3+1 (0x1539, from x^6+x+1).
module tb_lcp_codes;
  import lcp_pkg::*;
  localparam int K = 37;
  localparam int R = 12;
  localparam int N = 49;
  localparam logic [R:0] G_POLY = 13'h1539;

  logic [K-1:0] x, xd, xa;
  logic [R-1:0] y, yd, ya;
  logic [N-1:0] cg, ch, e, ca, ma;
  int checks = 0, failures = 0;

  lcp_encoder      #(.K(K)) enc_g (.x(x), .c(cg));
  lcp_rand_encoder #(.K(K)) enc_h (.y(y), .m(ch));
  lcp_decoder      #(.K(K)) dec_j (.z(cg ^ ch ^ e), .x(xd));
  lcp_rand_decoder #(.K(K)) dec_k (.z(cg ^ ch ^ e), .y(yd));
  lcp_encoder      #(.K(K)) enc_a (.x(xa), .c(ca));
  lcp_rand_encoder #(.K(K)) enc_b (.y(ya), .m(ma));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [N-1:0] cprime_word(input int i);
    logic [N-1:0] poly, z;
    poly = N'(G_POLY) << i;
    for (int p = 0; p < N; p++) z[(p < R) ? (K + p) : (p - R)] = poly[p];
    return z;
  endfunction

  initial begin
    check(code_r(LCP_BCH2, K) == R && $bits(cg) == N, "code length 49");
    e = '0; xa = '0; ya = '0;
    for (int t = 0; t < 300; t++) begin
      x = K'({$urandom, $urandom}); y = R'($urandom);
      #1;
      check(xd == x && yd == y, "round trip");
    end
    for (int i = 0; i < N; i++)
      for (int j = i; j < N; j++) begin
        e = '0; e[i] = 1'b1; e[j] = 1'b1;
        #1;
        check(yd != y, "single or double error changes the decoded mask");
      end
    e = '0;
    for (int i = 0; i < K; i++)
      for (int j = i; j < K; j++) begin
        xa = '0; xa[i] = 1'b1; xa[j] = 1'b1;
        #1;
        check($countones(ca) >= 3, "codeword weight >= 3");
      end
    for (int a = 0; a < R; a++) begin
      ya = '0; ya[a] = 1'b1;
      #1;
      for (int i = 0; i < K; i++)
        check((^(ma & cprime_word(i))) == 1'b0, "D orthogonal to the BCH code");
    end
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
