// tb_lcp_decoder: checks the data decoder J. Random states x and masks y are
// encoded with the encoders G and H, z = x*G ^ y*H, and the decoder must
// return x whatever the mask, for the [123,109,5,3] code and for the
// [110,109,2,1] parity family; it also checks every single-bit state and
// every single-bit mask of the BCH code.
module tb_lcp_decoder;
  import lcp_pkg::*;
  localparam int K = 109;
  localparam int R = 14;
  localparam int N = 123;

  logic [K-1:0] x, xd, xdp;
  logic [R-1:0] y;
  logic         yp;
  logic [N-1:0] cg, ch;
  logic [K:0]   cgp, chp;
  int checks = 0, failures = 0;

  lcp_encoder      #(.K(K), .FAMILY(LCP_BCH2))   enc_g (.x(x), .c(cg));
  lcp_rand_encoder #(.K(K), .FAMILY(LCP_BCH2))   enc_h (.y(y), .m(ch));
  lcp_decoder      #(.K(K), .FAMILY(LCP_BCH2))   dut   (.z(cg ^ ch), .x(xd));
  lcp_encoder      #(.K(K), .FAMILY(LCP_PARITY)) enc_gp (.x(x), .c(cgp));
  lcp_rand_encoder #(.K(K), .FAMILY(LCP_PARITY)) enc_hp (.y(yp), .m(chp));
  lcp_decoder      #(.K(K), .FAMILY(LCP_PARITY)) dut_p  (.z(cgp ^ chp), .x(xdp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s x=%h y=%h", what, x, y);
    end
  endtask

  initial begin
    for (int t = 0; t < 500; t++) begin
      x  = K'({$urandom, $urandom, $urandom, $urandom});
      y  = R'($urandom);
      yp = 1'($urandom);
      #1;
      check(xd == x, "decoded state");
      check(xdp == x, "decoded state, parity family");
    end
    for (int i = 0; i < K; i++) begin
      x = '0; x[i] = 1'b1; y = '0;
      #1;
      check(xd == x, "single-bit state");
    end
    for (int a = 0; a < R; a++) begin
      x = '0; y = '0; y[a] = 1'b1;
      #1;
      check(xd == '0, "single-bit mask hides no state");
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
