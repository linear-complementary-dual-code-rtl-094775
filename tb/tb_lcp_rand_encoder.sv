// tb_lcp_rand_encoder: checks the mask encoder H at the [123,109,5,3] size and
// for the parity family. The mask code D must be the dual of the shortened
// BCH code C' generated by g(x) = x^14+x^9+x^8+x^6+x^5+x^4+x^2+x+1 (0x4377,
// the product of x^7+x^3+1 and the minimal polynomial of alpha^3), whose
// minimum distance 5 is the dual distance d_Trigger of D. The test checks
// every basis word of D against every basis word x^i*g(x) of C' (coordinates
// mapped as: polynomial coefficient p < 14 is stored bit 109+p, coefficient
// p >= 14 is stored bit p-14), that the top 14 bits carry the mask, that the
// encoding is linear, and, directly, that no 4 or fewer columns of H sum to
// zero: all columns are nonzero and distinct, no column is the sum of two
// others, and no two disjoint pairs of columns have the same sum (found with
// a table indexed by the 14-bit column value). That is exactly a dual
// distance of at least 5, so any 4 stored bits are uniformly masked. For the
// parity family yH must be all ones or all zeros.
module tb_lcp_rand_encoder;
  import lcp_pkg::*;
  localparam int K = 109;
  localparam int R = 14;
  localparam int N = 123;
  localparam logic [R:0] G_POLY = 15'h4377;

  logic [R-1:0] ya, yb, yab;
  logic [N-1:0] ma, mb, mab;
  logic         yp;
  logic [K:0]   mp;
  logic [N-1:0] basis [R];
  int checks = 0, failures = 0;
  logic [R-1:0] col [N];
  int           col_at [1 << R];   // column index with this value, or -1
  int           pair_a [1 << R];   // first pair seen with this sum, or -1
  int           pair_b [1 << R];

  lcp_rand_encoder #(.K(K), .FAMILY(LCP_BCH2)) dut_a (.y(ya), .m(ma));
  lcp_rand_encoder #(.K(K), .FAMILY(LCP_BCH2)) dut_b (.y(yb), .m(mb));
  lcp_rand_encoder #(.K(K), .FAMILY(LCP_BCH2)) dut_ab (.y(yab), .m(mab));
  lcp_rand_encoder #(.K(K), .FAMILY(LCP_PARITY)) dut_p (.y(yp), .m(mp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // codeword x^i * g(x) of C' in stored coordinates
  function automatic logic [N-1:0] cprime_word(input int i);
    logic [N-1:0] poly, z;
    poly = N'(G_POLY) << i;
    for (int p = 0; p < N; p++)
      z[(p < R) ? (K + p) : (p - R)] = poly[p];
    return z;
  endfunction

  initial begin
    for (int a = 0; a < R; a++) begin
      ya = '0; ya[a] = 1'b1;
      #1;
      basis[a] = ma;
      check(ma[N-1:K] == ya, "mask bits stored in top r bits");
      for (int i = 0; i < K; i++)
        check((^(ma & cprime_word(i))) == 1'b0,
              $sformatf("D basis %0d orthogonal to x^%0d g(x)", a, i));
    end
    // columns of H
    for (int j = 0; j < N; j++)
      for (int a = 0; a < R; a++) col[j][a] = basis[a][j];
    for (int v = 0; v < (1 << R); v++) begin
      col_at[v] = -1; pair_a[v] = -1; pair_b[v] = -1;
    end
    begin
      bit ok1, ok3, ok4;
      ok1 = 1'b1; ok3 = 1'b1; ok4 = 1'b1;
      for (int j = 0; j < N; j++) begin
        if (col[j] == '0 || col_at[col[j]] >= 0) ok1 = 1'b0;
        col_at[col[j]] = j;
      end
      check(ok1, "columns of H nonzero and distinct");
      for (int i = 0; i < N; i++)
        for (int j = i + 1; j < N; j++) begin
          logic [R-1:0] v;
          v = col[i] ^ col[j];
          if (col_at[v] >= 0) ok3 = 1'b0;
          if (pair_a[v] >= 0 && pair_a[v] != i && pair_a[v] != j &&
              pair_b[v] != i && pair_b[v] != j) ok4 = 1'b0;
          if (pair_a[v] < 0) begin
            pair_a[v] = i; pair_b[v] = j;
          end
        end
      check(ok3, "no three columns of H sum to zero");
      check(ok4, "no four columns of H sum to zero");
    end
    for (int t = 0; t < 200; t++) begin
      ya = R'($urandom); yb = R'($urandom); yab = ya ^ yb;
      #1;
      check(mab == (ma ^ mb), "mask encoding is linear");
      check((ya == '0) == (ma == '0), "only the zero mask encodes to zero");
    end
    yp = 1'b0; #1; check(mp == '0, "parity family, mask 0");
    yp = 1'b1; #1; check(mp == '1, "parity family, mask 1");
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
