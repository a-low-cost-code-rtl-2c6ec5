// tb_daec_code_metrics -- checks the three H-matrices in daec_pkg against
// the properties and cost figures the code is designed for.
//
// For (22,16), (39,32) and (72,64) it verifies: no zero and no repeated
// column, no 3-cycle, no forbidden 4-cycle (columns i,i+1,k,k+1 summing to
// zero); the two-input XOR count of the syndrome network (ones in H minus r)
// and its depth (ceil(log2(largest row weight))) equal the published 48/4,
// 96/4 and 224/5; and the number of bad 4-cycles (a 4-cycle i<j<k<m that
// has j=i+1, k=j+1 or m=k+1, but is not forbidden) is no higher than the
// published 118, 379 and 1316. Total, forbidden and bad counts are printed.
module tb_daec_code_metrics;
  import daec_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic measure(int k, int want_xor, int want_depth, int max_bad);
    hmat_t h = h_matrix(k);
    int r = check_bits(k);
    int n = k + r;
    int ones = 0, maxrow = 0, depth = 0;
    int dup = 0, c3 = 0, total = 0, forb = 0, bad = 0;
    for (int j = 0; j < r; j++) begin
      int w = 0;
      for (int i = 0; i < n; i++) w += int'(h[i][j]);
      ones += w;
      if (w > maxrow) maxrow = w;
    end
    while ((1 << depth) < maxrow) depth++;
    for (int a = 0; a < n; a++) begin
      if (h[a] == '0) dup++;
      for (int b = a + 1; b < n; b++) begin
        col_t sab = h[a] ^ h[b];
        if (sab == '0) dup++;
        for (int c = b + 1; c < n; c++) begin
          col_t sabc = sab ^ h[c];
          if (sabc == '0) c3++;
          for (int m = c + 1; m < n; m++) begin
            if (h[m] == sabc) begin
              total++;
              if (b == a + 1 && m == c + 1) forb++;
              else if (b == a + 1 || c == b + 1 || m == c + 1) bad++;
            end
          end
        end
      end
    end
    $display("(%0d,%0d): %0d XOR2, depth %0d, 4-cycles total %0d forbidden %0d bad %0d",
             n, k, ones - r, depth, total, forb, bad);
    check(dup == 0, $sformatf("k%0d zero or repeated column", k));
    check(c3 == 0, $sformatf("k%0d 3-cycle", k));
    check(forb == 0, $sformatf("k%0d forbidden 4-cycles %0d", k, forb));
    check(ones - r == want_xor, $sformatf("k%0d XOR count %0d want %0d", k, ones - r, want_xor));
    check(depth == want_depth, $sformatf("k%0d depth %0d want %0d", k, depth, want_depth));
    check(bad <= max_bad, $sformatf("k%0d bad 4-cycles %0d above %0d", k, bad, max_bad));
  endtask

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    measure(16, 48, 4, 118);
    measure(32, 96, 4, 379);
    measure(64, 224, 5, 1316);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
