// tb_daec_ref_pkg -- reference model used by the SEC-DED-DAEC testbenches.
//
// Works directly from the H-matrix tables, bit by bit, with no shared code
// with the RTL: the syndrome is the XOR of the columns of the set bits, an
// encoding is the data followed by the check bits that cancel its syndrome,
// and the expected decoder action is found by searching the columns and the
// adjacent-pair sums for the syndrome.
package tb_daec_ref_pkg;

  import daec_pkg::*;

  typedef logic [MAX_N-1:0] word_t;
  typedef enum int {CL_NONE, CL_SINGLE, CL_PAIR, CL_UE} cls_e;

  function automatic col_t ref_syndrome(int k, word_t w);
    hmat_t h = h_matrix(k);
    col_t  s = '0;
    for (int i = 0; i < k + check_bits(k); i++) begin
      if (w[i]) s ^= h[i];
    end
    return s;
  endfunction

  function automatic word_t ref_encode(int k, logic [MAX_K-1:0] d);
    word_t w = '0;
    col_t  s;
    for (int i = 0; i < k; i++) w[i] = d[i];
    s = ref_syndrome(k, w);
    for (int j = 0; j < check_bits(k); j++) w[k+j] = s[j];
    return w;
  endfunction

  // Expected decoder action for syndrome s: class and bits to flip.
  function automatic void ref_classify(int k, col_t s, output cls_e c, output word_t flip);
    hmat_t h = h_matrix(k);
    int    n = k + check_bits(k);
    flip = '0;
    c    = CL_UE;
    if (s == '0) begin
      c = CL_NONE;
      return;
    end
    for (int i = 0; i < n; i++) begin
      if (h[i] == s) begin
        c = CL_SINGLE;
        flip[i] = 1'b1;
        return;
      end
    end
    for (int i = 0; i < n - 1; i++) begin
      if ((h[i] ^ h[i+1]) == s) begin
        c = CL_PAIR;
        flip[i]   = 1'b1;
        flip[i+1] = 1'b1;
        return;
      end
    end
  endfunction

  function automatic logic [MAX_K-1:0] rand_data();
    return {$urandom(), $urandom()};
  endfunction

endpackage
