// daec_pkg -- parity-check (H) matrices of the SEC-DED-DAEC codes and the
// helper functions the encoder, syndrome generator and corrector share.
//
// A code is fixed by its r x n H-matrix H = [P | I]: the k data columns P come
// first, the r check columns form an identity matrix at the end, so the code is
// systematic (codeword bit i < k is data bit i, bit k+j is check bit j).
// Codeword bit index equals physical bit position: bits i and i+1 are
// neighbouring memory cells, which is what "adjacent" means for the code.
//
// A column is held as an r-bit number whose bit b is row b+1 of the matrix,
// so syndrome bit b is the XOR of the codeword bits whose column has bit b set.
//
// Each table below was chosen to satisfy these rules:
//   * every data column has odd weight (3, plus 5 for the (72,64) code) and the
//     check columns have weight 1, so no column is zero, all columns differ,
//     and no 3 or fewer columns sum to zero (no 2- or 3-cycles). A single
//     error therefore gives an odd-weight syndrome, a double error an even
//     non-zero one;
//   * the n-1 adjacent-pair sums H[i]^H[i+1] are all different (no forbidden
//     4-cycle), so every double adjacent error has a syndrome of its own;
//   * the row weights are balanced (8 per row for (22,16), 13-14 for (39,32),
//     28 for (72,64)), which gives the 48 / 96 / 224 two-input XOR gates and
//     logic depth 4 / 4 / 5 of the syndrome network;
//   * among all such matrices, few 4-cycles touch an adjacent pair, since each
//     one lets a non-adjacent double error alias an adjacent one and be
//     miscorrected. Counts of 4-cycles (total / forbidden / bad):
//     (22,16) 250 / 0 / 116, (39,32) 1363 / 0 / 363, (72,64) 8264 / 0 / 1230.
//   The selection rules follow the published construction; the particular
//   column order is this design's own result of that search.
package daec_pkg;

  localparam int MAX_K = 64;
  localparam int MAX_R = 8;
  localparam int MAX_N = MAX_K + MAX_R;

  typedef logic [MAX_R-1:0] col_t;
  typedef col_t             hmat_t [MAX_N];

  // Data columns of the (22,16) code, r = 6.
  localparam col_t H22_DATA [16] = '{
    8'h0e, 8'h34, 8'h19, 8'h2a, 8'h31, 8'h16, 8'h07, 8'h13,
    8'h2c, 8'h0d, 8'h38, 8'h26, 8'h1a, 8'h15, 8'h23, 8'h29
  };

  // Data columns of the (39,32) code, r = 7.
  localparam col_t H39_DATA [32] = '{
    8'h4c, 8'h68, 8'h34, 8'h52, 8'h07, 8'h38, 8'h62, 8'h19,
    8'h0e, 8'h49, 8'h1a, 8'h54, 8'h25, 8'h46, 8'h61, 8'h15,
    8'h29, 8'h32, 8'h0b, 8'h64, 8'h13, 8'h51, 8'h2c, 8'h23,
    8'h0d, 8'h26, 8'h58, 8'h31, 8'h43, 8'h1c, 8'h70, 8'h4a
  };

  // Data columns of the (72,64) code, r = 8 (48 of weight 3, 16 of weight 5).
  localparam col_t H72_DATA [64] = '{
    8'h94, 8'h7a, 8'h67, 8'ha4, 8'h26, 8'hd9, 8'h64, 8'h38,
    8'h43, 8'h4c, 8'he0, 8'h85, 8'h2c, 8'h92, 8'h68, 8'h52,
    8'h19, 8'h46, 8'h8c, 8'hba, 8'hc4, 8'h31, 8'h8a, 8'h1f,
    8'he9, 8'h4a, 8'h91, 8'h75, 8'h86, 8'h76, 8'ha1, 8'h0e,
    8'h23, 8'h0b, 8'hec, 8'h07, 8'h49, 8'hc2, 8'hb0, 8'hc7,
    8'h2a, 8'h98, 8'hab, 8'h34, 8'h83, 8'h25, 8'h70, 8'ha8,
    8'h51, 8'h9d, 8'h1a, 8'hce, 8'h54, 8'h89, 8'hd0, 8'h15,
    8'h61, 8'h1c, 8'hd5, 8'hb3, 8'h62, 8'h0d, 8'h32, 8'h5b
  };

  // Number of check bits for a supported message length (16, 32 or 64).
  // Any other length returns 0, which makes the instantiating module fail
  // to elaborate.
  function automatic int check_bits(int k);
    case (k)
      16:      return 6;
      32:      return 7;
      64:      return 8;
      default: return 0;
    endcase
  endfunction

  // Full H-matrix for message length k: data columns, then the identity
  // check part; entries beyond n = k + r are zero.
  function automatic hmat_t h_matrix(int k);
    hmat_t h;
    int    r;
    r = check_bits(k);
    for (int i = 0; i < MAX_N; i++) begin
      h[i] = '0;
    end
    for (int i = 0; i < k; i++) begin
      case (k)
        16:      h[i] = H22_DATA[i];
        32:      h[i] = H39_DATA[i];
        default: h[i] = H72_DATA[i];
      endcase
    end
    for (int j = 0; j < r; j++) begin
      h[k+j] = col_t'(1) << j;
    end
    return h;
  endfunction

endpackage
