// daec_corrector -- syndrome decoder and error correction logic.
//
// For every word bit i the syndrome is compared with three patterns: the
// column H[i] (single error in bit i) and the pair sums H[i-1]^H[i] and
// H[i]^H[i+1] (double adjacent error covering bit i). The OR of the three
// matches is the decoder output for bit i, which flips that bit. Because the
// H-matrix has all columns and all adjacent-pair sums distinct, at most one
// pattern matches, so the flipped bits are exactly the single bit or the
// adjacent pair the syndrome names.
//
//   err_o  : OR of the syndrome bits, "error detected".
//   ue_o   : uncorrectable error, err_o AND the NOR of all N decoder outputs
//            (a non-zero syndrome that names no correctable pattern).
//   sec_o  : the syndrome matched a column (single error corrected).
//   daec_o : the syndrome matched an adjacent-pair sum (double adjacent error
//            corrected).
//
// The structure (per-bit three-way match and OR, OR for error detected,
// NOR/AND for UE) follows the published error correction logic; sec_o and
// daec_o are an addition of this design that reports which correction was
// made. A non-adjacent double error whose syndrome happens to equal an
// adjacent-pair sum is miscorrected; the code tables keep such cases rare.
//
// Interface: syn_i (R bits) and word_i (N bits) in; corrected word_o, flip_o
// (bits flipped) and the flags out. Combinational.
module daec_corrector #(
  parameter int K = 16,
  parameter int R = daec_pkg::check_bits(K),
  parameter int N = K + R
) (
  input  logic [R-1:0] syn_i,
  input  logic [N-1:0] word_i,
  output logic [N-1:0] word_o,
  output logic [N-1:0] flip_o,
  output logic         err_o,
  output logic         ue_o,
  output logic         sec_o,
  output logic         daec_o
);

  localparam daec_pkg::hmat_t H = daec_pkg::h_matrix(K);

  logic [N-1:0] m_single;  // syndrome equals column i
  logic [N-2:0] m_pair;    // syndrome equals H[i] ^ H[i+1]

  always_comb begin
    for (int i = 0; i < N; i++) begin
      m_single[i] = (syn_i == H[i][R-1:0]);
    end
    for (int i = 0; i < N - 1; i++) begin
      m_pair[i] = (syn_i == (H[i][R-1:0] ^ H[i+1][R-1:0]));
    end
  end

  // Decoder output for bit i: <i,i-1>, <i>, <i,i+1>.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      flip_o[i] = m_single[i];
      if (i > 0)     flip_o[i] = flip_o[i] | m_pair[i-1];
      if (i < N - 1) flip_o[i] = flip_o[i] | m_pair[i];
    end
  end

  assign word_o = word_i ^ flip_o;
  assign err_o  = |syn_i;
  assign ue_o   = err_o & ~(|flip_o);
  assign sec_o  = |m_single;
  assign daec_o = |m_pair;

endmodule
