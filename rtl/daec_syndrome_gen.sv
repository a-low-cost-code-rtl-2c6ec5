// daec_syndrome_gen -- syndrome generator of the SEC-DED-DAEC decoder.
//
// Computes the R-bit syndrome S = H.V^T of an N-bit word V read from memory:
// syndrome bit j is the XOR of every word bit whose H-matrix column has row j
// set. S is zero for a codeword; otherwise it equals the XOR of the H columns
// of the flipped bits. For the (22,16) code each syndrome bit is a 9-input
// XOR, 48 two-input gates in all with a depth of 4.
//
// Interface: word_i (N bits) in, syn_o (R bits) out. Combinational.
module daec_syndrome_gen #(
  parameter int K = 16,
  parameter int R = daec_pkg::check_bits(K),
  parameter int N = K + R
) (
  input  logic [N-1:0] word_i,
  output logic [R-1:0] syn_o
);

  localparam daec_pkg::hmat_t H = daec_pkg::h_matrix(K);

  always_comb begin
    syn_o = '0;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < R; j++) begin
        if (H[i][j]) syn_o[j] = syn_o[j] ^ word_i[i];
      end
    end
  end

endmodule
