// daec_decoder -- SEC-DED-DAEC decoder: syndrome generator followed by the
// error correction logic.
//
// Takes an N-bit word read from memory, forms its syndrome and returns the
// corrected K-bit message. All single-bit errors and all errors in two
// adjacent bits are corrected; every other double error is detected (err_o),
// and flagged uncorrectable (ue_o) unless its syndrome aliases an adjacent
// pair. The decoder is one combinational path: XOR tree, comparators, OR and
// the correcting XOR, which is the same depth class as a plain SEC-DED decoder.
//
// Interface: word_i (N bits) in; data_o (K bits), word_o (corrected N-bit
// word), flip_o (bits flipped), syn_o, err_o, ue_o, sec_o, daec_o out.
// Combinational.
module daec_decoder #(
  parameter int K = 16,
  parameter int R = daec_pkg::check_bits(K),
  parameter int N = K + R
) (
  input  logic [N-1:0] word_i,
  output logic [K-1:0] data_o,
  output logic [N-1:0] word_o,
  output logic [N-1:0] flip_o,
  output logic [R-1:0] syn_o,
  output logic         err_o,
  output logic         ue_o,
  output logic         sec_o,
  output logic         daec_o
);

  daec_syndrome_gen #(.K(K), .R(R), .N(N)) u_syn (
    .word_i (word_i),
    .syn_o  (syn_o)
  );

  daec_corrector #(.K(K), .R(R), .N(N)) u_cor (
    .syn_i  (syn_o),
    .word_i (word_i),
    .word_o (word_o),
    .flip_o (flip_o),
    .err_o  (err_o),
    .ue_o   (ue_o),
    .sec_o  (sec_o),
    .daec_o (daec_o)
  );

  assign data_o = word_o[K-1:0];

endmodule
