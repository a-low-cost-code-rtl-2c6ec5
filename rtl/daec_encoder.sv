// daec_encoder -- systematic SEC-DED-DAEC encoder.
//
// Turns a K-bit message into an N = K + R bit codeword. The message is copied
// to codeword bits [K-1:0]; check bit j (codeword bit K+j) is the XOR of every
// message bit whose H-matrix column has row j set. That is the XOR network of
// the generator matrix G = [I | P^T] belonging to H = [P | I], so every
// codeword C satisfies H.C^T = 0. With the balanced tables in daec_pkg each
// check bit of the (22,16) code is an 8-input XOR (depth 3).
//
// Interface: data_i (K bits) in, code_o (N bits) out. Purely combinational,
// no clock. K must be 16, 32 or 64 (the codes held in daec_pkg).
module daec_encoder #(
  parameter int K = 16,
  parameter int R = daec_pkg::check_bits(K),
  parameter int N = K + R
) (
  input  logic [K-1:0] data_i,
  output logic [N-1:0] code_o
);

  localparam daec_pkg::hmat_t H = daec_pkg::h_matrix(K);

  logic [R-1:0] check;

  always_comb begin
    check = '0;
    for (int i = 0; i < K; i++) begin
      for (int j = 0; j < R; j++) begin
        if (H[i][j]) check[j] = check[j] ^ data_i[i];
      end
    end
  end

  assign code_o = {check, data_i};

endmodule
