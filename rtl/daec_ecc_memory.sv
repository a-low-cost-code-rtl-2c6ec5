// daec_ecc_memory -- memory protected against single and double adjacent bit
// upsets by a SEC-DED-DAEC code.
//
// Write path: the K-bit write data goes through the encoder, and the N-bit
// codeword (K data bits, R check bits) is stored in the array. Read path: the
// array registers the stored word, and the combinational decoder (syndrome
// generator and error correction logic) delivers the corrected data together
// with the error flags in the cycle after the read request. Stored words are
// not rewritten on a correction; the memory returns corrected data only.
//
// Timing: rd_en_i in cycle t gives rd_valid_o, rd_data_o and the flags in
// cycle t+1. Writes take effect at the clock edge.
//   rd_err_o  : syndrome non-zero (error detected)
//   rd_ue_o   : uncorrectable error detected
//   rd_sec_o  : a single-bit error was corrected
//   rd_daec_o : a double adjacent error was corrected
//   rd_syn_o  : the syndrome of the word read, for error logging
//
// The code sizes (K = 16, 32, 64 with R = 6, 7, 8) are the published ones,
// (22,16) the default. DEPTH is this design's choice: the method targets
// memories of any size, including small register files and buffers.
module daec_ecc_memory #(
  parameter int K     = 16,
  parameter int DEPTH = 64,
  parameter int R     = daec_pkg::check_bits(K),
  parameter int N     = K + R,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en_i,
  input  logic [AW-1:0] wr_addr_i,
  input  logic [K-1:0]  wr_data_i,
  input  logic          rd_en_i,
  input  logic [AW-1:0] rd_addr_i,
  output logic          rd_valid_o,
  output logic [K-1:0]  rd_data_o,
  output logic          rd_err_o,
  output logic          rd_ue_o,
  output logic          rd_sec_o,
  output logic          rd_daec_o,
  output logic [R-1:0]  rd_syn_o
);

  logic [N-1:0] wr_code;
  logic [N-1:0] rd_code;
  logic         dec_err, dec_ue, dec_sec, dec_daec;

  daec_encoder #(.K(K), .R(R), .N(N)) u_enc (
    .data_i (wr_data_i),
    .code_o (wr_code)
  );

  daec_mem_array #(.WIDTH(N), .DEPTH(DEPTH), .AW(AW)) u_array (
    .clk     (clk),
    .wr_en_i (wr_en_i),
    .waddr_i (wr_addr_i),
    .wdata_i (wr_code),
    .rd_en_i (rd_en_i),
    .raddr_i (rd_addr_i),
    .rdata_o (rd_code)
  );

  daec_decoder #(.K(K), .R(R), .N(N)) u_dec (
    .word_i (rd_code),
    .data_o (rd_data_o),
    .word_o (),
    .flip_o (),
    .syn_o  (rd_syn_o),
    .err_o  (dec_err),
    .ue_o   (dec_ue),
    .sec_o  (dec_sec),
    .daec_o (dec_daec)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid_o <= 1'b0;
    else        rd_valid_o <= rd_en_i;
  end

  // Flags are qualified with rd_valid_o so that stale array output never
  // raises an error indication.
  assign rd_err_o  = rd_valid_o & dec_err;
  assign rd_ue_o   = rd_valid_o & dec_ue;
  assign rd_sec_o  = rd_valid_o & dec_sec;
  assign rd_daec_o = rd_valid_o & dec_daec;

`ifndef SYNTHESIS
  // The decoder never reports both correction kinds, and an uncorrectable
  // error is never also a correction.
  always_ff @(posedge clk) begin
    if (rd_valid_o) begin
      assert (!(dec_sec && dec_daec)) else $error("single and adjacent match together");
      assert (!(dec_ue && (dec_sec || dec_daec))) else $error("UE with a correction");
      assert (dec_err || !(dec_sec || dec_daec)) else $error("correction without error");
    end
  end
`endif

endmodule
