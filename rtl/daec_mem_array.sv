// daec_mem_array -- storage array for the protected codewords.
//
// A DEPTH x WIDTH memory with one write port and one read port, both
// synchronous to clk. A write stores wdata_i at waddr_i on the rising edge;
// a read registers mem[raddr_i] into rdata_o on the rising edge, so read data
// appears one cycle after rd_en_i. A read and a write of the same address in
// the same cycle return the old contents. The array has no reset: its words
// hold whatever was last written (or the power-up state).
//
// The array models the memory the code protects (an SRAM, register file or
// buffer); its organisation is this design's choice. Bits of a word sit next
// to each other in bit-index order, with no interleaving, so a particle
// strike along a row upsets neighbouring bits of one word.
module daec_mem_array #(
  parameter int WIDTH = 22,
  parameter int DEPTH = 64,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en_i,
  input  logic [AW-1:0]    waddr_i,
  input  logic [WIDTH-1:0] wdata_i,
  input  logic             rd_en_i,
  input  logic [AW-1:0]    raddr_i,
  output logic [WIDTH-1:0] rdata_o
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en_i) mem[waddr_i] <= wdata_i;
  end

  always_ff @(posedge clk) begin
    if (rd_en_i) rdata_o <= mem[raddr_i];
  end

endmodule
