// tb_daec_encoder -- self-checking test of daec_encoder for the (22,16),
// (39,32) and (72,64) codes.
//
// Checks hand-computed (22,16) codewords, then for random messages of every
// size that the data bits pass unchanged and that the codeword has a zero
// syndrome under the reference H-matrix.
module tb_daec_encoder;
  import daec_pkg::*;
  import tb_daec_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [15:0] d16;  logic [21:0] c16;
  logic [31:0] d32;  logic [38:0] c32;
  logic [63:0] d64;  logic [71:0] c64;

  daec_encoder               u16 (.data_i(d16), .code_o(c16));
  daec_encoder #(.K(32))     u32 (.data_i(d32), .code_o(c32));
  daec_encoder #(.K(64))     u64 (.data_i(d64), .code_o(c64));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] gd [5] = '{16'h0001, 16'ha5c3, 16'hffff, 16'h1234, 16'h8000};
    logic [21:0] gc [5] = '{22'h0e0001, 22'h06a5c3, 22'h00ffff, 22'h291234, 22'h298000};
    for (int t = 0; t < 5; t++) begin
      d16 = gd[t];
      #1;
      check(c16 == gc[t], $sformatf("golden %h -> %h, want %h", gd[t], c16, gc[t]));
    end
    for (int t = 0; t < 3000; t++) begin
      logic [63:0] r;
      r = rand_data();
      d16 = r[15:0]; d32 = r[31:0]; d64 = r;
      #1;
      check(c16[15:0] == d16 && ref_syndrome(16, word_t'(c16)) == '0,
            $sformatf("k16 data %h code %h", d16, c16));
      check(c32[31:0] == d32 && ref_syndrome(32, word_t'(c32)) == '0,
            $sformatf("k32 data %h code %h", d32, c32));
      check(c64[63:0] == d64 && ref_syndrome(64, word_t'(c64)) == '0,
            $sformatf("k64 data %h code %h", d64, c64));
      check(word_t'(c64) == ref_encode(64, r), "k64 reference encoding");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
