// tb_daec_syndrome_gen -- self-checking test of daec_syndrome_gen for the
// three code sizes.
//
// Random words are compared with the reference syndrome; codewords must give
// zero and a single flipped bit must give exactly that bit's H column.
module tb_daec_syndrome_gen;
  import daec_pkg::*;
  import tb_daec_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [21:0] w16;  logic [5:0] s16;
  logic [38:0] w32;  logic [6:0] s32;
  logic [71:0] w64;  logic [7:0] s64;

  daec_syndrome_gen           u16 (.word_i(w16), .syn_o(s16));
  daec_syndrome_gen #(.K(32)) u32 (.word_i(w32), .syn_o(s32));
  daec_syndrome_gen #(.K(64)) u64 (.word_i(w64), .syn_o(s64));

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
    hmat_t h16, h32, h64;
    h16 = h_matrix(16); h32 = h_matrix(32); h64 = h_matrix(64);
    // random words
    for (int t = 0; t < 2000; t++) begin
      word_t r;
      r = {$urandom(), $urandom(), $urandom()};
      w16 = r[21:0]; w32 = r[38:0]; w64 = r[71:0];
      #1;
      check(s16 == ref_syndrome(16, word_t'(w16)), $sformatf("k16 %h -> %h", w16, s16));
      check(s32 == ref_syndrome(32, word_t'(w32)), $sformatf("k32 %h -> %h", w32, s32));
      check(s64 == ref_syndrome(64, word_t'(w64)), $sformatf("k64 %h -> %h", w64, s64));
    end
    // codewords and single errors
    for (int t = 0; t < 20; t++) begin
      word_t c16r, c32r, c64r;
      logic [63:0] d;
      d = rand_data();
      c16r = ref_encode(16, d); c32r = ref_encode(32, d); c64r = ref_encode(64, d);
      w16 = c16r[21:0]; w32 = c32r[38:0]; w64 = c64r[71:0];
      #1;
      check(s16 == 0 && s32 == 0 && s64 == 0, "codeword syndrome not zero");
      for (int i = 0; i < 72; i++) begin
        w64 = c64r[71:0] ^ (72'd1 << i);
        if (i < 39) w32 = c32r[38:0] ^ (39'd1 << i);
        if (i < 22) w16 = c16r[21:0] ^ (22'd1 << i);
        #1;
        check(s64 == h64[i][7:0], $sformatf("k64 single %0d", i));
        if (i < 39) check(s32 == h32[i][6:0], $sformatf("k32 single %0d", i));
        if (i < 22) check(s16 == h16[i][5:0], $sformatf("k16 single %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
