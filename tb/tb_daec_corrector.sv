// tb_daec_corrector -- self-checking test of daec_corrector.
//
// For each of the three code sizes every possible syndrome value is applied
// with a random word; the corrected word, the flipped bits and the four flags
// are compared with the reference search over columns and adjacent pairs.
// It also checks that every correctable class (none, single, adjacent pair,
// uncorrectable) occurred.
module tb_daec_corrector;
  import daec_pkg::*;
  import tb_daec_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  int seen [4];

  logic [5:0] s16;  logic [21:0] w16, o16, f16;  logic e16, u16f, sc16, dc16;
  logic [6:0] s32;  logic [38:0] w32, o32, f32;  logic e32, u32f, sc32, dc32;
  logic [7:0] s64;  logic [71:0] w64, o64, f64;  logic e64, u64f, sc64, dc64;

  daec_corrector u16 (.syn_i(s16), .word_i(w16), .word_o(o16), .flip_o(f16),
                      .err_o(e16), .ue_o(u16f), .sec_o(sc16), .daec_o(dc16));
  daec_corrector #(.K(32)) u32 (.syn_i(s32), .word_i(w32), .word_o(o32), .flip_o(f32),
                      .err_o(e32), .ue_o(u32f), .sec_o(sc32), .daec_o(dc32));
  daec_corrector #(.K(64)) u64 (.syn_i(s64), .word_i(w64), .word_o(o64), .flip_o(f64),
                      .err_o(e64), .ue_o(u64f), .sec_o(sc64), .daec_o(dc64));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic expect_out(int k, col_t s, word_t w, word_t o, word_t f,
                            logic e, logic u, logic sc, logic dc);
    cls_e  c;
    word_t ef;
    ref_classify(k, s, c, ef);
    seen[c]++;
    check(f == ef, $sformatf("k%0d syn %h flip %h want %h", k, s, f, ef));
    check(o == (w ^ ef), $sformatf("k%0d syn %h corrected word", k, s));
    check(e == (c != CL_NONE), $sformatf("k%0d syn %h err", k, s));
    check(u == (c == CL_UE), $sformatf("k%0d syn %h ue", k, s));
    check(sc == (c == CL_SINGLE), $sformatf("k%0d syn %h sec", k, s));
    check(dc == (c == CL_PAIR), $sformatf("k%0d syn %h daec", k, s));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      word_t r;
      r = {$urandom(), $urandom(), $urandom()};
      s64 = v[7:0]; w64 = r[71:0];
      s32 = v[6:0]; w32 = r[38:0];
      s16 = v[5:0]; w16 = r[21:0];
      #1;
      expect_out(64, col_t'(s64), word_t'(w64), word_t'(o64), word_t'(f64), e64, u64f, sc64, dc64);
      if (v < 128) expect_out(32, col_t'(s32), word_t'(w32), word_t'(o32), word_t'(f32), e32, u32f, sc32, dc32);
      if (v < 64)  expect_out(16, col_t'(s16), word_t'(w16), word_t'(o16), word_t'(f16), e16, u16f, sc16, dc16);
    end
    $display("classes seen: none=%0d single=%0d pair=%0d ue=%0d",
             seen[CL_NONE], seen[CL_SINGLE], seen[CL_PAIR], seen[CL_UE]);
    // 22+39+72 columns and 21+38+71 pairs, each syndrome value once
    check(seen[CL_NONE] == 3, "zero syndrome count");
    check(seen[CL_SINGLE] == 22 + 39 + 72, "single syndrome count");
    check(seen[CL_PAIR] == 21 + 38 + 71, "adjacent pair syndrome count");
    check(seen[CL_UE] > 0, "no uncorrectable syndrome seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
