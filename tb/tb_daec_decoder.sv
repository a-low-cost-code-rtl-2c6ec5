// tb_daec_decoder -- self-checking test of daec_decoder on the (22,16),
// (39,32) and (72,64) codes.
//
// For random messages, every error pattern of weight one and two is applied
// to the codeword: no error, each single error, each adjacent pair and each
// non-adjacent pair. Singles and adjacent pairs must be corrected back to
// the message with the right flag; non-adjacent pairs must raise err_o and
// either ue_o or, where their syndrome equals an adjacent-pair sum, the
// reference miscorrection. The number of such aliasing pairs per code is
// compared with the count expected from the H-matrix (132, 382 and 1274
// non-adjacent pairs for the three codes). Random triple
// errors are compared with the reference decoder action.
module tb_daec_decoder;
  import daec_pkg::*;
  import tb_daec_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [21:0] w16, o16, f16;  logic [15:0] d16;  logic [5:0] s16;
  logic e16, u16f, sc16, dc16;
  logic [38:0] w32, o32, f32;  logic [31:0] d32;  logic [6:0] s32;
  logic e32, u32f, sc32, dc32;
  logic [71:0] w64, o64, f64;  logic [63:0] d64;  logic [7:0] s64;
  logic e64, u64f, sc64, dc64;

  daec_decoder u16 (.word_i(w16), .data_o(d16), .word_o(o16), .flip_o(f16), .syn_o(s16),
                    .err_o(e16), .ue_o(u16f), .sec_o(sc16), .daec_o(dc16));
  daec_decoder #(.K(32)) u32 (.word_i(w32), .data_o(d32), .word_o(o32), .flip_o(f32), .syn_o(s32),
                    .err_o(e32), .ue_o(u32f), .sec_o(sc32), .daec_o(dc32));
  daec_decoder #(.K(64)) u64 (.word_i(w64), .data_o(d64), .word_o(o64), .flip_o(f64), .syn_o(s64),
                    .err_o(e64), .ue_o(u64f), .sec_o(sc64), .daec_o(dc64));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Drive word w into the decoder of size k and return its outputs.
  task automatic apply(int k, word_t w, output word_t o, output logic [MAX_K-1:0] d,
                       output logic e, output logic u, output logic sc, output logic dc);
    case (k)
      16: w16 = w[21:0];
      32: w32 = w[38:0];
      default: w64 = w[71:0];
    endcase
    #1;
    case (k)
      16: begin o = word_t'(o16); d = MAX_K'(d16); e = e16; u = u16f; sc = sc16; dc = dc16; end
      32: begin o = word_t'(o32); d = MAX_K'(d32); e = e32; u = u32f; sc = sc32; dc = dc32; end
      default: begin o = word_t'(o64); d = MAX_K'(d64); e = e64; u = u64f; sc = sc64; dc = dc64; end
    endcase
  endtask

  task automatic run_code(int k, int trials, int want_alias);
    int n = k + check_bits(k);
    int n_single = 0, n_pair = 0, n_ue = 0, n_alias = 0;
    word_t o;
    logic [MAX_K-1:0] d;
    logic e, u, sc, dc;
    for (int t = 0; t < trials; t++) begin
      logic [MAX_K-1:0] msg;
      logic [MAX_K-1:0] mask;
      word_t c;
      msg  = rand_data();
      mask = (k == 64) ? '1 : ((MAX_K'(1) << k) - 1);
      msg &= mask;
      c = ref_encode(k, msg);
      apply(k, c, o, d, e, u, sc, dc);
      check(d == msg && !e && !u && !sc && !dc, $sformatf("k%0d clean word", k));
      for (int i = 0; i < n; i++) begin
        apply(k, c ^ (word_t'(1) << i), o, d, e, u, sc, dc);
        check(d == msg && o == c && e && !u && sc && !dc,
              $sformatf("k%0d single error at %0d", k, i));
        if (t == 0) n_single++;
      end
      for (int i = 0; i < n - 1; i++) begin
        apply(k, c ^ (word_t'(3) << i), o, d, e, u, sc, dc);
        check(d == msg && o == c && e && !u && !sc && dc,
              $sformatf("k%0d adjacent error at %0d,%0d", k, i, i + 1));
        if (t == 0) n_pair++;
      end
      for (int i = 0; i < n; i++) begin
        for (int j = i + 2; j < n; j++) begin
          word_t ew, ef;
          cls_e  cl;
          ew = (word_t'(1) << i) | (word_t'(1) << j);
          ref_classify(k, ref_syndrome(k, c ^ ew), cl, ef);
          apply(k, c ^ ew, o, d, e, u, sc, dc);
          check(e && !sc && (cl == CL_UE || cl == CL_PAIR), $sformatf("k%0d double %0d,%0d detect", k, i, j));
          check(o == (c ^ ew ^ ef) && u == (cl == CL_UE) && dc == (cl == CL_PAIR),
                $sformatf("k%0d double %0d,%0d action", k, i, j));
          if (t == 0) begin
            if (cl == CL_UE) n_ue++;
            else n_alias++;
          end
        end
      end
      for (int q = 0; q < 50; q++) begin
        word_t ew, ef;
        cls_e  cl;
        int a, b, cc;
        a = $urandom_range(n - 1);
        b = (a + 1 + $urandom_range(n - 2)) % n;
        do cc = $urandom_range(n - 1); while (cc == a || cc == b);
        ew = (word_t'(1) << a) | (word_t'(1) << b) | (word_t'(1) << cc);
        ref_classify(k, ref_syndrome(k, c ^ ew), cl, ef);
        apply(k, c ^ ew, o, d, e, u, sc, dc);
        check(e && o == (c ^ ew ^ ef) && u == (cl == CL_UE) && sc == (cl == CL_SINGLE)
              && dc == (cl == CL_PAIR), $sformatf("k%0d triple error", k));
      end
    end
    $display("(%0d,%0d): %0d single and %0d adjacent double errors corrected; of %0d non-adjacent doubles %0d flagged UE, %0d alias an adjacent pair",
             n, k, n_single, n_pair, n_ue + n_alias, n_ue, n_alias);
    check(n_single == n && n_pair == n - 1, "error pattern counts");
    check(n_alias == want_alias, $sformatf("k%0d aliasing doubles %0d, want %0d", k, n_alias, want_alias));
    check(n_ue > 0, "no uncorrectable double error seen");
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_code(16, 20, 132);
    run_code(32, 10, 382);
    run_code(64, 4, 1274);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
