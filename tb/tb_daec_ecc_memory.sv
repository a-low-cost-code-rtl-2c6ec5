// tb_daec_ecc_memory -- end-to-end test of the protected memory at its
// default size ((22,16) code, 64 words).
//
// Words are written through the encoder; upsets are then injected straight
// into the stored codewords, as a particle strike would, and the words are
// read back. Every read is compared with the reference: the data written for
// no error, a single error or an adjacent double error; an uncorrectable flag
// or the reference miscorrection for a non-adjacent double error; the
// reference decoder action for a three-bit burst. Each read must return its
// result exactly one cycle after the request. The test counts how often each
// mechanism occurred (clean read, single correction at every bit position,
// adjacent correction at every pair, uncorrectable detection, aliasing
// double error, burst of three) and fails if any never happened.
module tb_daec_ecc_memory;
  import daec_pkg::*;
  import tb_daec_ref_pkg::*;

  localparam int K = 16, R = 6, N = 22, DEPTH = 64, AW = 6;

  int checks = 0;
  int failures = 0;
  int n_clean = 0, n_single = 0, n_pair = 0, n_ue = 0, n_alias = 0, n_burst = 0;
  bit single_pos [N];
  bit pair_pos [N-1];

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          we = 1'b0, re = 1'b0;
  logic [AW-1:0] wa = '0, ra = '0;
  logic [K-1:0]  wd = '0;
  logic          rvalid, rerr, rue, rsec, rdaec;
  logic [K-1:0]  rdata;
  logic [R-1:0]  rsyn;
  logic [K-1:0]  shadow [DEPTH];

  daec_ecc_memory dut (
    .clk(clk), .rst_n(rst_n),
    .wr_en_i(we), .wr_addr_i(wa), .wr_data_i(wd),
    .rd_en_i(re), .rd_addr_i(ra),
    .rd_valid_o(rvalid), .rd_data_o(rdata), .rd_err_o(rerr), .rd_ue_o(rue),
    .rd_sec_o(rsec), .rd_daec_o(rdaec), .rd_syn_o(rsyn)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic write_word(int a, logic [K-1:0] d);
    @(negedge clk);
    we = 1'b1; wa = AW'(a); wd = d; shadow[a] = d;
    @(negedge clk);
    we = 1'b0;
  endtask

  // Flip bits of the stored codeword at address a.
  task automatic upset(int a, logic [N-1:0] mask);
    dut.u_array.mem[a] = dut.u_array.mem[a] ^ mask;
  endtask

  // Read address a, whose stored word carries error mask e, and check.
  task automatic read_check(int a, logic [N-1:0] e);
    word_t c, ef;
    cls_e  cl;
    int    p;
    c = ref_encode(K, MAX_K'(shadow[a]));
    ref_classify(K, ref_syndrome(K, word_t'(e)), cl, ef);
    @(negedge clk);
    re = 1'b1; ra = AW'(a);
    @(negedge clk);
    re = 1'b0;
    check(rvalid, "read result not valid one cycle after request");
    check(rsyn == ref_syndrome(K, c ^ word_t'(e)), $sformatf("addr %0d syndrome", a));
    check(rdata == K'((c ^ word_t'(e) ^ ef)), $sformatf("addr %0d data %h mask %h", a, rdata, e));
    check(rerr == (e != '0) && rue == (cl == CL_UE) && rsec == (cl == CL_SINGLE)
          && rdaec == (cl == CL_PAIR), $sformatf("addr %0d flags for mask %h", a, e));
    p = $countones(e);
    if (p == 0) n_clean++;
    if (p == 1 && cl == CL_SINGLE && rdata == shadow[a]) begin
      n_single++;
      for (int i = 0; i < N; i++) if (e[i]) single_pos[i] = 1'b1;
    end
    if (p == 2 && (e & (e >> 1)) != '0 && cl == CL_PAIR && rdata == shadow[a]) begin
      n_pair++;
      for (int i = 0; i < N - 1; i++) if (e[i] && e[i+1]) pair_pos[i] = 1'b1;
    end
    if (p == 2 && (e & (e >> 1)) == '0) begin
      if (cl == CL_UE && rue) n_ue++;
      if (cl == CL_PAIR && rdaec) n_alias++;
    end
    if (p == 3) n_burst++;
    @(negedge clk);
    check(!rvalid, "valid held without a read request");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int si = 0, pi = 0;

  initial begin
    repeat (3) @(negedge clk);
    check(!rvalid && !rerr && !rue, "outputs active in reset");
    rst_n = 1'b1;
    for (int a = 0; a < DEPTH; a++) write_word(a, K'($urandom()));
    for (int round = 0; round < 12; round++) begin
      // si and pi step through the bit positions and pairs in turn
      for (int a = 0; a < DEPTH; a++) begin
        logic [N-1:0] e;
        int sel, i, j;
        sel = (a + round) % 5;
        i = $urandom_range(N - 1);
        case (sel)
          0: e = '0;
          1: begin e = N'(1) << si; si = (si + 1) % N; end
          2: begin e = N'(3) << pi; pi = (pi + 1) % (N - 1); end
          3: begin
               do j = $urandom_range(N - 1); while (j == i || j == i + 1 || j + 1 == i);
               e = (N'(1) << i) | (N'(1) << j);
             end
          default: e = N'(7) << $urandom_range(N - 3);
        endcase
        upset(a, e);
        read_check(a, e);
        write_word(a, K'($urandom()));
      end
    end
    begin
      int cs = 0, cp = 0;
      foreach (single_pos[i]) cs += int'(single_pos[i]);
      foreach (pair_pos[i]) cp += int'(pair_pos[i]);
      $display("clean=%0d single=%0d (positions %0d/%0d) adjacent=%0d (pairs %0d/%0d) ue=%0d alias=%0d burst3=%0d",
               n_clean, n_single, cs, N, n_pair, cp, N - 1, n_ue, n_alias, n_burst);
      check(n_clean > 0, "no clean read");
      check(cs == N, "not every single-error position corrected");
      check(cp == N - 1, "not every adjacent pair corrected");
      check(n_ue > 0, "no uncorrectable error detected");
      check(n_alias > 0, "no aliasing double error seen");
      check(n_burst > 0, "no three-bit burst applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
