// tb_daec_mem_array -- self-checking test of daec_mem_array.
//
// Fills the array with random words, then reads back every address and
// random addresses while writing elsewhere. Read data must equal a shadow
// copy one cycle after the read request and hold while rd_en_i is low; a
// read of the address being written returns the old word.
module tb_daec_mem_array;
  localparam int W = 22, D = 64, AW = 6;

  int checks = 0;
  int failures = 0;

  logic          clk = 1'b0;
  logic          we = 1'b0, re = 1'b0;
  logic [AW-1:0] wa = '0, ra = '0;
  logic [W-1:0]  wd = '0, rd;
  logic [W-1:0]  shadow [D];

  daec_mem_array #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .wr_en_i(we), .waddr_i(wa), .wdata_i(wd),
    .rd_en_i(re), .raddr_i(ra), .rdata_o(rd)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] want;
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1'b1; wa = AW'(a); wd = W'($urandom()); shadow[a] = wd;
    end
    @(negedge clk);
    we = 1'b0;
    for (int a = 0; a < D; a++) begin
      re = 1'b1; ra = AW'(a); want = shadow[a];
      @(posedge clk); #1;
      check(rd == want, $sformatf("read %0d: %h want %h", a, rd, want));
      @(negedge clk);
    end
    // read data holds while no read is requested
    re = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(rd == shadow[D-1], "read data did not hold");
    // mixed traffic, including read of the address being written
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = $urandom_range(1); wa = AW'($urandom()); wd = W'($urandom());
      re = 1'b1; ra = (t % 5 == 0) ? wa : AW'($urandom());
      want = shadow[ra];
      @(posedge clk); #1;
      if (we) shadow[wa] = wd;
      check(rd == want, $sformatf("mixed read %0d: %h want %h", ra, rd, want));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
