// tb_shd_chain -- self-checking test of one scan chain's decompressor
// (state-machine decoder plus serializer, default 4-bit code).
//
// Run 1: the 60-block reference test set followed by 300 random blocks,
// one compressed bit every R = 2 clocks without a pause, i.e. the scan
// clock twice the tester clock, which is the least the shortest codeword
// (2 bits for a 4-bit block) allows. The bits shifted into the scan chain
// must be the original blocks in order, overrun must stay low and the last
// scan bit must leave within a fixed number of clocks after the last tester
// bit, showing that the tester never had to wait.
// Run 2: the reference set at R = 1, too fast for a 2-bit codeword: the
// serializer must report overrun.
module tb_shd_chain;
  import shd_tb_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, in_bit = 1'b0;
  logic       scan_en, scan_in, cw_done, code_error, overrun;

  int checks = 0, failures = 0;
  bit expq [$];
  bit stream [$];
  bit e;
  int n_scan = 0, n_cw = 0, cyc = 0, last_scan_cyc = 0;

  shd_chain dut (
    .clk, .rst_n, .in_valid, .in_bit,
    .tbl_we(1'b0), .tbl_waddr(4'b0), .tbl_wdata(4'b0),
    .scan_en, .scan_in, .cw_done, .code_error, .overrun
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic add_block(logic [3:0] blk);
    cw_t c = enc4(blk);
    for (int i = 3; i >= 0; i--) expq.push_back(blk[i]);
    for (int i = c.len - 1; i >= 0; i--) stream.push_back(c.bits[i]);
  endtask

  task automatic play(int r);
    while (stream.size() > 0) begin
      in_valid = 1'b1;
      in_bit   = stream.pop_front();
      @(negedge clk);
      in_valid = 1'b0;
      repeat (r - 1) @(negedge clk);
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
  endtask

  bit mon = 1'b1;
  always @(posedge clk) if (rst_n && mon) begin
    if (scan_en) begin
      n_scan++;
      last_scan_cyc = cyc;
      check(expq.size() > 0, "scan bit with nothing expected");
      if (expq.size() > 0) begin
        e = expq.pop_front();
        check(scan_in == e, $sformatf("scan bit %0d is %b, expected %b", n_scan, scan_in, e));
      end
    end
    if (cw_done) n_cw++;
  end

  initial begin
    int t_end, nbits;
    do_reset();
    foreach (FIG1[i]) add_block(FIG1[i]);
    check(stream.size() == FIG1_CODE_BITS, $sformatf("reference set codes to %0d bits", stream.size()));
    for (int k = 0; k < 300; k++) begin
      case ($urandom_range(4))
        0: add_block(4'b0010);
        1: add_block(4'b0100);
        2: add_block(4'b0110);
        default: add_block(4'($urandom));
      endcase
    end
    nbits = stream.size();
    play(2);
    t_end = cyc;
    repeat (12) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d scan bits missing", expq.size()));
    check(n_scan == 360 * 4, $sformatf("%0d scan bits", n_scan));
    check(n_cw == 360, $sformatf("%0d codewords", n_cw));
    check(!overrun, "overrun at R = 2");
    check(!code_error, "code error");
    check(last_scan_cyc - t_end <= 6, $sformatf("last scan bit %0d clocks after last tester bit", last_scan_cyc - t_end));
    $display("run 1: %0d code bits for %0d data bits", nbits, 360 * 4);

    // run 2: too fast
    mon = 1'b0;
    do_reset();
    expq.delete();
    foreach (FIG1[i]) add_block(FIG1[i]);
    play(1);
    repeat (6) @(negedge clk);
    check(overrun, "no overrun at R = 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
