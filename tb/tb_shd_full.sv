// tb_shd_full -- the decompressor at its default configuration (one scan
// chain, 4-bit blocks, the three-block default code) on the 60-block
// reference test set.
//
// The tester sends the 194 compressed bits one every 2 scan clocks
// (f_sys = 2 f_T, the least the 2-bit shortest codeword allows). Checked:
// the 240 bits reaching the scan chain are the reference set in order; the
// tester needs 194 tester cycles instead of 240 (19.2% less data and test
// time); it never waits: the last scan bit follows the last tester bit by a
// fixed pipeline delay; overrun and code_error stay low. Counted: parallel
// loads (coded blocks), serial loads (bits of uncoded blocks) and loads
// that land in the very clock the previous block's last bit leaves. Then
// the set is sent again at f_sys = f_T, which breaks the rate rule, and
// overrun must rise.
module tb_shd_full;
  import shd_tb_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       t_valid = 1'b0, t_bit = 1'b0;
  logic       scan_en, scan_in, cw_done, code_error, overrun;

  int checks = 0, failures = 0;
  bit expq [$];
  bit stream [$];
  bit e, mon = 1'b1;
  int n_scan = 0, n_cw = 0, cyc = 0, last_scan_cyc = 0, n_tester = 0;
  int n_par = 0, n_ser = 0, n_tight = 0;

  shd_top dut (
    .clk, .rst_n, .t_valid, .t_bit,
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

  task automatic play(int r);
    while (stream.size() > 0) begin
      t_valid = 1'b1;
      t_bit   = stream.pop_front();
      n_tester++;
      @(negedge clk);
      t_valid = 1'b0;
      repeat (r - 1) @(negedge clk);
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
  endtask

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
    if (dut.g_chain[0].u_chain.par_load) n_par++;
    if (dut.g_chain[0].u_chain.ser_load) n_ser++;
    if (dut.g_chain[0].u_chain.par_load && scan_en && dut.g_chain[0].u_chain.u_ser.cnt == 1)
      n_tight++;
  end

  initial begin
    int t_end;
    cw_t c;
    do_reset();
    foreach (FIG1[i]) begin
      c = enc4(FIG1[i]);
      for (int k = 3; k >= 0; k--) expq.push_back(FIG1[i][k]);
      for (int k = c.len - 1; k >= 0; k--) stream.push_back(c.bits[k]);
    end
    play(2);
    t_end = cyc;
    repeat (12) @(negedge clk);
    check(n_tester == FIG1_CODE_BITS, $sformatf("%0d tester cycles", n_tester));
    check(expq.size() == 0, $sformatf("%0d scan bits missing", expq.size()));
    check(n_scan == FIG1_BITS, $sformatf("%0d scan bits", n_scan));
    check(n_cw == 60, $sformatf("%0d codewords", n_cw));
    check(!overrun && !code_error, "error flag set");
    check(last_scan_cyc - t_end <= 6, "tester had to wait");
    check(n_par == 42, $sformatf("%0d parallel loads, expected 42", n_par));
    check(n_ser == 18 * 4, $sformatf("%0d serial loads, expected 72", n_ser));
    check(n_tight > 0, "no load at the last shift of the previous block");
    $display("reference set: %0d data bits sent as %0d tester bits (%0d%% less)",
             FIG1_BITS, n_tester, (FIG1_BITS - n_tester) * 100 / FIG1_BITS);
    $display("parallel loads %0d, serial loads %0d, gap-free loads %0d", n_par, n_ser, n_tight);

    mon = 1'b0;
    do_reset();
    foreach (FIG1[i]) begin
      c = enc4(FIG1[i]);
      for (int k = c.len - 1; k >= 0; k--) stream.push_back(c.bits[k]);
    end
    play(1);
    repeat (6) @(negedge clk);
    check(overrun, "no overrun at f_sys = f_T");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
