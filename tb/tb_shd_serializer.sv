// tb_shd_serializer -- self-checking test of the serializer (B = 4).
//
// Phase 1 runs 1500 clocks of random loads: in each clock a 4-bit block
// (only if the serializer is empty after this clock's shift), a single bit
// (at any time, so bits queue behind a block still being shifted out) or
// nothing. The bits leaving on scan_in while scan_en is high must be the
// loaded bits in order, one per loaded bit, and overrun must stay low.
// Phase 2 loads a block one cycle too early and expects overrun.
module tb_shd_serializer;

  localparam int B = 4;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         par_load = 1'b0, ser_load = 1'b0, ser_bit = 1'b0;
  logic [B-1:0] par_data = '0;
  logic         scan_en, scan_in, overrun;

  int checks = 0, failures = 0;
  bit expq [$];
  int n_shift = 0, n_expected = 0, n_par = 0, n_queued = 0;

  shd_serializer dut (
    .clk, .rst_n, .par_load, .par_data, .ser_load, .ser_bit,
    .scan_en, .scan_in, .overrun
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bit e;
  bit monitor_on = 1'b1;

  always @(posedge clk) if (rst_n && scan_en && monitor_on) begin
    n_shift++;
    check(expq.size() > 0, "scan shift with nothing loaded");
    if (expq.size() > 0) begin
      e = expq.pop_front();
      check(scan_in == e, $sformatf("scan bit %b, expected %b", scan_in, e));
    end
  end

  initial begin
    int occ, occ_sh, pick;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    occ = 0;
    for (int k = 0; k < 1500; k++) begin
      // occ: bits the serializer still holds; this clock shifts one out
      occ_sh = occ > 0 ? occ - 1 : 0;
      pick = $urandom_range(3);
      if (pick == 0 && occ_sh == 0) begin
        par_load = 1'b1;
        par_data = B'($urandom);
        for (int i = B - 1; i >= 0; i--) expq.push_back(par_data[i]);
        n_expected += B;
        n_par++;
        occ = B;
      end else if (pick == 1) begin
        ser_load = 1'b1;
        ser_bit  = 1'($urandom);
        expq.push_back(ser_bit);
        n_expected += 1;
        if (occ_sh > 0) n_queued++;
        occ = occ_sh + 1;
      end else begin
        occ = occ_sh;
      end
      @(negedge clk);
      par_load = 1'b0;
      ser_load = 1'b0;
    end
    repeat (B + 2) @(negedge clk);
    check(expq.size() == 0, "bits left unshifted");
    check(n_shift == n_expected, $sformatf("%0d scan clocks, expected %0d", n_shift, n_expected));
    check(!scan_en, "scan clock still enabled when empty");
    check(!overrun, "overrun with legal spacing");
    check(n_par > 50 && n_queued > 50, "too few blocks or queued serial bits");
    monitor_on = 1'b0;
    // too early: second block one cycle before the first is out
    par_load = 1'b1; par_data = 4'b1010;
    @(negedge clk);
    par_load = 1'b0;
    repeat (B - 2) @(negedge clk);
    par_load = 1'b1; par_data = 4'b0101;
    @(negedge clk);
    par_load = 1'b0;
    check(overrun, "overrun not flagged for an early load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
