// tb_shd_top -- end-to-end test of the decompressor in its three set-ups.
//
//  u_def  default: one chain, scan clock = 2 x tester clock, reference set
//         plus random blocks; then the tester clock raised to the scan
//         clock, which must raise overrun.
//  u_two  two chains share one tester channel (NUM_CHAINS = 2); scan clock
//         = tester clock and a bit every clock, so each decoder sees every
//         second bit. The two compressed streams are interleaved bit by bit.
//  u_ram  table-lookup decoder, 8-bit blocks, 4-bit table index, scan
//         clock = 2 x tester clock; table loaded through the top's ports,
//         then rewritten between two test sets as for a second core.
// In each, every bit reaching a scan chain is checked against the original
// blocks, and the error flags against what the set-up should produce.
// Each mechanism is counted and must occur: coded (parallel) loads,
// uncoded (serial) loads, gap-free loads, overrun, channel rotation to both
// chains, table lookups and a table rewrite.
module tb_shd_top;
  import shd_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- default set-up ----------------
  logic d_valid = 1'b0, d_bit = 1'b0;
  logic d_en, d_in, d_cw, d_err, d_ovr;
  shd_top u_def (
    .clk, .rst_n, .t_valid(d_valid), .t_bit(d_bit),
    .tbl_we(1'b0), .tbl_waddr(4'b0), .tbl_wdata(4'b0),
    .scan_en(d_en), .scan_in(d_in), .cw_done(d_cw), .code_error(d_err), .overrun(d_ovr)
  );

  // ---------------- two chains on one channel ----------------
  logic       w_valid = 1'b0, w_bit = 1'b0;
  logic [1:0] w_en, w_in, w_cw, w_err, w_ovr;
  shd_top #(.NUM_CHAINS(2)) u_two (
    .clk, .rst_n, .t_valid(w_valid), .t_bit(w_bit),
    .tbl_we(2'b0), .tbl_waddr(4'b0), .tbl_wdata(4'b0),
    .scan_en(w_en), .scan_in(w_in), .cw_done(w_cw), .code_error(w_err), .overrun(w_ovr)
  );

  // ---------------- table-lookup decoder ----------------
  logic       r_valid = 1'b0, r_bit = 1'b0, r_we = 1'b0;
  logic [3:0] r_waddr = '0;
  logic [7:0] r_wdata = '0;
  logic       r_en, r_in, r_cw, r_err, r_ovr;
  shd_top #(.B(8), .USE_RAM(1'b1), .A(4)) u_ram (
    .clk, .rst_n, .t_valid(r_valid), .t_bit(r_bit),
    .tbl_we(r_we), .tbl_waddr(r_waddr), .tbl_wdata(r_wdata),
    .scan_en(r_en), .scan_in(r_in), .cw_done(r_cw), .code_error(r_err), .overrun(r_ovr)
  );

  // expected scan bits per chain: 0 = u_def, 1/2 = u_two chains, 3 = u_ram
  bit q0 [$], q1 [$], q2 [$], q3 [$];
  int nscan [4] = '{0, 0, 0, 0};
  bit mon0 = 1'b1;
  bit e;

  // mechanism counters
  int m_par = 0, m_ser = 0, m_tight = 0, m_ovr = 0, m_rot0 = 0, m_rot1 = 0;
  int m_lookup = 0, m_rewrite = 0;

  always @(posedge clk) if (rst_n) begin
    if (d_en && mon0) begin
      nscan[0]++;
      check(q0.size() > 0, "u_def: unexpected scan bit");
      if (q0.size() > 0) begin e = q0.pop_front(); check(d_in == e, "u_def: wrong scan bit"); end
    end
    if (w_en[0]) begin
      nscan[1]++;
      check(q1.size() > 0, "u_two[0]: unexpected scan bit");
      if (q1.size() > 0) begin e = q1.pop_front(); check(w_in[0] == e, "u_two[0]: wrong scan bit"); end
    end
    if (w_en[1]) begin
      nscan[2]++;
      check(q2.size() > 0, "u_two[1]: unexpected scan bit");
      if (q2.size() > 0) begin e = q2.pop_front(); check(w_in[1] == e, "u_two[1]: wrong scan bit"); end
    end
    if (r_en) begin
      nscan[3]++;
      check(q3.size() > 0, "u_ram: unexpected scan bit");
      if (q3.size() > 0) begin e = q3.pop_front(); check(r_in == e, "u_ram: wrong scan bit"); end
    end
    if (u_def.g_chain[0].u_chain.par_load) m_par++;
    if (u_def.g_chain[0].u_chain.ser_load) m_ser++;
    if (u_def.g_chain[0].u_chain.par_load && u_def.g_chain[0].u_chain.u_ser.cnt == 1) m_tight++;
    if (u_two.d_valid[0]) m_rot0++;
    if (u_two.d_valid[1]) m_rot1++;
    if (u_ram.g_chain[0].u_chain.par_load) m_lookup++;
  end

  function automatic logic [3:0] rand_blk4();
    case ($urandom_range(4))
      0: return 4'b0010;
      1: return 4'b0100;
      2: return 4'b0110;
      default: return 4'($urandom);
    endcase
  endfunction

  // append a 4-bit block's codeword to s and its bits to q
  task automatic add4(logic [3:0] blk, ref bit s [$], ref bit q [$]);
    cw_t c = enc4(blk);
    for (int k = 3; k >= 0; k--) q.push_back(blk[k]);
    for (int k = c.len - 1; k >= 0; k--) s.push_back(c.bits[k]);
  endtask

  logic [7:0] tbl [16];

  task automatic add8(logic [7:0] blk, ref bit s [$]);
    int idx = -1;
    for (int i = 0; i < 16; i++) if (tbl[i] == blk) idx = i;
    for (int k = 7; k >= 0; k--) q3.push_back(blk[k]);
    if (idx >= 0) begin
      s.push_back(1'b1);
      for (int k = 3; k >= 0; k--) s.push_back(idx[k]);
    end else begin
      s.push_back(1'b0);
      for (int k = 7; k >= 0; k--) s.push_back(blk[k]);
    end
  endtask

  task automatic wr_tbl(int i, logic [7:0] v);
    tbl[i]  = v;
    r_we    = 1'b1;
    r_waddr = 4'(i);
    r_wdata = v;
    @(negedge clk);
    r_we = 1'b0;
  endtask

  initial begin
    bit s [$], s1 [$], s2 [$];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- default set-up, 2 clocks per tester bit ----
    foreach (FIG1[i]) add4(FIG1[i], s, q0);
    for (int k = 0; k < 200; k++) add4(rand_blk4(), s, q0);
    while (s.size() > 0) begin
      d_valid = 1'b1; d_bit = s.pop_front();
      @(negedge clk); d_valid = 1'b0; @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(q0.size() == 0 && nscan[0] == 260 * 4, "u_def: scan bits missing");
    check(!d_ovr && !d_err, "u_def: error flag at legal rate");

    // ---- two chains, one bit per clock ----
    for (int k = 0; k < 150; k++) begin
      add4(rand_blk4(), s1, q1);
      add4(rand_blk4(), s2, q2);
    end
    // even up the stream lengths with whole codewords
    while (s1.size() + 1 < s2.size()) add4(4'b0010, s1, q1);
    while (s2.size() + 1 < s1.size()) add4(4'b0010, s2, q2);
    if (s1.size() + 1 == s2.size()) begin add4(4'b0100, s1, q1); add4(4'b0010, s2, q2); end
    if (s2.size() + 1 == s1.size()) begin add4(4'b0100, s2, q2); add4(4'b0010, s1, q1); end
    check(s1.size() == s2.size(), "stream lengths not evened");
    while (s1.size() > 0) begin
      w_valid = 1'b1; w_bit = s1.pop_front();
      @(negedge clk);
      w_bit = s2.pop_front();
      @(negedge clk);
      w_valid = 1'b0;
    end
    repeat (10) @(negedge clk);
    check(q1.size() == 0 && q2.size() == 0, "u_two: scan bits missing");
    check(w_ovr == 2'b00 && w_err == 2'b00, "u_two: error flag");

    // ---- table-lookup decoder ----
    for (int i = 0; i < 16; i++) wr_tbl(i, 8'(8'h3C ^ (8'd23 * i)));
    for (int pass = 0; pass < 2; pass++) begin
      for (int k = 0; k < 120; k++) begin
        if ($urandom_range(9) < 6) add8(tbl[$urandom_range(15)], s);
        else add8(8'($urandom), s);
      end
      while (s.size() > 0) begin
        r_valid = 1'b1; r_bit = s.pop_front();
        @(negedge clk); r_valid = 1'b0; @(negedge clk);
      end
      repeat (12) @(negedge clk);
      if (pass == 0) begin
        for (int i = 0; i < 16; i++) wr_tbl(i, 8'(8'hC5 + 8'd37 * i));
        m_rewrite++;
      end
    end
    check(q3.size() == 0 && nscan[3] == 240 * 8, "u_ram: scan bits missing");
    check(!r_ovr, "u_ram: overrun");

    // ---- default set-up too fast: overrun ----
    mon0 = 1'b0;
    foreach (FIG1[i]) add4(FIG1[i], s, q0);
    while (s.size() > 0) begin
      d_valid = 1'b1; d_bit = s.pop_front();
      @(negedge clk);
    end
    d_valid = 1'b0;
    repeat (6) @(negedge clk);
    check(d_ovr, "u_def: no overrun at one bit per clock");
    if (d_ovr) m_ovr++;

    $display("mechanisms: parallel %0d serial %0d gap-free %0d overrun %0d rotation %0d/%0d lookup %0d rewrite %0d",
             m_par, m_ser, m_tight, m_ovr, m_rot0, m_rot1, m_lookup, m_rewrite);
    check(m_par > 0, "no parallel load");
    check(m_ser > 0, "no serial load");
    check(m_tight > 0, "no gap-free load");
    check(m_ovr > 0, "no overrun");
    check(m_rot0 > 0 && m_rot1 > 0, "channel did not rotate");
    check(m_lookup > 0, "no table lookup");
    check(m_rewrite > 0, "no table rewrite");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
