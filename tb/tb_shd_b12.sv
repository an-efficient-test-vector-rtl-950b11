// tb_shd_b12 -- the decompressor at the block size used to compare the
// scheme with other codes: b = 12, with n = 16 coded blocks.
//
// The code is a complete prefix code with lengths 1,3,4,4,4,5,5,5,5,6,6,
// 7,7,7,8,8 after the flag bit, assigned canonically (each code is the
// previous one plus one, shifted left when the length grows); the 16 blocks
// are p_i = (i * 0x9E3) xor 0x5A5, all distinct. The shortest codeword is 2
// bits, so the scan clock must run at least 12 / 2 = 6 times the tester
// clock. Run 1 sends 400 blocks (half the most frequent block, the rest
// other coded blocks or random blocks) at f_sys/f_T = 6 and checks every
// scan bit, no overrun, and that the tester never waits. Run 2 sends the
// same data at f_sys/f_T = 5 and expects overrun.
module tb_shd_b12;

  localparam int B = 12, N = 16, MAX_CL = 8;
  localparam int LENS [N] = '{1, 3, 4, 4, 4, 5, 5, 5, 5, 6, 6, 7, 7, 7, 8, 8};

  function automatic logic [N-1:0][MAX_CL-1:0] mk_codes();
    logic [N-1:0][MAX_CL-1:0] c;
    int code = 0;
    for (int i = 0; i < N; i++) begin
      if (i > 0) code = (code + 1) << (LENS[i] - LENS[i-1]);
      c[i] = MAX_CL'(code);
    end
    return c;
  endfunction

  function automatic logic [N-1:0][7:0] mk_lens();
    logic [N-1:0][7:0] l;
    for (int i = 0; i < N; i++) l[i] = 8'(LENS[i]);
    return l;
  endfunction

  function automatic logic [N-1:0][B-1:0] mk_pats();
    logic [N-1:0][B-1:0] p;
    for (int i = 0; i < N; i++) p[i] = B'((i * 12'h9E3) ^ 12'h5A5);
    return p;
  endfunction

  localparam logic [N-1:0][MAX_CL-1:0] CB = mk_codes();
  localparam logic [N-1:0][7:0]        CL = mk_lens();
  localparam logic [N-1:0][B-1:0]      PT = mk_pats();

  logic clk = 1'b0, rst_n = 1'b0;
  logic t_valid = 1'b0, t_bit = 1'b0;
  logic scan_en, scan_in, cw_done, code_error, overrun;

  shd_top #(
    .B(B), .N(N), .MAX_CL(MAX_CL), .CODE_BITS(CB), .CODE_LEN(CL), .PATTERN(PT)
  ) dut (
    .clk, .rst_n, .t_valid, .t_bit,
    .tbl_we(1'b0), .tbl_waddr(4'b0), .tbl_wdata(12'b0),
    .scan_en, .scan_in, .cw_done, .code_error, .overrun
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, last_scan = 0, n_scan = 0;
  bit expq [$], stream [$], saved [$];
  bit e, mon = 1'b1;

  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic add_block(logic [B-1:0] blk);
    int idx = -1;
    for (int i = 0; i < N; i++) if (PT[i] == blk) idx = i;
    for (int k = B - 1; k >= 0; k--) expq.push_back(blk[k]);
    if (idx >= 0) begin
      stream.push_back(1'b1);
      for (int k = LENS[idx] - 1; k >= 0; k--) stream.push_back(CB[idx][k]);
    end else begin
      stream.push_back(1'b0);
      for (int k = B - 1; k >= 0; k--) stream.push_back(blk[k]);
    end
  endtask

  task automatic play(int r);
    while (stream.size() > 0) begin
      t_valid = 1'b1;
      t_bit   = stream.pop_front();
      @(negedge clk);
      t_valid = 1'b0;
      repeat (r - 1) @(negedge clk);
    end
  endtask

  always @(posedge clk) if (rst_n && mon && scan_en) begin
    n_scan++;
    last_scan = cyc;
    check(expq.size() > 0, "unexpected scan bit");
    if (expq.size() > 0) begin
      e = expq.pop_front();
      check(scan_in == e, $sformatf("scan bit %0d wrong", n_scan));
    end
  end

  initial begin
    int nbits, t_end;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 400; k++) begin
      case ($urandom_range(9))
        0, 1, 2, 3, 4: add_block(PT[0]);
        5, 6, 7:       add_block(PT[$urandom_range(N - 1)]);
        default:       add_block(B'($urandom));
      endcase
    end
    saved = stream;
    nbits = stream.size();
    play(6);
    t_end = cyc;
    repeat (20) @(negedge clk);
    check(expq.size() == 0 && n_scan == 400 * B, $sformatf("%0d scan bits", n_scan));
    check(!overrun && !code_error, "error flag at f_sys/f_T = 6");
    check(last_scan - t_end <= B + 4, "tester had to wait");
    $display("b=12: %0d data bits sent as %0d tester bits", 400 * B, nbits);

    mon = 1'b0;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    stream = saved;
    play(5);
    repeat (20) @(negedge clk);
    check(overrun, "no overrun at f_sys/f_T = 5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
