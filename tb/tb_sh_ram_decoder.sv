// tb_sh_ram_decoder -- self-checking test of the table-lookup decoder
// (B = 8, A = 4: 5-bit codewords for 16 table blocks, 9-bit for the rest).
//
// Writes 16 distinct random blocks into the table, then sends 300 blocks
// (about 60% of them from the table) encoded by the testbench: flag 1 and
// the 4-bit table index, or flag 0 and the 8 bits. Random idle gaps
// between bits. Every parallel load must carry the block and every serial
// load the bit the reference predicts, one cycle after the completing bit.
// Finally the table is rewritten and the same index must decode to the new
// block, as when the decoder is reused for another core.
module tb_sh_ram_decoder;

  localparam int B = 8, A = 4;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0, in_bit = 1'b0;
  logic         tbl_we = 1'b0;
  logic [A-1:0] tbl_waddr = '0;
  logic [B-1:0] tbl_wdata = '0;
  logic         par_load, ser_load, ser_bit, cw_done;
  logic [B-1:0] par_data;

  int checks = 0, failures = 0, n_par = 0, n_ser = 0, n_cw = 0, n_blocks = 0;
  logic         valid_q = 1'b0;
  logic [B:0]   expq [$];
  logic [B:0]   e;
  logic [B-1:0] tbl [2**A];

  sh_ram_decoder dut (
    .clk, .rst_n, .in_valid, .in_bit, .tbl_we, .tbl_waddr, .tbl_wdata,
    .par_load, .par_data, .ser_load, .ser_bit, .cw_done
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send_bit(logic b);
    repeat ($urandom_range(2)) @(negedge clk);
    in_valid = 1'b1;
    in_bit   = b;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic send_block(logic [B-1:0] blk);
    int idx = -1;
    for (int i = 0; i < 2**A; i++) if (tbl[i] == blk) idx = i;
    n_blocks++;
    if (idx >= 0) begin
      expq.push_back({1'b1, blk});
      send_bit(1'b1);
      for (int i = A - 1; i >= 0; i--) send_bit(idx[i]);
    end else begin
      for (int i = B - 1; i >= 0; i--) expq.push_back({1'b0, {(B-1){1'b0}}, blk[i]});
      send_bit(1'b0);
      for (int i = B - 1; i >= 0; i--) send_bit(blk[i]);
    end
  endtask

  task automatic write_table(int i, logic [B-1:0] v);
    tbl[i]    = v;
    tbl_we    = 1'b1;
    tbl_waddr = A'(i);
    tbl_wdata = v;
    @(negedge clk);
    tbl_we = 1'b0;
  endtask

  always @(posedge clk) valid_q <= in_valid;

  always @(posedge clk) if (rst_n) begin
    if (par_load || ser_load) begin
      check(valid_q, "load not one cycle after an input bit");
      check(expq.size() > 0, "unexpected load");
      if (expq.size() > 0) begin
        e = expq.pop_front();
        if (par_load) begin
          n_par++;
          check(e[B] && e[B-1:0] == par_data,
                $sformatf("parallel load %h, expected %b/%h", par_data, e[B], e[B-1:0]));
        end else begin
          n_ser++;
          check(!e[B] && e[0] == ser_bit, "serial load wrong");
        end
      end
    end
    if (cw_done) n_cw++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2**A; i++) write_table(i, B'(8'h11 * i + 8'h07));
    for (int k = 0; k < 300; k++) begin
      if ($urandom_range(9) < 6) send_block(tbl[$urandom_range(2**A - 1)]);
      else send_block(B'($urandom));
    end
    write_table(5, 8'hA5);
    send_block(8'hA5);
    repeat (4) @(negedge clk);
    check(expq.size() == 0, "expected loads missing");
    check(n_cw == n_blocks, $sformatf("cw_done %0d, blocks %0d", n_cw, n_blocks));
    check(n_par > 100 && n_ser > 100, "both load kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
