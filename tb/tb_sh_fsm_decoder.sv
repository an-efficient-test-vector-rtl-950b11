// tb_sh_fsm_decoder -- self-checking test of the selective Huffman decoder
// with the default code.
//
// Sends the 60-block reference test set and then 400 random blocks (half of
// them drawn from the three coded blocks), encoded by the testbench's own
// encoder, with random gaps of 0..3 idle cycles between bits. Every output
// event is checked against the expected sequence: a parallel load with the
// right block for a coded block, four serial loads with the right bits for
// an uncoded one. Also checked: each load comes exactly one cycle after the
// bit that completed it, cw_done counts the codewords, code_error stays low.
module tb_sh_fsm_decoder;
  import shd_tb_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid = 1'b0, in_bit = 1'b0;
  logic       par_load, ser_load, ser_bit, cw_done, code_error;
  logic [3:0] par_data;

  int checks = 0, failures = 0;
  int n_par = 0, n_ser = 0, n_cw = 0, n_blocks = 0;
  logic       valid_q = 1'b0;

  // expected events: {is_parallel, block or bit}
  logic [4:0] expq [$];

  sh_fsm_decoder dut (
    .clk, .rst_n, .in_valid, .in_bit,
    .par_load, .par_data, .ser_load, .ser_bit, .cw_done, .code_error
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send_block(logic [3:0] blk);
    cw_t c = enc4(blk);
    if (is_coded4(blk)) expq.push_back({1'b1, blk});
    else for (int i = 3; i >= 0; i--) expq.push_back({1'b0, 3'b0, blk[i]});
    n_blocks++;
    for (int i = c.len - 1; i >= 0; i--) begin
      repeat ($urandom_range(3)) @(negedge clk);
      in_valid = 1'b1;
      in_bit   = c.bits[i];
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  always @(posedge clk) valid_q <= in_valid;

  always @(posedge clk) if (rst_n) begin
    if (par_load || ser_load) begin
      logic [4:0] e;
      check(valid_q, "load not one cycle after an input bit");
      check(expq.size() > 0, "unexpected load");
      if (expq.size() > 0) begin
        e = expq.pop_front();
        if (par_load) begin
          n_par++;
          check(e[4] == 1'b1 && e[3:0] == par_data,
                $sformatf("parallel load %b, expected %b/%b", par_data, e[4], e[3:0]));
        end else begin
          n_ser++;
          check(e[4] == 1'b0 && e[0] == ser_bit,
                $sformatf("serial load %b, expected %b/%b", ser_bit, e[4], e[0]));
        end
      end
    end
    if (cw_done) n_cw++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    foreach (FIG1[i]) send_block(FIG1[i]);
    for (int k = 0; k < 400; k++) begin
      logic [3:0] b;
      case ($urandom_range(5))
        0: b = 4'b0010;
        1: b = 4'b0100;
        2: b = 4'b0110;
        default: b = 4'($urandom_range(15));
      endcase
      send_block(b);
    end
    repeat (4) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d expected loads missing", expq.size()));
    check(n_cw == n_blocks, $sformatf("cw_done %0d, blocks %0d", n_cw, n_blocks));
    check(!code_error, "code_error set");
    check(n_par > 0 && n_ser > 0, "both load kinds seen");
    $display("parallel loads %0d, serial loads %0d, codewords %0d", n_par, n_ser, n_cw);
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
