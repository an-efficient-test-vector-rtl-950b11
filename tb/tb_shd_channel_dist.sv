// tb_shd_channel_dist -- self-checking test of the channel distributor.
//
// Two instances, two chains (default) and three chains. Random t_valid and
// t_bit for 500 cycles; a reference phase counter per instance predicts
// which decoder gets each bit (bit k of the stream to decoder k mod n).
// Checks d_valid one-hot on the predicted decoder, zero when no bit, and
// d_bit equal to t_bit, and that every decoder got its share of bits.
module tb_shd_channel_dist;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       t_valid = 1'b0, t_bit = 1'b0;
  logic [1:0] dv2;
  logic [2:0] dv3;
  logic       db2, db3;

  int checks = 0, failures = 0;
  int ph2 = 0, ph3 = 0;
  int got3 [3] = '{0, 0, 0};

  shd_channel_dist dut2 (
    .clk, .rst_n, .t_valid, .t_bit, .d_valid(dv2), .d_bit(db2)
  );
  shd_channel_dist #(.NUM_CHAINS(3)) dut3 (
    .clk, .rst_n, .t_valid, .t_bit, .d_valid(dv3), .d_bit(db3)
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
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      t_valid = ($urandom_range(3) != 0);
      t_bit   = 1'($urandom);
      #1;
      check(dv2 == (t_valid ? 2'(1 << ph2) : 2'b0),
            $sformatf("2 chains: d_valid %b phase %0d", dv2, ph2));
      check(dv3 == (t_valid ? 3'(1 << ph3) : 3'b0),
            $sformatf("3 chains: d_valid %b phase %0d", dv3, ph3));
      check(db2 == t_bit && db3 == t_bit, "d_bit differs from t_bit");
      if (t_valid) begin
        got3[ph3]++;
        ph2 = (ph2 + 1) % 2;
        ph3 = (ph3 + 1) % 3;
      end
      @(negedge clk);
    end
    for (int i = 0; i < 3; i++) check(got3[i] > 100, "a decoder was starved");
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
