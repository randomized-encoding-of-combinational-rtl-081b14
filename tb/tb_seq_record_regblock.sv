// tb_seq_record_regblock: drives four register blocks, re-indexing to r1
// or r2 and storing referred to r1 or r2, with fresh random r1, r2 every
// clock. Only the copy selected by {r1, r2} carries the true bit x ^ r1;
// the other three carry noise. One clock later g must equal x ^ r1 (resp.
// x ^ r2) for the new random bits and g_n its inverse; the blocks storing
// against r2 must hold x ^ r2 in their flip-flop. Reset must give the
// encoded value 0.
module tb_seq_record_regblock;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] f;
  logic r1, r2, r1_prev, r2_prev;
  logic g1, g1_n, g2, g2_n, g3, g3_n, g4, g4_n;
  int checks = 0, failures = 0, reindexed = 0;

  seq_record_regblock #(.USE_R2(1'b0)) dut1 (.clk(clk), .rst(rst), .f(f), .r1(r1), .r2(r2),
    .r1_prev(r1_prev), .r2_prev(r2_prev), .g(g1), .g_n(g1_n));
  seq_record_regblock #(.USE_R2(1'b1)) dut2 (.clk(clk), .rst(rst), .f(f), .r1(r1), .r2(r2),
    .r1_prev(r1_prev), .r2_prev(r2_prev), .g(g2), .g_n(g2_n));
  seq_record_regblock #(.USE_R2(1'b0), .OUT_R2(1'b1)) dut3 (.clk(clk), .rst(rst), .f(f),
    .r1(r1), .r2(r2), .r1_prev(r1_prev), .r2_prev(r2_prev), .g(g3), .g_n(g3_n));
  seq_record_regblock #(.USE_R2(1'b1), .OUT_R2(1'b1)) dut4 (.clk(clk), .rst(rst), .f(f),
    .r1(r1), .r2(r2), .r1_prev(r1_prev), .r2_prev(r2_prev), .g(g4), .g_n(g4_n));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit x, x_prev;
    r1 = 1'b0; r2 = 1'b0; r1_prev = 1'b0; r2_prev = 1'b0; f = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(g1 == 1'b0 && g2 == 1'b0 && g3 == 1'b0 && g4 == 1'b0, "reset encodes 0");
    x_prev = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      // Present x for this clock, encoded against the current r1.
      x = 1'($urandom);
      f = 4'($urandom);
      f[{r1, r2}] = x ^ r1;
      @(posedge clk);
      #1;
      check(dut3.q == (x ^ r2) && dut4.q == (x ^ r2), $sformatf("stored against r2 at %0d", n));
      r1_prev = r1;
      r2_prev = r2;
      r1 = 1'($urandom);
      r2 = 1'($urandom);
      #1;
      if (r1 != r1_prev) reindexed++;
      check(g1 == (x ^ r1), $sformatf("g tied to r1 at %0d", n));
      check(g2 == (x ^ r2), $sformatf("g tied to r2 at %0d", n));
      check(g3 == (x ^ r1), $sformatf("r2-stored g tied to r1 at %0d", n));
      check(g4 == (x ^ r2), $sformatf("r2-stored g tied to r2 at %0d", n));
      check(g1_n == ~g1 && g2_n == ~g2 && g3_n == ~g3 && g4_n == ~g4, "g_n");
    end
    check(reindexed > 300, $sformatf("r1 changed %0d times", reindexed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
