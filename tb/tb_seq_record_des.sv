// tb_seq_record_des: the sequential-scheme DES runs in lock-step with an
// unprotected reference engine fed the same inputs; dout and done must match
// in every clock. Known-answer vectors are checked for encryption and
// decryption, the start-to-done latency must be 17 clocks, and random
// requests (some with start held while busy) exercise the rest. The random
// bits must change and all four demux selections must be used.
module tb_seq_record_des;
  logic clk = 1'b0, rst = 1'b1;
  logic start, dec, done, done_ref;
  logic [63:0] key, din, dout, dout_ref;
  int checks = 0, failures = 0, r1_changes = 0;
  int sel_seen [4];

  seq_record_des dut (.clk(clk), .rst(rst), .start(start), .dec(dec), .key(key), .din(din),
                      .dout(dout), .done(done));
  des_chip_model u_ref (.clk(clk), .rst(rst), .start(start), .dec(dec), .key(key), .din(din),
                        .done(done_ref), .dout(dout_ref));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Lock-step comparison and mechanism counters.
  always @(negedge clk) if (!rst) begin
    check(done == done_ref && (!done_ref || dout == dout_ref), "lock-step with reference");
    sel_seen[{dut.u_upper.r1, dut.u_upper.r2}]++;
    if (dut.u_upper.r1 != dut.u_upper.r1_prev) r1_changes++;
  end

  task automatic run(input logic d, input logic [63:0] k, input logic [63:0] p,
                     output logic [63:0] res, output int cyc);
    start = 1'b1; dec = d; key = k; din = p;
    @(posedge clk);
    #1 start = 1'b0;
    cyc = 1;
    while (!done && cyc < 100) begin @(posedge clk); #1 cyc++; end
    res = dout;
  endtask

  initial begin
    logic [63:0] res, res2, k, p;
    int cyc;
    start = 1'b0; dec = 1'b0; key = '0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    run(1'b0, 64'h1334_5779_9BBC_DFF1, 64'h0123_4567_89AB_CDEF, res, cyc);
    check(res == 64'h85E8_1354_0F0A_B405, $sformatf("KAT1 enc %h", res));
    check(cyc == 17, $sformatf("latency %0d", cyc));
    run(1'b1, 64'h1334_5779_9BBC_DFF1, 64'h85E8_1354_0F0A_B405, res, cyc);
    check(res == 64'h0123_4567_89AB_CDEF, $sformatf("KAT1 dec %h", res));
    run(1'b0, 64'h0E32_9232_EA6D_0D73, 64'h8787_8787_8787_8787, res, cyc);
    check(res == 64'h0, $sformatf("KAT2 enc %h", res));
    for (int n = 0; n < 12; n++) begin
      k = {$urandom, $urandom};
      p = {$urandom, $urandom};
      run(1'b0, k, p, res, cyc);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1 run(1'b1, k, res, res2, cyc);
      check(res2 == p, $sformatf("round trip %0d", n));
    end
    // Random stimulus, start toggling freely (ignored while busy).
    for (int n = 0; n < 400; n++) begin
      start = 1'($urandom_range(0, 9) == 0);
      dec = 1'($urandom);
      key = {$urandom, $urandom};
      din = {$urandom, $urandom};
      @(posedge clk);
      #1;
    end
    for (int v = 0; v < 4; v++) check(sel_seen[v] > 50, $sformatf("selection %0d used %0d times", v, sel_seen[v]));
    check(r1_changes > 100, $sformatf("r1 changed %0d times", r1_changes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
