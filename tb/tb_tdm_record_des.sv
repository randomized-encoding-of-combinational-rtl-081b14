// tb_tdm_record_des: the time-multiplexed DES. Requests are given in the
// clock where step = 1. Known-answer vectors for encryption and decryption,
// random round trips, the 90-clock start-to-done latency (five clocks per
// DES clock, plus the registered output) and the five-clock step period are
// checked; the random bits, all four demux selections and all 24
// presentation orders must be used.
module tb_tdm_record_des;
  logic clk = 1'b0, rst = 1'b1;
  logic step, start, dec, done;
  logic [63:0] key, din, dout;
  int checks = 0, failures = 0;
  int sel_seen [4];
  int ord_seen [24];
  int last_step = -1, cycle = 0;

  tdm_record_des dut (.clk(clk), .rst(rst), .step(step), .start(start), .dec(dec), .key(key),
                      .din(din), .dout(dout), .done(done));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst) begin
    cycle++;
    if (step) begin
      if (last_step >= 0 && cycle - last_step != 5) begin
        checks++;
        failures++;
        $display("FAIL: step period %0d", cycle - last_step);
      end
      last_step = cycle;
      sel_seen[{dut.u_upper.r1, dut.u_upper.r2}]++;
      ord_seen[dut.u_upper.ord]++;
    end
  end

  task automatic run(input logic d, input logic [63:0] k, input logic [63:0] p,
                     output logic [63:0] res, output int cyc);
    bit was_done;
    while (!step) begin @(posedge clk); #1; end
    was_done = done;
    start = 1'b1; dec = d; key = k; din = p;
    @(posedge clk);
    #1 start = 1'b0;
    key = {$urandom, $urandom};
    din = {$urandom, $urandom};
    cyc = 1;
    // done of the previous request stays visible until the registered
    // outputs catch up with the load, ten clocks later.
    while (done && cyc < 200) begin @(posedge clk); #1 cyc++; end
    if (was_done) check(cyc == 10, $sformatf("done fell after %0d clocks, expected 10", cyc));
    while (!done && cyc < 200) begin @(posedge clk); #1 cyc++; end
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
    check(cyc == 90, $sformatf("latency %0d, expected 90", cyc));
    run(1'b1, 64'h1334_5779_9BBC_DFF1, 64'h85E8_1354_0F0A_B405, res, cyc);
    check(res == 64'h0123_4567_89AB_CDEF, $sformatf("KAT1 dec %h", res));
    run(1'b0, 64'h0E32_9232_EA6D_0D73, 64'h8787_8787_8787_8787, res, cyc);
    check(res == 64'h0, $sformatf("KAT2 enc %h", res));
    for (int n = 0; n < 8; n++) begin
      k = {$urandom, $urandom};
      p = {$urandom, $urandom};
      run(1'b0, k, p, res, cyc);
      run(1'b1, k, res, res2, cyc);
      check(res2 == p && res != p, $sformatf("round trip %0d", n));
    end
    for (int v = 0; v < 4; v++) check(sel_seen[v] > 20, $sformatf("selection %0d used %0d times", v, sel_seen[v]));
    for (int v = 0; v < 24; v++) check(ord_seen[v] > 0, $sformatf("order %0d used %0d times", v, ord_seen[v]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
