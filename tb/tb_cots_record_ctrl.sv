// tb_cots_record_ctrl: the control chip driving a behavioural DES chip.
// Checked: Trivium seeding and ready; known-answer encryption and
// decryption and random round trips through the encoded black box; the
// 74-clock request latency (4 runs of 1 + 17 clocks, plus 2); that the box
// is started exactly four times per request and is shown the four vectors
// x, x ^ REF2, x ^ ~REF2 and ~x (in some order, the true one unknown to it);
// that the four runs carry the four variants as a permutation, worked out
// from each vector's inversion pattern against the encoded request; and
// that all four selections and at least 16 of the 24 run orders occur.
module tb_cots_record_ctrl;
  localparam logic [128:0] REF2 = {65{2'b10}};
  logic clk = 1'b0, rst = 1'b1;
  logic seed_load = 1'b0, rng_ready;
  logic start, dec, busy, done;
  logic [63:0] key, din, dout;
  logic bb_start, bb_dec, bb_done;
  logic [63:0] bb_key, bb_din, bb_dout;
  int checks = 0, failures = 0, bb_starts = 0;
  logic [128:0] sent [$];
  int sel_seen [4];
  int plain_pos [4];
  int ord_seen [int];

  cots_record_ctrl #(.REF2(REF2)) dut (
    .clk(clk), .rst(rst), .seed_load(seed_load), .seed_key(80'h0123_4567_89AB_CDEF_0F1E),
    .seed_iv(80'hFEDC_BA98_7654_3210_A5A5), .rng_ready(rng_ready),
    .start(start), .dec(dec), .key(key), .din(din), .busy(busy), .done(done), .dout(dout),
    .bb_start(bb_start), .bb_dec(bb_dec), .bb_key(bb_key), .bb_din(bb_din),
    .bb_done(bb_done), .bb_dout(bb_dout));

  des_chip_model u_box (.clk(clk), .rst(rst), .start(bb_start), .dec(bb_dec), .key(bb_key),
                        .din(bb_din), .done(bb_done), .dout(bb_dout));

  always #5 clk = ~clk;

  always @(negedge clk) if (!rst && bb_start) begin
    bb_starts++;
    sent.push_back({bb_dec, bb_key, bb_din});
  end

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

  task automatic run(input logic d, input logic [63:0] k, input logic [63:0] p,
                     output logic [63:0] res, output int cyc);
    logic [128:0] x;
    bit found [4];
    logic [128:0] e, dv;
    logic [1:0] pv [4];
    bit perm;
    int code;
    x = {d, k, p};
    sent.delete();
    start = 1'b1; dec = d; key = k; din = p;
    @(posedge clk);
    #1 start = 1'b0;
    cyc = 1;
    check(busy && !done, "busy after start");
    while (!done && cyc < 400) begin @(posedge clk); #1 cyc++; end
    res = dout;
    check(sent.size() == 4, $sformatf("%0d black-box runs", sent.size()));
    foreach (found[m]) found[m] = 1'b0;
    foreach (sent[i]) begin
      if (sent[i] == x) begin found[0] = 1'b1; plain_pos[i]++; end
      if (sent[i] == (x ^ REF2)) found[1] = 1'b1;
      if (sent[i] == (x ^ ~REF2)) found[2] = 1'b1;
      if (sent[i] == ~x) found[3] = 1'b1;
    end
    check(found[0] && found[1] && found[2] && found[3], "the four encoded vectors");
    sel_seen[{dut.r1, dut.r2}]++;
    e = x ^ (REF2 & {129{dut.r2}}) ^ (~REF2 & {129{dut.r1}});
    perm = (sent.size() == 4);
    code = 0;
    for (int i = 0; i < 4 && perm; i++) begin
      dv = sent[i] ^ e;
      if (dv == '0) pv[i] = 2'd0;
      else if (dv == REF2) pv[i] = 2'd1;
      else if (dv == ~REF2) pv[i] = 2'd2;
      else if (dv == '1) pv[i] = 2'd3;
      else perm = 1'b0;
      code = code * 4 + int'(pv[i]);
    end
    for (int a = 0; a < 4; a++)
      for (int b = a + 1; b < 4; b++) if (perm && pv[a] == pv[b]) perm = 1'b0;
    check(perm, "runs carry the four variants once each");
    if (ord_seen.exists(code)) ord_seen[code]++; else ord_seen[code] = 1;
  endtask

  initial begin
    logic [63:0] res, res2, k, p;
    int cyc, w;
    start = 1'b0; dec = 1'b0; key = '0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(!rng_ready, "generator not ready before seeding");
    seed_load = 1'b1;
    @(posedge clk);
    #1 seed_load = 1'b0;
    w = 0;
    while (!rng_ready && w < 2000) begin @(posedge clk); #1 w++; end
    check(rng_ready, "generator ready");
    run(1'b0, 64'h1334_5779_9BBC_DFF1, 64'h0123_4567_89AB_CDEF, res, cyc);
    check(res == 64'h85E8_1354_0F0A_B405, $sformatf("KAT1 enc %h", res));
    check(cyc == 74, $sformatf("latency %0d, expected 74", cyc));
    run(1'b1, 64'h1334_5779_9BBC_DFF1, 64'h85E8_1354_0F0A_B405, res, cyc);
    check(res == 64'h0123_4567_89AB_CDEF, $sformatf("KAT1 dec %h", res));
    run(1'b0, 64'h0E32_9232_EA6D_0D73, 64'h8787_8787_8787_8787, res, cyc);
    check(res == 64'h0, $sformatf("KAT2 enc %h", res));
    for (int n = 0; n < 30; n++) begin
      k = {$urandom, $urandom};
      p = {$urandom, $urandom};
      run(1'b0, k, p, res, cyc);
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #1 run(1'b1, k, res, res2, cyc);
      check(res2 == p && res != p, $sformatf("round trip %0d", n));
    end
    for (int v = 0; v < 4; v++) check(sel_seen[v] > 5, $sformatf("selection %0d used %0d times", v, sel_seen[v]));
    check(ord_seen.num() >= 16, $sformatf("%0d of 24 run orders used", ord_seen.num()));
    for (int v = 0; v < 4; v++) check(plain_pos[v] > 5, $sformatf("true vector sent in run %0d %0d times", v, plain_pos[v]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
