// tb_record_top: end-to-end test of the top level at its default
// parameters, all four schemes running at the same time.
//   S-box:  every byte value and random bytes, y = AES S-box of x.
//   Sequential DES, TDM DES and the COTS controller (with a behavioural DES
//           chip on its black-box ports): known-answer vectors, random
//           encrypt/decrypt round trips and the latencies 17, 90 and 74.
// Mechanism counters: S-box random bit 0 and 1; sequential r1 changes
// (re-indexing) and each of the four selections; TDM presentation orders
// and selections; COTS generator warm-up, four black-box runs per request
// and selections; encryption and decryption in each DES scheme. A mechanism
// that never happened counts as a failure.
module tb_record_top;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0]  sbox_x, sbox_y;
  logic        seq_start, seq_dec, seq_done;
  logic [63:0] seq_key, seq_din, seq_dout;
  logic        tdm_step, tdm_start, tdm_dec, tdm_done;
  logic [63:0] tdm_key, tdm_din, tdm_dout;
  logic        cots_seed_load, cots_rng_ready, cots_start, cots_dec, cots_busy, cots_done;
  logic [63:0] cots_key, cots_din, cots_dout;
  logic        bb_start, bb_dec, bb_done;
  logic [63:0] bb_key, bb_din, bb_dout;
  int checks = 0, failures = 0;
  int sbox_r [2];
  int seq_sel [4], tdm_sel [4], tdm_ord [24], cots_sel [4];
  int tdm_orders = 0;
  int seq_reindex = 0, bb_runs = 0, cots_warm = 0;
  int enc_ops [3], dec_ops [3];

  record_top dut (
    .clk(clk), .rst(rst),
    .sbox_x(sbox_x), .sbox_y(sbox_y),
    .seq_start(seq_start), .seq_dec(seq_dec), .seq_key(seq_key), .seq_din(seq_din),
    .seq_dout(seq_dout), .seq_done(seq_done),
    .tdm_step(tdm_step), .tdm_start(tdm_start), .tdm_dec(tdm_dec), .tdm_key(tdm_key),
    .tdm_din(tdm_din), .tdm_dout(tdm_dout), .tdm_done(tdm_done),
    .cots_seed_load(cots_seed_load), .cots_seed_key(80'h1111_2222_3333_4444_5555),
    .cots_seed_iv(80'h9999_8888_7777_6666_5555), .cots_rng_ready(cots_rng_ready),
    .cots_start(cots_start), .cots_dec(cots_dec), .cots_key(cots_key), .cots_din(cots_din),
    .cots_busy(cots_busy), .cots_done(cots_done), .cots_dout(cots_dout),
    .cots_bb_start(bb_start), .cots_bb_dec(bb_dec), .cots_bb_key(bb_key),
    .cots_bb_din(bb_din), .cots_bb_done(bb_done), .cots_bb_dout(bb_dout));

  des_chip_model u_box (.clk(clk), .rst(rst), .start(bb_start), .dec(bb_dec), .key(bb_key),
                        .din(bb_din), .done(bb_done), .dout(bb_dout));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst) begin
    sbox_r[dut.u_sbox.u_io.r]++;
    seq_sel[{dut.u_seq.u_upper.r1, dut.u_seq.u_upper.r2}]++;
    if (dut.u_seq.u_upper.r1 != dut.u_seq.u_upper.r1_prev) seq_reindex++;
    if (tdm_step) begin
      tdm_sel[{dut.u_tdm.u_upper.r1, dut.u_tdm.u_upper.r2}]++;
      tdm_ord[dut.u_tdm.u_upper.ord]++;
    end
    if (bb_start) bb_runs++;
  end

  // Known answers, then random round trips. Index 0 = sequential, 1 = TDM,
  // 2 = COTS.
  function automatic void kat(input int n, output logic d, output logic [63:0] k,
                              output logic [63:0] p, output logic [63:0] c);
    case (n)
      0: begin d = 1'b0; k = 64'h1334_5779_9BBC_DFF1; p = 64'h0123_4567_89AB_CDEF; c = 64'h85E8_1354_0F0A_B405; end
      1: begin d = 1'b1; k = 64'h1334_5779_9BBC_DFF1; p = 64'h85E8_1354_0F0A_B405; c = 64'h0123_4567_89AB_CDEF; end
      default: begin d = 1'b0; k = 64'h0E32_9232_EA6D_0D73; p = 64'h8787_8787_8787_8787; c = 64'h0; end
    endcase
  endfunction

  task automatic seq_run(input logic d, input logic [63:0] k, input logic [63:0] p,
                         output logic [63:0] res, output int cyc);
    seq_start = 1'b1; seq_dec = d; seq_key = k; seq_din = p;
    @(posedge clk);
    #1 seq_start = 1'b0;
    cyc = 1;
    while (!seq_done && cyc < 200) begin @(posedge clk); #1 cyc++; end
    res = seq_dout;
    if (d) dec_ops[0]++; else enc_ops[0]++;
  endtask

  task automatic tdm_run(input logic d, input logic [63:0] k, input logic [63:0] p,
                         output logic [63:0] res, output int cyc);
    while (!tdm_step) begin @(posedge clk); #1; end
    tdm_start = 1'b1; tdm_dec = d; tdm_key = k; tdm_din = p;
    @(posedge clk);
    #1 tdm_start = 1'b0;
    cyc = 1;
    while (tdm_done && cyc < 400) begin @(posedge clk); #1 cyc++; end
    while (!tdm_done && cyc < 400) begin @(posedge clk); #1 cyc++; end
    res = tdm_dout;
    if (d) dec_ops[1]++; else enc_ops[1]++;
  endtask

  task automatic cots_run(input logic d, input logic [63:0] k, input logic [63:0] p,
                          output logic [63:0] res, output int cyc);
    int runs0;
    runs0 = bb_runs;
    cots_start = 1'b1; cots_dec = d; cots_key = k; cots_din = p;
    @(posedge clk);
    #1 cots_start = 1'b0;
    cyc = 1;
    while (!cots_done && cyc < 400) begin @(posedge clk); #1 cyc++; end
    res = cots_dout;
    check(bb_runs - runs0 == 4, $sformatf("COTS used %0d black-box runs", bb_runs - runs0));
    cots_sel[{dut.u_cots.r1, dut.u_cots.r2}]++;
    if (d) dec_ops[2]++; else enc_ops[2]++;
  endtask

  initial begin
    sbox_x = '0;
    seq_start = 1'b0; seq_dec = 1'b0; seq_key = '0; seq_din = '0;
    tdm_start = 1'b0; tdm_dec = 1'b0; tdm_key = '0; tdm_din = '0;
    cots_seed_load = 1'b0; cots_start = 1'b0; cots_dec = 1'b0; cots_key = '0; cots_din = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    fork
      begin : sbox_thread
        for (int n = 0; n < 2000; n++) begin
          sbox_x = (n < 256) ? 8'(n) : 8'($urandom);
          #1 check(sbox_y == sbox_ref(sbox_x), $sformatf("S-box %h -> %h", sbox_x, sbox_y));
          @(posedge clk);
          #1;
        end
      end
      begin : seq_thread
        logic d; logic [63:0] k, p, c, res, res2; int cyc;
        for (int n = 0; n < 3; n++) begin
          kat(n, d, k, p, c);
          seq_run(d, k, p, res, cyc);
          check(res == c, $sformatf("sequential KAT %0d: %h", n, res));
          check(cyc == 17, $sformatf("sequential latency %0d", cyc));
        end
        for (int n = 0; n < 10; n++) begin
          k = {$urandom, $urandom}; p = {$urandom, $urandom};
          seq_run(1'b0, k, p, res, cyc);
          seq_run(1'b1, k, res, res2, cyc);
          check(res2 == p && res != p, $sformatf("sequential round trip %0d", n));
        end
      end
      begin : tdm_thread
        logic d; logic [63:0] k, p, c, res, res2; int cyc;
        for (int n = 0; n < 3; n++) begin
          kat(n, d, k, p, c);
          tdm_run(d, k, p, res, cyc);
          check(res == c, $sformatf("TDM KAT %0d: %h", n, res));
          check(cyc == 90, $sformatf("TDM latency %0d", cyc));
        end
        for (int n = 0; n < 6; n++) begin
          k = {$urandom, $urandom}; p = {$urandom, $urandom};
          tdm_run(1'b0, k, p, res, cyc);
          tdm_run(1'b1, k, res, res2, cyc);
          check(res2 == p && res != p, $sformatf("TDM round trip %0d", n));
        end
      end
      begin : cots_thread
        logic d; logic [63:0] k, p, c, res, res2; int cyc;
        cots_seed_load = 1'b1;
        @(posedge clk);
        #1 cots_seed_load = 1'b0;
        while (!cots_rng_ready && cots_warm < 2000) begin @(posedge clk); #1 cots_warm++; end
        check(cots_rng_ready, "COTS generator ready");
        for (int n = 0; n < 3; n++) begin
          kat(n, d, k, p, c);
          cots_run(d, k, p, res, cyc);
          check(res == c, $sformatf("COTS KAT %0d: %h", n, res));
          check(cyc == 74, $sformatf("COTS latency %0d", cyc));
        end
        for (int n = 0; n < 12; n++) begin
          k = {$urandom, $urandom}; p = {$urandom, $urandom};
          cots_run(1'b0, k, p, res, cyc);
          cots_run(1'b1, k, res, res2, cyc);
          check(res2 == p && res != p, $sformatf("COTS round trip %0d", n));
        end
      end
    join
    // Mechanisms.
    check(sbox_r[0] > 0 && sbox_r[1] > 0, $sformatf("S-box random bit 0/1: %0d/%0d", sbox_r[0], sbox_r[1]));
    check(seq_reindex > 0, $sformatf("sequential re-indexing on r1 change: %0d", seq_reindex));
    check(cots_warm > 0, $sformatf("COTS generator warm-up clocks: %0d", cots_warm));
    for (int v = 0; v < 4; v++) begin
      check(seq_sel[v] > 0, $sformatf("sequential selection %0d: %0d", v, seq_sel[v]));
      check(tdm_sel[v] > 0, $sformatf("TDM selection %0d: %0d", v, tdm_sel[v]));
      check(cots_sel[v] > 0, $sformatf("COTS selection %0d: %0d", v, cots_sel[v]));
    end
    for (int o = 0; o < 24; o++) if (tdm_ord[o] > 0) tdm_orders++;
    check(tdm_orders == 24, $sformatf("TDM presentation orders used: %0d of 24", tdm_orders));
    for (int s = 0; s < 3; s++) check(enc_ops[s] > 0 && dec_ops[s] > 0, $sformatf("scheme %0d enc/dec", s));
    $display("mechanisms: sbox r0/r1 %0d/%0d, seq re-index %0d, TDM orders %0d, bb runs %0d, cots warm-up %0d clocks",
             sbox_r[0], sbox_r[1], seq_reindex, tdm_orders, bb_runs, cots_warm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
