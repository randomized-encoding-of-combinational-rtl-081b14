// tb_tdm_record_upper: the generic time-multiplexed upper tier at a small
// size (4 state, 4 input, 4 output bits) around a testbench-side single
// lower-tier copy of a toy machine (state <= state + input, output =
// state ^ 4'hA). Inputs change once per five-clock step; y must show the
// toy machine's output of the previous step. Also checked: the step is five
// clocks long, the lower tier is shown four different encodings per step,
// all four demux selections occur, and the variants of a step form a
// permutation. The variant sent in each slot is worked out from the input
// part of the lower-tier vector (its inversion pattern against x ^ r); all
// 24 presentation orders must occur, among them 1, 2, 0, 3.
module tb_tdm_record_upper;
  localparam int W = 4;
  localparam logic [2*W-1:0] REF2 = 8'b1010_1010;
  logic clk = 1'b0, rst = 1'b1, step;
  logic [W-1:0] x, y, s_ref, prev_out;
  logic [2*W-1:0] lo_in;
  logic [2*W-1:0] lo_out;
  int checks = 0, failures = 0;
  int sel_seen [4];
  int ord_seen [int];

  tdm_record_upper #(.S_W(W), .I_W(W), .O_W(W), .REF2(REF2)) dut (
    .clk(clk), .rst(rst), .x_in(x), .step(step), .lo_in(lo_in), .lo_out(lo_out), .y(y));

  assign lo_out = {lo_in[2*W-1:W] + lo_in[W-1:0], lo_in[2*W-1:W] ^ 4'hA};

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*W-1:0] seen [4];
    logic [W-1:0] xs, t_exp, d;
    logic [1:0] pv [4];
    bit distinct, perm;
    int code;
    x = '0;
    s_ref = '0;
    prev_out = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 400; n++) begin
      check(step, $sformatf("step at start of step %0d", n));
      if (n > 0) check(y == prev_out, $sformatf("output of step %0d: %h vs %h", n - 1, y, prev_out));
      x = 4'($urandom);
      xs = x;
      #1;   // let the encoded vector settle before it is sampled
      sel_seen[{dut.r1, dut.r2}]++;
      for (int i = 0; i < W; i++) t_exp[i] = xs[i] ^ (REF2[i] ? dut.r2 : dut.r1);
      for (int k = 0; k < 5; k++) begin
        if (k < 4) seen[k] = lo_in;
        if (k > 0) check(!step, "no step inside a step");
        @(posedge clk);
        #1;
        if (k == 0) x = 4'($urandom);   // input only sampled in phase 0
      end
      distinct = 1'b1;
      for (int a = 0; a < 4; a++)
        for (int b = a + 1; b < 4; b++) if (seen[a] == seen[b]) distinct = 1'b0;
      check(distinct, "four different encodings per step");
      // Input inversion of variant {v1, v0}: ~REF2 bits if v1, REF2 bits if v0.
      code = 0;
      perm = 1'b1;
      for (int k = 0; k < 4; k++) begin
        d = seen[k][W-1:0] ^ t_exp;
        if (d == 4'h0) pv[k] = 2'd0;
        else if (d == REF2[W-1:0]) pv[k] = 2'd1;
        else if (d == ~REF2[W-1:0]) pv[k] = 2'd2;
        else if (d == 4'hF) pv[k] = 2'd3;
        else perm = 1'b0;
        code = code * 4 + int'(pv[k]);
      end
      for (int a = 0; a < 4; a++)
        for (int b = a + 1; b < 4; b++) if (pv[a] == pv[b]) perm = 1'b0;
      check(perm, $sformatf("step %0d: slots carry variants %0d %0d %0d %0d", n, pv[0], pv[1], pv[2], pv[3]));
      if (ord_seen.exists(code)) ord_seen[code]++; else ord_seen[code] = 1;
      prev_out = s_ref ^ 4'hA;
      s_ref = s_ref + xs;
    end
    for (int v = 0; v < 4; v++) check(sel_seen[v] > 50, $sformatf("selection %0d used %0d times", v, sel_seen[v]));
    check(ord_seen.num() == 24, $sformatf("%0d of 24 presentation orders used", ord_seen.num()));
    check(ord_seen.exists(1 * 64 + 2 * 16 + 0 * 4 + 3), "order 1, 2, 0, 3 used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
