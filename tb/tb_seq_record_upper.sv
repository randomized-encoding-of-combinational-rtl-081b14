// tb_seq_record_upper: the generic upper tier at a small size (4 state,
// 4 input, 4 output bits) closed around a testbench-side lower tier: four
// copies of a toy machine (state <= state + input, output = state ^ 4'hA)
// built with the variant inversion patterns. The single-rail output must
// follow an unencoded copy of the toy machine every clock while r1, r2
// change freely; all four demux selections must occur. Half of the state
// bits are stored referred to r2 (OUTREF2), half to r1.
module tb_seq_record_upper;
  localparam int W = 4;
  localparam logic [2*W-1:0] REF2 = 8'b1010_1010;
  logic clk = 1'b0, rst = 1'b1;
  logic [W-1:0] x, t, g, g_n, y, s_ref;
  logic [W-1:0] fs [4];
  logic [W-1:0] fo [4];
  int checks = 0, failures = 0;
  int sel_seen [4];

  seq_record_upper #(.S_W(W), .I_W(W), .O_W(W), .REF2(REF2), .OUTREF2(4'b0110)) dut (
    .clk(clk), .rst(rst), .x_in(x), .t_in(t), .g(g), .g_n(g_n), .fs(fs), .fo(fo), .y(y));

  // Lower tier of the toy machine.
  always_comb begin
    logic [W-1:0] sv, xv;
    for (int v = 0; v < 4; v++) begin
      for (int i = 0; i < W; i++) begin
        sv[i] = (REF2[W+i] ? v[0] : v[1]) ? g_n[i] : g[i];
        xv[i] = t[i] ^ (REF2[i] ? v[0] : v[1]);
      end
      fs[v] = (sv + xv) ^ {W{v[1]}};
      fo[v] = (sv ^ 4'hA) ^ {W{v[1]}};
    end
  end

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
    x = '0;
    s_ref = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      x = 4'($urandom);
      #1;
      check(y == (s_ref ^ 4'hA), $sformatf("output at clock %0d: %h vs %h", n, y, s_ref ^ 4'hA));
      sel_seen[{dut.r1, dut.r2}]++;
      @(posedge clk);
      s_ref = s_ref + x;
      #1;
    end
    for (int v = 0; v < 4; v++) check(sel_seen[v] > 150, $sformatf("selection %0d used %0d times", v, sel_seen[v]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
