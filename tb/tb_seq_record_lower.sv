// tb_seq_record_lower: the four-copy DES lower tier. For random true state S,
// random true inputs X and random r1, r2, the tier is given the encoded
// vectors (g = S ^ r_k, g_n = ~g, t = X ^ r_k, with the default alternating
// rail split). The copy selected by {r1, r2}, XORed with r1, must equal the
// next state and outputs of an unencoded DES logic fed S and X.
module tb_seq_record_lower;
  import des_pkg::*;
  localparam logic [STATE_W+IN_W-1:0] REF2 = {(STATE_W+IN_W+1)/2{2'b10}} >> 1;
  des_state_t s, nxt_ref;
  des_in_t    x;
  des_out_t   out_ref;
  logic [STATE_W-1:0] g, g_n;
  logic [IN_W-1:0]    t;
  logic [STATE_W-1:0] fs [4];
  logic [OUT_W-1:0]   fo [4];
  int checks = 0, failures = 0;

  seq_record_lower #(.REF2(REF2)) dut (.g(g), .g_n(g_n), .t_in(t), .fs(fs), .fo(fo));
  des_logic u_ref (.st(s), .in(x), .nxt(nxt_ref), .out(out_ref));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit r1, r2;
    logic [1:0] sel;
    for (int n = 0; n < 400; n++) begin
      for (int w = 0; w < STATE_W; w++) s[w] = 1'($urandom);
      for (int w = 0; w < IN_W; w++) x[w] = 1'($urandom);
      s.busy = 1'($urandom);
      s.rnd  = 4'($urandom);
      x.start = 1'($urandom);
      r1 = 1'($urandom);
      r2 = 1'($urandom);
      for (int w = 0; w < STATE_W; w++) g[w] = s[w] ^ (REF2[IN_W+w] ? r2 : r1);
      for (int w = 0; w < IN_W; w++) t[w] = x[w] ^ (REF2[w] ? r2 : r1);
      g_n = ~g;
      #1;
      sel = {r1, r2};
      check((fs[sel] ^ {STATE_W{r1}}) == nxt_ref, $sformatf("next state, case %0d sel %0d", n, sel));
      check((fo[sel] ^ {OUT_W{r1}}) == out_ref, $sformatf("outputs, case %0d sel %0d", n, sel));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
