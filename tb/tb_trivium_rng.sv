// tb_trivium_rng: compares the Trivium generator with a bit-serial model
// kept as three separate registers A (93), B (84) and C (111), checks that
// ready rises after the 1152 warm-up steps (288 clocks at 4 bits/clock),
// that z only advances on en, and that a reload restarts the stream.
module tb_trivium_rng;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0, en = 1'b0, ready;
  logic [79:0] key, iv;
  logic [3:0] z;
  int checks = 0, failures = 0;
  bit a [1:93];
  bit b [1:84];
  bit c [1:111];

  trivium_rng #(.BITS(4)) dut (.clk(clk), .rst(rst), .load(load), .key(key), .iv(iv),
                               .en(en), .ready(ready), .z(z));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit ref_step();
    bit t1, t2, t3, zz;
    t1 = a[66] ^ a[93];
    t2 = b[69] ^ b[84];
    t3 = c[66] ^ c[111];
    zz = t1 ^ t2 ^ t3;
    t1 = t1 ^ (a[91] & a[92]) ^ b[78];
    t2 = t2 ^ (b[82] & b[83]) ^ c[87];
    t3 = t3 ^ (c[109] & c[110]) ^ a[69];
    for (int i = 93; i > 1; i--) a[i] = a[i-1];
    for (int i = 84; i > 1; i--) b[i] = b[i-1];
    for (int i = 111; i > 1; i--) c[i] = c[i-1];
    a[1] = t3;
    b[1] = t1;
    c[1] = t2;
    return zz;
  endfunction

  task automatic ref_init();
    for (int i = 1; i <= 93; i++) a[i] = (i <= 80) ? key[i-1] : 1'b0;
    for (int i = 1; i <= 84; i++) b[i] = (i <= 80) ? iv[i-1] : 1'b0;
    for (int i = 1; i <= 111; i++) c[i] = (i >= 109);
    for (int i = 0; i < 1152; i++) void'(ref_step());
  endtask

  task automatic do_load();
    int cyc;
    load = 1'b1;
    @(posedge clk);
    #1 load = 1'b0;
    cyc = 0;
    while (!ready && cyc < 1000) begin @(posedge clk); #1 cyc++; end
    check(cyc == 288, $sformatf("warm-up took %0d clocks", cyc));
    ref_init();
  endtask

  initial begin
    logic [3:0] exp_z, first;
    int ones;
    key = {$urandom, $urandom, 16'(($urandom))};
    iv  = {$urandom, $urandom, 16'(($urandom))};
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(!ready, "not ready before load");
    do_load();
    ones = 0;
    for (int n = 0; n < 200; n++) begin
      en = 1'($urandom);
      for (int k = 0; k < 4; k++) exp_z[k] = ref_step();
      check(z == exp_z, $sformatf("keystream word %0d: %h vs %h", n, z, exp_z));
      if (n == 0) first = z;
      ones += $countones(z);
      if (!en) begin
        // z must not move: undo the model by re-checking next clock.
        @(posedge clk);
        #1 check(z == exp_z, $sformatf("hold at word %0d", n));
        en = 1'b1;
      end
      @(posedge clk);
      #1 en = 1'b0;
    end
    check(ones > 300 && ones < 500, $sformatf("balance %0d ones of 800", ones));
    do_load();
    check(z == first, "reload restarts the stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
