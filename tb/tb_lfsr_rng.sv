// tb_lfsr_rng: checks the random bit generator. The first output bit must
// be the seed's LSB; the serial output must obey the linear
// recurrence of x^32 + x^22 + x^2 + x + 1 in this shift direction,
// s[n+32] = s[n+31] ^ s[n+30] ^ s[n+10] ^ s[n]; en = 0 must freeze it; and
// the two output bits of a wider port must be consecutive states' LSBs.
module tb_lfsr_rng;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [1:0] rnd;
  int checks = 0, failures = 0;
  bit s [400];

  lfsr_rng #(.SEED(32'hACE1_2468), .OUT_W(2)) dut (.clk(clk), .rst(rst), .en(en), .rnd_o(rnd));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [1:0] held;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    en = 1'b1;
    for (int n = 0; n < 400; n++) begin
      s[n] = rnd[0];
      if (n > 0) check(rnd[0] == (held[1] ^ held[0]), $sformatf("bit1 of state %0d", n - 1));
      held = rnd;
      @(posedge clk);
      #1;
    end
    check(s[0] == 1'b0, "first output is the seed LSB");
    for (int n = 0; n + 32 < 400; n++)
      check(s[n+32] == (s[n+31] ^ s[n+30] ^ s[n+10] ^ s[n]), $sformatf("recurrence at %0d", n));
    en = 1'b0;
    held = rnd;
    repeat (5) @(posedge clk);
    #1 check(rnd == held, "hold with en = 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
