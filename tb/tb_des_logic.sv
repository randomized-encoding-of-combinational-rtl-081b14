// tb_des_logic: self-checking test of the DES intermediate logic.
//
// The logic is closed into a loop with a plain state register, as in the
// unprotected engine. Known-answer vectors (from the DES literature) are
// encrypted and decrypted, random blocks are checked for round-trip
// decrypt(encrypt(x)) = x, the 17-clock latency is measured, a start while
// busy must be ignored, and the idle state must hold.
module tb_des_logic;
  import des_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  des_state_t st, nxt;
  des_in_t    in;
  des_out_t   out;
  int checks = 0, failures = 0;

  des_logic dut (.st(st), .in(in), .nxt(nxt), .out(out));

  always #5 clk = ~clk;
  always_ff @(posedge clk) st <= rst ? '0 : nxt;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input logic dec, input logic [63:0] key, input logic [63:0] din,
                     output logic [63:0] dout, output int cycles);
    in = '{start: 1'b1, dec: dec, key: key, din: din};
    @(posedge clk);
    #1 in.start = 1'b0;
    cycles = 1;
    while (!out.done && cycles < 100) begin
      @(posedge clk);
      #1 cycles++;
    end
    dout = out.dout;
  endtask

  initial begin
    logic [63:0] res, res2, k, p;
    int cyc;
    in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    run(1'b0, 64'h1334_5779_9BBC_DFF1, 64'h0123_4567_89AB_CDEF, res, cyc);
    check(res == 64'h85E8_1354_0F0A_B405, $sformatf("KAT1 enc %h", res));
    check(cyc == 17, $sformatf("latency %0d, expected 17", cyc));
    // Held while idle.
    repeat (3) @(posedge clk);
    #1 check(out.done && out.dout == 64'h85E8_1354_0F0A_B405, "idle hold");
    run(1'b1, 64'h1334_5779_9BBC_DFF1, 64'h85E8_1354_0F0A_B405, res, cyc);
    check(res == 64'h0123_4567_89AB_CDEF, $sformatf("KAT1 dec %h", res));
    run(1'b0, 64'h0E32_9232_EA6D_0D73, 64'h8787_8787_8787_8787, res, cyc);
    check(res == 64'h0, $sformatf("KAT2 enc %h", res));
    // A start during busy is ignored.
    in = '{start: 1'b1, dec: 1'b0, key: 64'h1334_5779_9BBC_DFF1, din: 64'h0123_4567_89AB_CDEF};
    @(posedge clk);
    #1 in.din = 64'hFFFF_FFFF_FFFF_FFFF;
    repeat (3) @(posedge clk);
    #1 in.start = 1'b0;
    while (!out.done) @(posedge clk);
    #1 check(out.dout == 64'h85E8_1354_0F0A_B405, "start while busy ignored");
    for (int n = 0; n < 20; n++) begin
      k = {$urandom, $urandom};
      p = {$urandom, $urandom};
      run(1'b0, k, p, res, cyc);
      run(1'b1, k, res, res2, cyc);
      check(res2 == p && res != p, $sformatf("round trip %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
