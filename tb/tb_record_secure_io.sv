// tb_record_secure_io: drives the secure I/O ring with a stand-in core
// (f0 = h(t), f1 = ~h(t ^ mask) for an arbitrary byte function h) and checks
// that y = h(x) in every clock, that the core only sees x or x ^ mask (one
// shared random bit), that both values of the random bit occur and that the
// unconverted inputs pass unchanged.
module tb_record_secure_io;
  import tb_ref_pkg::*;
  localparam logic [7:0] MASK = 8'b1010_0110;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] x, t, f0, f1, y;
  int checks = 0, failures = 0, seen_r0 = 0, seen_r1 = 0, flips = 0;
  bit last_r;

  function automatic logic [7:0] h(input logic [7:0] v);
    return sbox_ref(v) ^ {v[3:0], v[7:4]};
  endfunction

  record_secure_io #(.W_IN(8), .W_OUT(8), .DR_MASK(MASK)) dut (
    .clk(clk), .rst(rst), .x(x), .t(t), .f0(f0), .f1(f1), .y(y));

  assign f0 = h(t);
  assign f1 = ~h(t ^ MASK);

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
    bit r;
    x = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      x = 8'($urandom);
      #1;
      check(y == h(x), $sformatf("y at clock %0d", n));
      check((t ^ x) == 8'h00 || (t ^ x) == MASK, "shared random bit");
      r = ((t ^ x) == MASK);
      if (r) seen_r1++; else seen_r0++;
      if (n > 0 && r != last_r) flips++;
      last_r = r;
      @(posedge clk);
      #1;
    end
    check(seen_r0 > 150 && seen_r1 > 150, $sformatf("r balance %0d/%0d", seen_r0, seen_r1));
    check(flips > 100, $sformatf("r changed %0d times", flips));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
