// tb_record_sbox: the complete combinational scheme. For all eight inputs
// converted and for two converted inputs, a random byte is applied every
// clock and y must equal the AES S-box of it whatever the random bit is;
// the core input must differ from x in about half of the clocks.
module tb_record_sbox;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] x, y_a, y_b;
  int checks = 0, failures = 0, hidden = 0;

  record_sbox #(.DR_MASK(8'hFF)) dut_a (.clk(clk), .rst(rst), .x(x), .y(y_a));
  record_sbox #(.DR_MASK(8'h05), .SEED(32'h0000_BEEF)) dut_b (.clk(clk), .rst(rst), .x(x), .y(y_b));

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
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 1024; n++) begin
      x = (n < 256) ? 8'(n) : 8'($urandom);
      #1;
      check(y_a == sbox_ref(x), $sformatf("all converted: S(%h) = %h", x, y_a));
      check(y_b == sbox_ref(x), $sformatf("two converted: S(%h) = %h", x, y_b));
      if (dut_a.t != x) hidden++;
      @(posedge clk);
      #1;
    end
    check(hidden > 400 && hidden < 624, $sformatf("core input differed in %0d of 1024", hidden));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
