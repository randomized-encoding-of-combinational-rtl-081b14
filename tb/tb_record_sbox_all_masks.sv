// tb_record_sbox_all_masks: the combinational scheme built with every one
// of the 256 choices of which S-box inputs are dual-rail encoded. One
// record_sbox per choice (DR_MASK = 0..255, each with its own generator
// seed) is driven with the same byte every clock: all 256 bytes in order,
// then random bytes. Every instance must give the AES S-box of the byte in
// the same clock. For each instance the testbench also counts the clocks in
// which the core input differed from x, which must happen in roughly half
// of them for any mask with an encoded bit and never for mask 0, and checks
// that the core input only ever differs on the encoded bit positions.
module tb_record_sbox_all_masks;
  import tb_ref_pkg::*;
  localparam int NCLK = 512;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] x;
  logic [7:0] y [256];
  logic [7:0] t [256];
  int checks = 0, failures = 0;
  int hidden [256];
  int outside = 0;

  for (genvar m = 0; m < 256; m++) begin : g_mask
    record_sbox #(.DR_MASK(8'(m)), .SEED(32'h1000_0001 + 32'(m) * 32'h0001_0F07))
      u_sbox (.clk(clk), .rst(rst), .x(x), .y(y[m]));
    assign t[m] = u_sbox.t;
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (NCLK + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad;
    x = '0;
    foreach (hidden[m]) hidden[m] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < NCLK; n++) begin
      x = (n < 256) ? 8'(n) : 8'($urandom);
      #1;
      bad = 0;
      for (int m = 0; m < 256; m++) begin
        if (y[m] != sbox_ref(x)) begin
          bad++;
          if (bad < 4) $display("FAIL: mask %02h S(%02h) gave %02h", m, x, y[m]);
        end
        if (t[m] != x) hidden[m]++;
        if (((t[m] ^ x) & ~8'(m)) != 0) outside++;
      end
      checks++;
      if (bad != 0) failures++;
      @(posedge clk);
      #1;
    end
    check(hidden[0] == 0, $sformatf("mask 00 changed its input %0d times", hidden[0]));
    for (int m = 1; m < 256; m++)
      check(hidden[m] > NCLK / 2 - 80 && hidden[m] < NCLK / 2 + 80,
            $sformatf("mask %02h hid its input in %0d of %0d clocks", m, hidden[m], NCLK));
    check(outside == 0, $sformatf("%0d core inputs changed outside the mask", outside));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
