// tb_record_sbox_core: exhaustive check of the two-copy outsourced core, for
// all inputs converted (8'hFF) and for a single converted input (8'h01):
// f0 = S(t), f1 = ~S(t ^ mask), and for every x and r the copy selected by
// r, XORed with r, gives S(x).
module tb_record_sbox_core;
  import tb_ref_pkg::*;
  logic [7:0] t_a, f0_a, f1_a, t_b, f0_b, f1_b;
  int checks = 0, failures = 0;

  record_sbox_core #(.DR_MASK(8'hFF)) dut_a (.t(t_a), .f0(f0_a), .f1(f1_a));
  record_sbox_core #(.DR_MASK(8'h01)) dut_b (.t(t_b), .f0(f0_b), .f1(f1_b));

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
    for (int x = 0; x < 256; x++) begin
      for (int r = 0; r < 2; r++) begin
        t_a = 8'(x) ^ (r ? 8'hFF : 8'h00);
        t_b = 8'(x) ^ (r ? 8'h01 : 8'h00);
        #1;
        check(f0_a == sbox_ref(t_a), "f0 all-converted");
        check(f1_a == ~sbox_ref(t_a ^ 8'hFF), "f1 all-converted");
        check(((r ? f1_a : f0_a) ^ {8{1'(r)}}) == sbox_ref(8'(x)), $sformatf("decode all x=%0d r=%0d", x, r));
        check(((r ? f1_b : f0_b) ^ {8{1'(r)}}) == sbox_ref(8'(x)), $sformatf("decode bit0 x=%0d r=%0d", x, r));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
