// tb_aes_sbox: exhaustive check of the S-box against a reference that finds
// the field inverse by search, plus five values from the AES standard.
module tb_aes_sbox;
  import tb_ref_pkg::*;
  logic [7:0] x, y;
  int checks = 0, failures = 0;

  aes_sbox dut (.x(x), .y(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      #1 check(y == sbox_ref(x), $sformatf("S(%h) = %h, expected %h", x, y, sbox_ref(x)));
    end
    x = 8'h00; #1 check(y == 8'h63, "S(00)");
    x = 8'h01; #1 check(y == 8'h7C, "S(01)");
    x = 8'h53; #1 check(y == 8'hED, "S(53)");
    x = 8'hFF; #1 check(y == 8'h16, "S(FF)");
    x = 8'h10; #1 check(y == 8'hCA, "S(10)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
