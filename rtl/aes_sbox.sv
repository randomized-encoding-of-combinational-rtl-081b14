// aes_sbox: the 8-bit AES substitution box, the combinational function that
// the two-copy randomized dual-rail scheme protects.
//
// S(x) = A * x^-1 + 0x63 in GF(2^8) with the field polynomial
// x^8 + x^4 + x^3 + x + 1 (0^-1 taken as 0). The inverse is x^254, built as
// a fixed chain of four multiplications and seven squarings:
//   x^3 = x^2 x, x^12 = (x^3)^4, x^15 = x^12 x^3, x^240 = (x^15)^16,
//   x^252 = x^240 x^12, x^254 = x^252 x^2.
// A is the standard affine matrix: b_i = a_i ^ a_(i+4) ^ a_(i+5) ^ a_(i+6) ^
// a_(i+7) (indices mod 8). Purely combinational, no clock.
//
// The document names the AES S-box as its test function but not the gate
// structure; the inversion chain is this design's choice.
module aes_sbox (
  input  logic [7:0] x,
  output logic [7:0] y
);

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = {aa[6:0], 1'b0} ^ (aa[7] ? 8'h1B : 8'h00);
    end
    return p;
  endfunction

  logic [7:0] x2, x3, x12, x15, x240, x252, inv;

  always_comb begin
    x2   = gmul(x, x);
    x3   = gmul(x2, x);
    x12  = gmul(gmul(x3, x3), gmul(x3, x3));
    x15  = gmul(x12, x3);
    x240 = x15;
    for (int i = 0; i < 4; i++) x240 = gmul(x240, x240);
    x252 = gmul(x240, x12);
    inv  = gmul(x252, x2);
    for (int i = 0; i < 8; i++)
      y[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    y = y ^ 8'h63;
  end

endmodule
