// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL they check.
package tb_ref_pkg;

  // Carry-less product of two bytes reduced modulo 0x11B, done as a 16-bit
  // polynomial product followed by long division.
  function automatic logic [7:0] gf_mul_ref(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11B << (i - 8);
    return p[7:0];
  endfunction

  // AES S-box: inverse found by search, affine step in its rotation form.
  function automatic logic [7:0] sbox_ref(input logic [7:0] x);
    logic [7:0] inv, a;
    inv = '0;
    for (int y = 1; y < 256; y++) if (gf_mul_ref(x, 8'(y)) == 8'h01) inv = 8'(y);
    a = inv;
    return a ^ {a[6:0], a[7]} ^ {a[5:0], a[7:6]} ^ {a[4:0], a[7:5]} ^ {a[3:0], a[7:4]} ^ 8'h63;
  endfunction

endpackage
