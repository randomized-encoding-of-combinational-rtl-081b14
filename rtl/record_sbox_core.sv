// record_sbox_core: the outsourced die of the single-random-bit scheme,
// here for the 8-bit AES S-box.
//
// It sees only the first rail t of each input (t = x ^ r for the inputs
// selected by DR_MASK, the plain x for the others) and never the random rail
// r. It holds two copies of the function:
//   f0 = S(t)                     the r = 0 case
//   f1 = ~S(t ^ DR_MASK)          the r = 1 case: converted inputs inverted
//                                 before the function, the output after it
// Exactly one of them equals S(x) ^ r, and only the secure I/O knows which.
// Converting any non-empty subset of the inputs gives the same protection;
// DR_MASK = 8'hFF converts all eight (the configuration whose layout the
// document shows), a single bit gives the smallest area. Combinational.
module record_sbox_core #(
  parameter logic [7:0] DR_MASK = 8'hFF
) (
  input  logic [7:0] t,
  output logic [7:0] f0,
  output logic [7:0] f1
);

  logic [7:0] y_inv;

  aes_sbox u_f0 (.x(t),           .y(f0));
  aes_sbox u_f1 (.x(t ^ DR_MASK), .y(y_inv));

  assign f1 = ~y_inv;

endmodule
