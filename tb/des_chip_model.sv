// des_chip_model: behavioural stand-in for an external, untrusted DES chip.
// It is the plain iterative engine: a 127-bit state register closed around
// the DES logic. start (while idle) loads key and block, done is cleared at
// that edge and rises 17 clocks after the start clock with dout valid.
// Also used as the unprotected reference engine in the testbenches.
module des_chip_model
  import des_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        dec,
  input  logic [63:0] key,
  input  logic [63:0] din,
  output logic        done,
  output logic [63:0] dout
);
  des_state_t st, nxt;
  des_out_t   out;
  des_in_t    in;

  assign in = '{start: start, dec: dec, key: key, din: din};
  des_logic u_logic (.st(st), .in(in), .nxt(nxt), .out(out));

  always_ff @(posedge clk) st <= rst ? '0 : nxt;

  assign done = out.done;
  assign dout = out.dout;
endmodule
