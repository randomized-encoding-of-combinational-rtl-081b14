// record_secure_io: the securely fabricated input/output ring of the
// single-random-bit scheme.
//
// It owns the random bit r, produced by an LFSR that advances every clock,
// and everything that touches r:
//   input conversion   t = x ^ (r & DR_MASK)  (only masked bits become
//                      dual-rail; the rest pass unchanged)
//   output selection   g = r ? f1 : f0        (the copy that is correct for
//                      the current r)
//   output conversion  y = g ^ r              (back to single rail)
// The data path is combinational: y = f(x) within the cycle in which x is
// applied, for whatever value r has in that cycle. clk and rst only drive
// the random generator. r is not a port: it never leaves this block.
module record_secure_io #(
  parameter int             W_IN    = 8,
  parameter int             W_OUT   = 8,
  parameter logic [W_IN-1:0] DR_MASK = '1,
  parameter logic [31:0]    SEED    = record_pkg::LFSR_SEED1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [W_IN-1:0]  x,
  output logic [W_IN-1:0]  t,
  input  logic [W_OUT-1:0] f0,
  input  logic [W_OUT-1:0] f1,
  output logic [W_OUT-1:0] y
);

  logic             r;
  logic [W_OUT-1:0] g;

  lfsr_rng #(.SEED(SEED)) u_rng (.clk(clk), .rst(rst), .en(1'b1), .rnd_o(r));

  assign t = x ^ ({W_IN{r}} & DR_MASK);
  assign g = r ? f1 : f0;
  assign y = g ^ {W_OUT{r}};

endmodule
