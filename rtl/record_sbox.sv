// record_sbox: an AES S-box protected by randomized dual-rail encoding with
// one random bit (the combinational scheme).
//
// The secure I/O ring converts the selected input bits to t = x ^ r, the
// outsourced core evaluates the S-box twice (for r = 0 and for r = 1), and
// the ring selects the right copy with r and converts it back: y = S(x). In
// a chip the two sub-blocks sit on separate dies joined at their edges; here
// the joining nets are the t, f0 and f1 wires. y follows x combinationally;
// r changes every clock, so every clock encodes the data differently.
module record_sbox #(
  parameter logic [7:0]  DR_MASK = 8'hFF,
  parameter logic [31:0] SEED    = record_pkg::LFSR_SEED1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] x,
  output logic [7:0] y
);

  logic [7:0] t, f0, f1;

  record_secure_io #(.W_IN(8), .W_OUT(8), .DR_MASK(DR_MASK), .SEED(SEED)) u_io (
    .clk(clk), .rst(rst), .x(x), .t(t), .f0(f0), .f1(f1), .y(y));

  record_sbox_core #(.DR_MASK(DR_MASK)) u_core (.t(t), .f0(f0), .f1(f1));

endmodule
