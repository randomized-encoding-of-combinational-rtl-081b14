// lfsr_rng: pseudo-random bit source for the random rails.
//
// A WIDTH-bit linear feedback shift register in right-shifting Galois form.
// Every clock with en = 1 it shifts one place right and, when the bit that
// falls out is 1, XORs the TAPS mask into the state. The default taps are
// x^32 + x^22 + x^2 + x + 1, a maximal-length polynomial, so the state
// cycles through all 2^32 - 1 non-zero values. rnd_o shows the low OUT_W
// bits of the state; rnd_o[0] is the classic serial LFSR output. Reset loads
// SEED, which must be non-zero.
//
// The LFSR as random bit source is the one named for the combinational
// scheme; polynomial, width and seed are this design's choice. A physical
// random source can replace it without touching the other blocks.
module lfsr_rng #(
  parameter int          WIDTH = 32,
  parameter logic [WIDTH-1:0] TAPS = WIDTH'(record_pkg::LFSR_TAPS),
  parameter logic [WIDTH-1:0] SEED = WIDTH'(record_pkg::LFSR_SEED1),
  parameter int          OUT_W = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [OUT_W-1:0] rnd_o
);

  logic [WIDTH-1:0] state;

  always_ff @(posedge clk) begin
    if (rst)     state <= SEED;
    else if (en) state <= (state >> 1) ^ (state[0] ? TAPS : '0);
  end

  assign rnd_o = state[OUT_W-1:0];

  initial assert (SEED != '0) else $error("lfsr_rng: SEED must be non-zero");

endmodule
