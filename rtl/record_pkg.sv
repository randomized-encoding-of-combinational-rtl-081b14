// record_pkg: constants shared by the randomized dual-rail encoding blocks.
//
// A logic value x travels as the pair (t, r) with t = x ^ r, where r is a
// random rail that never leaves the secure part of the chip. With two random
// rails r1 and r2 every encoded bit is tied to one of them, and the four
// combinations of (r1, r2) give four "variants" of the protected function.
// Variant v = {v1, v0} receives its inputs with every r1-tied bit inverted
// when v1 = 1 and every r2-tied bit inverted when v0 = 1, and its output
// inverted when v1 = 1. The demultiplexer that picks the true result uses
// {r1, r2} as its select, so the chosen result is f(x) ^ r1, i.e. still
// encoded, referenced to r1.
package record_pkg;

  // Variant index = the {r1, r2} value that selects it.
  typedef logic [1:0] variant_t;

  // Default seeds and feedback of the random-bit LFSRs: the polynomial
  // x^32 + x^22 + x^2 + x + 1 in right-shifting Galois form.
  localparam logic [31:0] LFSR_TAPS  = 32'h8020_0003;
  localparam logic [31:0] LFSR_SEED1 = 32'hACE1_2468;
  localparam logic [31:0] LFSR_SEED2 = 32'h1357_BDF1;
  localparam logic [31:0] LFSR_SEED3 = 32'h0F1E_2D3C;
  localparam logic [31:0] LFSR_SEED4 = 32'h2468_ACE1;

  // Default split of encoded bits between the rails: even-numbered bits
  // (counting from 0) tied to r1, odd-numbered bits to r2. Wide enough for
  // every vector in this design; users slice the low bits they need.
  localparam logic [511:0] ALT_REF2_MASK = {256{2'b10}};

  // Default set of bits tied to a third random rail r3, for the
  // three-random-bit option of the time-multiplexed scheme: every bit whose
  // index leaves remainder 2 when divided by 3. Such a bit is tied to r3
  // whatever ALT_REF2_MASK says, which leaves about a third of the bits on
  // each rail.
  function automatic logic [511:0] every_third_mask();
    logic [511:0] m;
    for (int i = 0; i < 512; i++) m[i] = (i % 3 == 2);
    return m;
  endfunction
  localparam logic [511:0] THIRD_REF3_MASK = every_third_mask();

  // Order in which the time-multiplexed schemes present the four variants.
  // An order index o = 0..23 names one of the 4! permutations through the
  // factorial number system o = 6a + 2b + c (a < 4, b < 3, c < 2): the
  // first variant sent is entry a of the list (0, 1, 2, 3), the second is
  // entry b of what remains, the third entry c of what then remains, and
  // the last is the one left over. o = 0 is the plain order 0, 1, 2, 3.
  localparam int NUM_ORDERS = 24;
  typedef logic [4:0] order_t;

  // Variant presented in slot k (0..3) under order o.
  function automatic variant_t order_variant(input order_t o, input logic [1:0] k);
    variant_t rest [4];
    variant_t pick [4];
    int       digit [3];
    rest     = '{2'd0, 2'd1, 2'd2, 2'd3};
    digit[0] = int'(o) / 6;
    digit[1] = (int'(o) % 6) / 2;
    digit[2] = int'(o) % 2;
    if (digit[0] > 3) digit[0] = 3;
    for (int n = 0; n < 3; n++) begin
      pick[n] = rest[digit[n]];
      for (int m = 0; m < 3; m++)
        if (m >= digit[n]) rest[m] = rest[m + 1];
    end
    pick[3] = rest[0];
    return pick[k];
  endfunction

  // Order index from random bits; with 8 or more bits the bias of the
  // remainder is small (at most 1 in 10 between orders for 8 bits).
  function automatic order_t order_from_random(input logic [15:0] rnd);
    return order_t'(rnd % 16'(NUM_ORDERS));
  endfunction

endpackage
