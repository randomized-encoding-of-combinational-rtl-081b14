// trivium_rng: Trivium keystream generator used as the random number
// generator of the COTS control chip.
//
// The 288-bit state s1..s288 is three shift registers of 93, 84 and 111 bits
// with the standard nonlinear feedback:
//   t1 = s66 ^ s93,  t2 = s162 ^ s177,  t3 = s243 ^ s288,  z = t1 ^ t2 ^ t3
//   t1 ^= s91 & s92 ^ s171;  t2 ^= s175 & s176 ^ s264;  t3 ^= s286 & s287 ^ s69
//   (s1..s93) <- (t3, s1..s92); (s94..s177) <- (t1, s94..s176);
//   (s178..s288) <- (t2, s178..s287)
// load (one cycle) sets s1..s80 = key, s94..s173 = iv, s286..s288 = 1 and
// all else 0; key bit i-1 goes to s_i, iv bit i-1 to s_(i+93). The generator
// then runs the 4 x 288 = 1152 blank steps of the specification before
// raising ready. From then on z shows the next BITS unused keystream bits,
// z[0] first, and a clock with en = 1 consumes them (advances BITS steps).
// Reset clears the state and ready; nothing is produced until load.
//
// Trivium as the source is named by the document; the loading order of key
// and IV bits, BITS and the interface are this design's choice.
module trivium_rng #(
  parameter int BITS = 4
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            load,
  input  logic [79:0]     key,
  input  logic [79:0]     iv,
  input  logic            en,
  output logic            ready,
  output logic [BITS-1:0] z
);

  localparam int WARMUP = 4 * 288;
  localparam int WCNT_W = $clog2(WARMUP / BITS + 2);

  logic [288:1]     s, s_next;
  logic [WCNT_W-1:0] warm;
  logic [BITS-1:0]  z_c;

  always_comb begin
    logic [288:1] v;
    logic t1, t2, t3;
    v = s;
    for (int b = 0; b < BITS; b++) begin
      t1 = v[66] ^ v[93];
      t2 = v[162] ^ v[177];
      t3 = v[243] ^ v[288];
      z_c[b] = t1 ^ t2 ^ t3;
      t1 = t1 ^ (v[91] & v[92]) ^ v[171];
      t2 = t2 ^ (v[175] & v[176]) ^ v[264];
      t3 = t3 ^ (v[286] & v[287]) ^ v[69];
      v[93:1]    = {v[92:1], t3};
      v[177:94]  = {v[176:94], t1};
      v[288:178] = {v[287:178], t2};
    end
    s_next = v;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s     <= '0;
      warm  <= '0;
      ready <= 1'b0;
    end else if (load) begin
      s          <= '0;
      s[80:1]    <= key;
      s[173:94]  <= iv;
      s[288:286] <= 3'b111;
      warm       <= WCNT_W'((WARMUP + BITS - 1) / BITS);
      ready      <= 1'b0;
    end else if (warm != '0) begin
      s    <= s_next;
      warm <= warm - 1'b1;
      if (warm == WCNT_W'(1)) ready <= 1'b1;
    end else if (ready && en) begin
      s <= s_next;
    end
  end

  assign z = z_c;

endmodule
