// tdm_record_upper: secure upper tier of the time-division-multiplexed
// randomized dual-rail scheme, generic in the widths of the protected
// circuit and in the number of random rails (RBITS = 2, the main form, or
// 3).
//
// Every encoded bit is tied to one random rail: to r3 when RBITS = 3 and
// its REF3 bit is set, otherwise to r2 when its REF2 bit is set, otherwise
// to r1. With NV = 2^RBITS variants, variant p (p[RBITS-1] for r1, then r2,
// then r3) inverts the bits tied to every rail whose bit in p is 1, and its
// result has to be inverted when its r1 bit is 1. The variant equal to the
// current random bits, {r1, r2} or {r1, r2, r3}, is the one whose answer is
// the true result referred to r1.
//
// The lower tier holds a single copy of the intermediate logic. One step of
// the protected circuit takes NV + 1 clocks (5 for two rails, 9 for three):
//   phase k = 0..NV-1  the lower tier is sent the encoded vector {g, t}
//                   with the inversion pattern of variant p and its answer
//                   is stored in holding register p. With two rails p is
//                   entry k of the presentation order ord, one of all 24
//                   orders (see record_pkg); with three rails p = k ^ ord,
//                   a 3-bit random mask. p = k when RANDOM_ORDER is 0;
//   phase NV        the variant equal to the random bits is taken from the
//                   holding registers (inverted when r1 = 1, as the output
//                   inverters of a multi-copy lower tier are not there), its
//                   state part is loaded into the round register and its
//                   output part, XORed with r1, into the single-rail output
//                   register y; new random bits and a new order are drawn
//                   and r1 is kept as r1_prev.
// The random bits therefore stay fixed for a whole step. The round register
// is read out re-indexed, g = q ^ r1_prev ^ r_k, with r_k the rail the state
// bit is tied to. Primary inputs are sampled in phase 0 (step = 1 marks that
// clock) as t = x ^ r_k and held for the rest of the step. y shows the
// outputs of the step that has just ended; it changes at the clock edge
// that starts phase 0.
// Reset clears the phase, the round register, r1_prev, the random-bit
// registers and y; the first step after reset uses all random bits 0.
//
// Following the document: one logic copy fed the variants in turn, holding
// registers per variant, demux on the stored random bits in the last phase,
// new random bits only after the demux, random presentation order and the
// three-rail option with eight variants. This design's own choices: the
// rail assignment masks, how the order is drawn, the 3-bit mask form of the
// order for three rails, and doing the output inversion at the demux.
module tdm_record_upper #(
  parameter int S_W = 8,
  parameter int I_W = 8,
  parameter int O_W = 8,
  parameter int RBITS = 2,
  parameter logic [S_W+I_W-1:0] REF2  = record_pkg::ALT_REF2_MASK[S_W+I_W-1:0],
  parameter logic [S_W+I_W-1:0] REF3  = record_pkg::THIRD_REF3_MASK[S_W+I_W-1:0],
  parameter bit                 RANDOM_ORDER = 1'b1,
  parameter logic [31:0]        SEED1 = record_pkg::LFSR_SEED1,
  parameter logic [31:0]        SEED2 = record_pkg::LFSR_SEED2,
  parameter logic [31:0]        SEED3 = record_pkg::LFSR_SEED3,
  parameter logic [31:0]        SEED4 = record_pkg::LFSR_SEED4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [I_W-1:0]     x_in,
  output logic               step,
  output logic [S_W+I_W-1:0] lo_in,
  input  logic [S_W+O_W-1:0] lo_out,
  output logic [O_W-1:0]     y
);

  localparam int LW = S_W + O_W;
  localparam int VW = S_W + I_W;
  localparam int NV = 1 << RBITS;

  // Bits tied to each rail.
  localparam logic [VW-1:0] M3 = (RBITS == 3) ? REF3 : '0;
  localparam logic [VW-1:0] M2 = REF2 & ~M3;
  localparam logic [VW-1:0] M1 = ~REF2 & ~M3;

  logic [3:0]            ph;
  logic                  r1, r2, r3, r1_prev;
  record_pkg::order_t    ord;
  logic                  n_r1, n_r2, n_r3;
  logic [7:0]            n_ord;
  logic [S_W-1:0]        q, g;
  logic [I_W-1:0]        t_live, t_hold, t_cur;
  logic [LW-1:0]         hold [NV];
  logic [LW-1:0]         dsel;
  logic [RBITS-1:0]      p, sel;
  logic [VW-1:0]         inv, rk;
  logic                  demux;

  initial assert (RBITS == 2 || RBITS == 3) else $error("RBITS must be 2 or 3");

  lfsr_rng #(.SEED(SEED1)) u_rng1 (.clk(clk), .rst(rst), .en(1'b1), .rnd_o(n_r1));
  lfsr_rng #(.SEED(SEED2)) u_rng2 (.clk(clk), .rst(rst), .en(1'b1), .rnd_o(n_r2));
  lfsr_rng #(.SEED(SEED3), .OUT_W(8)) u_rng3 (.clk(clk), .rst(rst), .en(1'b1), .rnd_o(n_ord));
  if (RBITS == 3) begin : g_r3
    lfsr_rng #(.SEED(SEED4)) u_rng4 (.clk(clk), .rst(rst), .en(1'b1), .rnd_o(n_r3));
  end else begin : g_no_r3
    assign n_r3 = 1'b0;
  end

  // Current random rail of every bit of the lower-tier vector {g, t}.
  assign rk = (M1 & {VW{r1}}) | (M2 & {VW{r2}}) | (M3 & {VW{r3}});

  assign t_live = x_in ^ rk[I_W-1:0];
  assign g      = q ^ {S_W{r1_prev}} ^ rk[VW-1:I_W];

  assign demux = (ph == 4'(NV));
  assign step  = (ph == 4'd0);
  assign t_cur = step ? t_live : t_hold;

  always_comb begin
    if (!RANDOM_ORDER) p = RBITS'(ph);
    else if (RBITS == 2) p = RBITS'(record_pkg::order_variant(ord, ph[1:0]));
    else p = RBITS'(ph) ^ RBITS'(ord);
  end

  assign inv   = (p[RBITS-1] ? M1 : '0) | (p[RBITS-2] ? M2 : '0) |
                 ((RBITS == 3 && p[0]) ? M3 : '0);
  assign lo_in = {g, t_cur} ^ inv;
  assign sel   = (RBITS == 3) ? RBITS'({r1, r2, r3}) : RBITS'({r1, r2});
  assign dsel  = hold[sel] ^ {LW{r1}};

  always_ff @(posedge clk) begin
    if (rst) begin
      ph      <= '0;
      r1      <= 1'b0;
      r2      <= 1'b0;
      r3      <= 1'b0;
      r1_prev <= 1'b0;
      ord     <= '0;
      q       <= '0;
      y       <= '0;
      t_hold  <= '0;
      for (int v = 0; v < NV; v++) hold[v] <= '0;
    end else begin
      if (step) t_hold <= t_live;
      if (demux) begin
        ph      <= '0;
        q       <= dsel[LW-1:O_W];
        y       <= dsel[O_W-1:0] ^ {O_W{r1}};
        r1_prev <= r1;
        r1      <= n_r1;
        r2      <= n_r2;
        r3      <= n_r3;
        ord     <= (RBITS == 2) ? record_pkg::order_from_random(16'(n_ord))
                                : record_pkg::order_t'(n_ord[2:0]);
      end else begin
        hold[p] <= lo_out;
        ph      <= ph + 4'd1;
      end
    end
  end

endmodule
