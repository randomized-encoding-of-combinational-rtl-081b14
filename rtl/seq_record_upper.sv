// seq_record_upper: the secure upper tier of the two-random-bit sequential
// scheme, generic in the widths of the protected circuit.
//
// Contents, all hidden from the outsourced lower tier:
//   - two independent LFSR random bit generators, r1 and r2, that advance
//     every clock, and flip-flops holding r1 and r2 of the previous clock;
//   - input conversion: each primary input bit i becomes t = x ^ r1 or
//     x ^ r2 as REF2[i] says (the low I_W bits of REF2);
//   - S_W register blocks (seq_record_regblock), one per state flip-flop of
//     the protected circuit; bit j re-indexes to r2 when REF2[I_W+j] is set
//     and stores its value referred to r2 instead of r1 when OUTREF2[j] is
//     set (default: all r1);
//   - the output stage: each output bit is demuxed from its four copies with
//     {r1, r2} and XORed with r1, giving the single-rail result in the same
//     clock.
// Lower-tier connections: t_in, g, g_n go down; fs[v], fo[v] come up, the
// state and output parts of copy v. The REF2 split the lower tier uses to
// build its inversion patterns must be the same vector.
module seq_record_upper #(
  parameter int S_W = 8,
  parameter int I_W = 8,
  parameter int O_W = 8,
  parameter logic [S_W+I_W-1:0] REF2  = record_pkg::ALT_REF2_MASK[S_W+I_W-1:0],
  parameter logic [S_W-1:0]     OUTREF2 = '0,
  parameter logic [31:0]        SEED1 = record_pkg::LFSR_SEED1,
  parameter logic [31:0]        SEED2 = record_pkg::LFSR_SEED2
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [I_W-1:0] x_in,
  output logic [I_W-1:0] t_in,
  output logic [S_W-1:0] g,
  output logic [S_W-1:0] g_n,
  input  logic [S_W-1:0] fs [4],
  input  logic [O_W-1:0] fo [4],
  output logic [O_W-1:0] y
);

  logic r1, r2, r1_prev, r2_prev;

  lfsr_rng #(.SEED(SEED1)) u_rng1 (.clk(clk), .rst(rst), .en(1'b1), .rnd_o(r1));
  lfsr_rng #(.SEED(SEED2)) u_rng2 (.clk(clk), .rst(rst), .en(1'b1), .rnd_o(r2));

  always_ff @(posedge clk) begin
    if (rst) begin
      r1_prev <= 1'b0;
      r2_prev <= 1'b0;
    end else begin
      r1_prev <= r1;
      r2_prev <= r2;
    end
  end

  for (genvar i = 0; i < I_W; i++) begin : g_in
    assign t_in[i] = x_in[i] ^ (REF2[i] ? r2 : r1);
  end

  for (genvar j = 0; j < S_W; j++) begin : g_reg
    seq_record_regblock #(.USE_R2(REF2[I_W+j]), .OUT_R2(OUTREF2[j])) u_blk (
      .clk(clk), .rst(rst),
      .f({fs[3][j], fs[2][j], fs[1][j], fs[0][j]}),
      .r1(r1), .r2(r2), .r1_prev(r1_prev), .r2_prev(r2_prev),
      .g(g[j]), .g_n(g_n[j]));
  end

  always_comb y = fo[{r1, r2}] ^ {O_W{r1}};

endmodule
