// seq_record_regblock: one register bit of the secure upper tier in the
// two-random-bit sequential scheme.
//
// From the lower tier it receives the four copies f[0..3] of the next-state
// bit, each computed on a differently inverted input vector. The 4:1 mux
// selects f[{r1, r2}], which is the true next value x encoded as x ^ r1(t).
// The flip-flop stores it referred to r1, or, when OUT_R2 is set, referred
// to r2 (one more XOR with r1 ^ r2 in front of the flip-flop). One clock
// later r1 and r2 have moved on, so the stored bit is re-indexed before it
// goes back down:
//   g = q ^ r_s(t-1) ^ r_k(t)     s = 2 if OUT_R2 else 1,
//                                 k = 2 if USE_R2 else 1
// leaving g = x ^ r_k(t), valid for the current random bits. g and its
// inverse g_n are the bit's two connections to the lower tier.
// Reset clears q; with r1(t-1) and r2(t-1) also reset to 0 this is the
// encoded value 0.
//
// Structure (mux, flip-flop, update XOR, inverter) follows the document's
// register block, as does the freedom to re-index to either random bit
// (USE_R2) and to keep the stored bit referred to either one (OUT_R2). The
// document obtains the r2 reference by rewiring the mux; here the lower
// tier's copies stay fixed, so the register block converts with an XOR.
// r1 as the default reference is the document's main wiring.
module seq_record_regblock #(
  parameter bit USE_R2 = 1'b0,
  parameter bit OUT_R2 = 1'b0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] f,        // f[v]: copy computed for {r1, r2} = v
  input  logic       r1,
  input  logic       r2,
  input  logic       r1_prev,  // r1 of the previous clock
  input  logic       r2_prev,  // r2 of the previous clock
  output logic       g,
  output logic       g_n
);

  logic din, q, upd;

  assign din = f[{r1, r2}] ^ (OUT_R2 ? (r1 ^ r2) : 1'b0);

  always_ff @(posedge clk) begin
    if (rst) q <= 1'b0;
    else     q <= din;
  end

  assign upd = (OUT_R2 ? r2_prev : r1_prev) ^ (USE_R2 ? r2 : r1);
  assign g   = q ^ upd;
  assign g_n = ~g;

endmodule
