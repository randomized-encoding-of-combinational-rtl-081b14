// record_top: the four randomized dual-rail encoding schemes side by side,
// sharing one clock and reset.
//
//   sbox_*  combinational scheme: AES S-box, one random bit, two copies of
//           the function, result y = S(x) in the same clock.
//   seq_*   sequential scheme: DES with two random bits changing every clock,
//           four copies of the logic, all registers in the secure tier;
//           done 17 clocks after start.
//   tdm_*   time-division-multiplexed scheme: DES with one copy of the
//           logic, five clocks per DES clock; inputs are sampled when
//           tdm_step = 1, done 90 clocks after start.
//   cots_*  control chip for an unmodified external DES chip, which is
//           connected through the cots_bb_* ports; done 4 * (L + 1) + 2
//           clocks after start for a chip with latency L.
//
// Each scheme has its own ports; none depends on another. The random
// generators use different seeds in each scheme.
module record_top #(
  parameter logic [7:0] SBOX_DR_MASK = 8'hFF
) (
  input  logic        clk,
  input  logic        rst,
  // combinational scheme (AES S-box)
  input  logic [7:0]  sbox_x,
  output logic [7:0]  sbox_y,
  // sequential scheme (DES)
  input  logic        seq_start,
  input  logic        seq_dec,
  input  logic [63:0] seq_key,
  input  logic [63:0] seq_din,
  output logic [63:0] seq_dout,
  output logic        seq_done,
  // time-division-multiplexed scheme (DES)
  output logic        tdm_step,
  input  logic        tdm_start,
  input  logic        tdm_dec,
  input  logic [63:0] tdm_key,
  input  logic [63:0] tdm_din,
  output logic [63:0] tdm_dout,
  output logic        tdm_done,
  // control chip for an external DES chip
  input  logic        cots_seed_load,
  input  logic [79:0] cots_seed_key,
  input  logic [79:0] cots_seed_iv,
  output logic        cots_rng_ready,
  input  logic        cots_start,
  input  logic        cots_dec,
  input  logic [63:0] cots_key,
  input  logic [63:0] cots_din,
  output logic        cots_busy,
  output logic        cots_done,
  output logic [63:0] cots_dout,
  output logic        cots_bb_start,
  output logic        cots_bb_dec,
  output logic [63:0] cots_bb_key,
  output logic [63:0] cots_bb_din,
  input  logic        cots_bb_done,
  input  logic [63:0] cots_bb_dout
);

  record_sbox #(.DR_MASK(SBOX_DR_MASK), .SEED(32'h5EED_0001)) u_sbox (
    .clk(clk), .rst(rst), .x(sbox_x), .y(sbox_y));

  seq_record_des #(.SEED1(32'h5EED_0002), .SEED2(32'h5EED_0003)) u_seq (
    .clk(clk), .rst(rst), .start(seq_start), .dec(seq_dec), .key(seq_key),
    .din(seq_din), .dout(seq_dout), .done(seq_done));

  tdm_record_des #(.SEED1(32'h5EED_0004), .SEED2(32'h5EED_0005),
                   .SEED3(32'h5EED_0006)) u_tdm (
    .clk(clk), .rst(rst), .step(tdm_step), .start(tdm_start), .dec(tdm_dec),
    .key(tdm_key), .din(tdm_din), .dout(tdm_dout), .done(tdm_done));

  cots_record_ctrl u_cots (
    .clk(clk), .rst(rst),
    .seed_load(cots_seed_load), .seed_key(cots_seed_key), .seed_iv(cots_seed_iv),
    .rng_ready(cots_rng_ready),
    .start(cots_start), .dec(cots_dec), .key(cots_key), .din(cots_din),
    .busy(cots_busy), .done(cots_done), .dout(cots_dout),
    .bb_start(cots_bb_start), .bb_dec(cots_bb_dec), .bb_key(cots_bb_key),
    .bb_din(cots_bb_din), .bb_done(cots_bb_done), .bb_dout(cots_bb_dout));

endmodule
