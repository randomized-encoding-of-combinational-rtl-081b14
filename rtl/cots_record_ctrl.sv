// cots_record_ctrl: control chip that operates an untrusted, unmodified
// DES chip (the "black box") so that the box only ever sees randomly
// encoded data.
//
// For each request {dec, key, din} the controller draws two random bits r1,
// r2 and an order index (14 bits modulo 24) from its Trivium generator,
// which delivers 16 keystream bits per clock, and encodes every
// input bit as x ^ r1 or x ^ r2 (REF2 says which; the mode bit dec is
// encoded like the data). It then runs the black box four times, once per
// variant p = entry k of order ord (k = 0..3, any of the 24 orders, see
// record_pkg): variant p inverts the r1-tied bits when
// p[1] and the r2-tied bits when p[0]. Each result is stored in result
// register p. Finally it takes result {r1, r2}, inverts it when r1 = 1 and
// XORs it with r1: dout is the true DES result. The black box never sees
// r1, r2 or the order, and the same random bits are kept for all four runs.
//
// Host side: pulse start (accepted while idle and rng_ready) with the
// request; busy is 1 until done rises with dout; both hold until the next
// start. The Trivium generator must be seeded once with seed_load.
// Black-box side: bb_start is a one-clock pulse with bb_dec, bb_key and
// bb_din valid (they stay valid until the result is taken); the box must
// clear bb_done at the clock edge that takes bb_start and raise it with
// bb_dout valid when finished. With a box that needs L clocks from start to
// done a request takes 4 * (L + 1) + 2 clocks (74 for L = 17).
//
// The sequence of four runs, decoding on the control chip and the Trivium
// generator follow the document; the handshake, the way an order is drawn
// and the encoding of dec are this design's choices.
module cots_record_ctrl #(
  parameter logic [128:0] REF2         = record_pkg::ALT_REF2_MASK[128:0],
  parameter bit           RANDOM_ORDER = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  // random generator seeding
  input  logic        seed_load,
  input  logic [79:0] seed_key,
  input  logic [79:0] seed_iv,
  output logic        rng_ready,
  // host side
  input  logic        start,
  input  logic        dec,
  input  logic [63:0] key,
  input  logic [63:0] din,
  output logic        busy,
  output logic        done,
  output logic [63:0] dout,
  // black-box DES chip side
  output logic        bb_start,
  output logic        bb_dec,
  output logic [63:0] bb_key,
  output logic [63:0] bb_din,
  input  logic        bb_done,
  input  logic [63:0] bb_dout
);

  typedef enum logic [1:0] {IDLE, SEND, WAIT, DEMUX} state_e;

  state_e               state;
  logic [15:0]          z;
  logic                 rng_en;
  logic                 r1, r2;
  record_pkg::order_t   ord;
  logic [1:0]           k;
  logic [128:0]         tv, x, enc_mask, inv;
  record_pkg::variant_t p, sel;
  logic [63:0]          res [4];

  trivium_rng #(.BITS(16)) u_rng (
    .clk(clk), .rst(rst), .load(seed_load), .key(seed_key), .iv(seed_iv),
    .en(rng_en), .ready(rng_ready), .z(z));

  assign x        = {dec, key, din};
  assign enc_mask = (REF2 & {129{z[1]}}) | (~REF2 & {129{z[0]}});
  assign rng_en   = (state == IDLE) && start && rng_ready;

  assign p   = record_pkg::order_variant(RANDOM_ORDER ? ord : '0, k);
  assign inv = (p[1] ? ~REF2 : '0) | (p[0] ? REF2 : '0);
  assign {bb_dec, bb_key, bb_din} = tv ^ inv;
  assign bb_start = (state == SEND);
  assign sel = {r1, r2};

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      busy  <= 1'b0;
      done  <= 1'b0;
      dout  <= '0;
      r1    <= 1'b0;
      r2    <= 1'b0;
      ord   <= '0;
      k     <= 2'b00;
      tv    <= '0;
      for (int v = 0; v < 4; v++) res[v] <= '0;
    end else begin
      case (state)
        IDLE: if (rng_en) begin
          r1    <= z[0];
          r2    <= z[1];
          ord   <= record_pkg::order_from_random({2'b00, z[15:2]});
          tv    <= x ^ enc_mask;
          k     <= 2'b00;
          busy  <= 1'b1;
          done  <= 1'b0;
          state <= SEND;
        end
        SEND: state <= WAIT;
        WAIT: if (bb_done) begin
          res[p] <= bb_dout;
          if (k == 2'd3) state <= DEMUX;
          else begin
            k     <= k + 2'd1;
            state <= SEND;
          end
        end
        DEMUX: begin
          dout  <= res[sel] ^ {64{sel[1]}} ^ {64{r1}};
          done  <= 1'b1;
          busy  <= 1'b0;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
