// des_logic: the intermediate (combinational) logic of an iterative DES
// engine, written as a pure function from {current state, primary inputs}
// to {next state, outputs}.
//
// Behaviour per clock of the engine that wraps it with a des_state_t
// register:
//   idle and start = 1 : L,R <- IP(din); C,D <- PC-1(key); latch dec;
//                        busy <- 1, done <- 0, rnd <- 0
//   busy, round i = rnd+1 (1..16):
//     encrypt: C,D rotate left by the round shift, K = PC-2(C,D)
//     decrypt: K = PC-2(C,D), then C,D rotate right by the shift of round
//              17-i (so the subkeys come out in reverse order)
//     L <- R, R <- L ^ f(R, K); after round 16 busy <- 0, done <- 1
//   otherwise the state is held.
// Outputs depend on the state only: dout = IP^-1(R16 L16), done = state.done.
// A start while busy is ignored. A block therefore takes 1 load clock plus
// 16 round clocks: done is seen 17 clocks after the start clock.
//
// Because every flip-flop lives outside, the randomized encodings can copy
// this module (four times, or once in time-multiplexed use) and keep all
// registers in the secure tier. The document uses a DES design as its
// example circuit; this particular round-per-clock organisation and the
// start/done interface are this design's choice.
module des_logic
  import des_pkg::*;
(
  input  des_state_t st,
  input  des_in_t    in,
  output des_state_t nxt,
  output des_out_t   out
);

  always_comb begin
    int unsigned i;
    logic [27:0] c1, d1;
    logic [47:0] k;
    nxt = st;
    i  = int'(st.rnd) + 1;
    c1 = st.c;
    d1 = st.d;
    k  = '0;
    if (!st.busy) begin
      if (in.start) begin
        {nxt.l, nxt.r} = ip(in.din);
        {nxt.c, nxt.d} = pc1(in.key);
        nxt.dec  = in.dec;
        nxt.rnd  = '0;
        nxt.busy = 1'b1;
        nxt.done = 1'b0;
      end
    end else begin
      if (!st.dec) begin
        c1 = rotl28(st.c, key_shift(i));
        d1 = rotl28(st.d, key_shift(i));
        k  = pc2({c1, d1});
      end else begin
        k  = pc2({st.c, st.d});
        c1 = rotr28(st.c, key_shift(17 - i));
        d1 = rotr28(st.d, key_shift(17 - i));
      end
      nxt.l   = st.r;
      nxt.r   = st.l ^ feistel(st.r, k);
      nxt.c   = c1;
      nxt.d   = d1;
      nxt.rnd = st.rnd + 4'd1;
      if (st.rnd == 4'd15) begin
        nxt.busy = 1'b0;
        nxt.done = 1'b1;
      end
    end
    out.dout = fp({st.r, st.l});
    out.done = st.done;
  end

endmodule
