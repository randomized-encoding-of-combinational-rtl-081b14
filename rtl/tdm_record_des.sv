// tdm_record_des: a DES engine protected by the time-division-multiplexed
// two-random-bit encoding. The outsourced lower tier is one copy of the DES
// logic; the secure upper tier (tdm_record_upper) feeds it the four encoded
// input variants on four successive clocks, collects the answers, demuxes
// with the random bits and keeps the state in its round register.
//
// Timing: every DES clock becomes a step of 2^RBITS + 1 clocks: five with
// the two random rails of the main form, nine with the three-rail option
// (RBITS = 3, eight variants). Inputs are sampled in the clock where
// step = 1 (phase 0); drive start there for one step. dout and done are
// registered single-rail outputs of the last completed step: a start
// sampled in step n gives done = 1 from the start of step n + 18, i.e. 90
// clocks after the start clock for two rails and 162 for three, against 17
// for the plain engine.
module tdm_record_des
  import des_pkg::*;
#(
  parameter int                      RBITS = 2,
  parameter logic [STATE_W+IN_W-1:0] REF2  = record_pkg::ALT_REF2_MASK[STATE_W+IN_W-1:0],
  parameter logic [STATE_W+IN_W-1:0] REF3  = record_pkg::THIRD_REF3_MASK[STATE_W+IN_W-1:0],
  parameter bit                      RANDOM_ORDER = 1'b1,
  parameter logic [31:0]             SEED1 = record_pkg::LFSR_SEED1,
  parameter logic [31:0]             SEED2 = record_pkg::LFSR_SEED2,
  parameter logic [31:0]             SEED3 = record_pkg::LFSR_SEED3,
  parameter logic [31:0]             SEED4 = record_pkg::LFSR_SEED4
) (
  input  logic        clk,
  input  logic        rst,
  output logic        step,
  input  logic        start,
  input  logic        dec,
  input  logic [63:0] key,
  input  logic [63:0] din,
  output logic [63:0] dout,
  output logic        done
);

  logic [STATE_W+IN_W-1:0]  lo_in;
  logic [STATE_W+OUT_W-1:0] lo_out;
  des_in_t                  x_in;
  des_out_t                 y;
  des_state_t               lo_st, lo_nxt;
  des_in_t                  lo_x;
  des_out_t                 lo_y;

  assign x_in = '{start: start, dec: dec, key: key, din: din};

  tdm_record_upper #(.S_W(STATE_W), .I_W(IN_W), .O_W(OUT_W), .RBITS(RBITS),
                     .REF2(REF2), .REF3(REF3), .RANDOM_ORDER(RANDOM_ORDER),
                     .SEED1(SEED1), .SEED2(SEED2), .SEED3(SEED3), .SEED4(SEED4)) u_upper (
    .clk(clk), .rst(rst), .x_in(x_in), .step(step),
    .lo_in(lo_in), .lo_out(lo_out), .y(y));

  assign {lo_st, lo_x} = lo_in;
  des_logic u_lower (.st(lo_st), .in(lo_x), .nxt(lo_nxt), .out(lo_y));
  assign lo_out = {lo_nxt, lo_y};

  assign dout = y.dout;
  assign done = y.done;

endmodule
