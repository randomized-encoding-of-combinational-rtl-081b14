// seq_record_des: a DES engine protected by the two-random-bit sequential
// randomized encoding, split into a secure upper tier and an outsourced
// lower tier.
//
// The lower tier holds four copies of the DES logic and no registers; the
// upper tier holds all 127 state flip-flops (as register blocks), both
// random generators and the input and output conversions. Every clock the
// random bits r1 and r2 change, every stored bit is re-indexed to them, and
// the lower tier only ever sees data XORed with a random bit it cannot
// observe. From the outside the block behaves exactly like the plain engine:
// pulse start with key, din and dec; done rises 17 clocks later with dout
// valid and both hold until the next start. In a chip the two sub-blocks are
// stacked dies; the wires t_in, g, g_n, fs and fo stand for the vias.
module seq_record_des
  import des_pkg::*;
#(
  parameter logic [STATE_W+IN_W-1:0] REF2  = record_pkg::ALT_REF2_MASK[STATE_W+IN_W-1:0],
  parameter logic [STATE_W-1:0]      OUTREF2 = '0,
  parameter logic [31:0]             SEED1 = record_pkg::LFSR_SEED1,
  parameter logic [31:0]             SEED2 = record_pkg::LFSR_SEED2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        dec,
  input  logic [63:0] key,
  input  logic [63:0] din,
  output logic [63:0] dout,
  output logic        done
);

  logic [IN_W-1:0]    t_in;
  logic [STATE_W-1:0] g, g_n;
  logic [STATE_W-1:0] fs [4];
  logic [OUT_W-1:0]   fo [4];
  des_in_t            x_in;
  des_out_t           y;

  assign x_in = '{start: start, dec: dec, key: key, din: din};

  seq_record_upper #(.S_W(STATE_W), .I_W(IN_W), .O_W(OUT_W), .REF2(REF2), .OUTREF2(OUTREF2),
                     .SEED1(SEED1), .SEED2(SEED2)) u_upper (
    .clk(clk), .rst(rst), .x_in(x_in), .t_in(t_in), .g(g), .g_n(g_n),
    .fs(fs), .fo(fo), .y(y));

  seq_record_lower #(.REF2(REF2)) u_lower (
    .g(g), .g_n(g_n), .t_in(t_in), .fs(fs), .fo(fo));

  assign dout = y.dout;
  assign done = y.done;

endmodule
