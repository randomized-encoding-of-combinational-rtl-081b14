// seq_record_lower: the outsourced lower tier of the two-random-bit
// sequential DES: four copies of the DES intermediate logic, no flip-flops.
//
// Each copy v = {v1, v0} gets the same encoded vector {state g, inputs t}
// with a fixed inversion pattern and, for v1 = 1, an inverted output:
//   v = 0: nothing inverted          v = 1: r2-tied bits inverted
//   v = 2: r1-tied bits inverted, output inverted
//   v = 3: all bits inverted, output inverted
// Copy {r1, r2} then computes the true next state and outputs XORed with r1,
// which is what the upper tier selects. For state bits the inverted value is
// taken from the g_n wire the upper tier sends down; primary input bits are
// inverted here. REF2 (1 = tied to r2) must match the upper tier's.
// Combinational.
module seq_record_lower
  import des_pkg::*;
#(
  parameter logic [STATE_W+IN_W-1:0] REF2 = record_pkg::ALT_REF2_MASK[STATE_W+IN_W-1:0]
) (
  input  logic [STATE_W-1:0] g,
  input  logic [STATE_W-1:0] g_n,
  input  logic [IN_W-1:0]    t_in,
  output logic [STATE_W-1:0] fs [4],
  output logic [OUT_W-1:0]   fo [4]
);

  localparam logic [IN_W-1:0]    IN_R2 = REF2[IN_W-1:0];
  localparam logic [STATE_W-1:0] ST_R2 = REF2[STATE_W+IN_W-1:IN_W];

  for (genvar v = 0; v < 4; v++) begin : g_copy
    // Bits to invert in this copy: r1-tied bits when v[1], r2-tied when v[0].
    localparam logic [IN_W-1:0]    IN_INV = (v[1] ? ~IN_R2 : '0) | (v[0] ? IN_R2 : '0);
    localparam logic [STATE_W-1:0] ST_INV = (v[1] ? ~ST_R2 : '0) | (v[0] ? ST_R2 : '0);
    des_state_t st_v, nxt_v;
    des_in_t    in_v;
    des_out_t   out_v;

    for (genvar j = 0; j < STATE_W; j++) begin : g_sel
      assign st_v[j] = ST_INV[j] ? g_n[j] : g[j];
    end
    assign in_v = t_in ^ IN_INV;

    des_logic u_f (.st(st_v), .in(in_v), .nxt(nxt_v), .out(out_v));

    assign fs[v] = nxt_v ^ {STATE_W{v[1]}};
    assign fo[v] = out_v ^ {OUT_W{v[1]}};
  end

endmodule
