// des_pkg: types and pure functions of the 64-bit Data Encryption Standard
// (DES) engine that serves as the protected sequential circuit in the
// Sequential, TDM and COTS variants of randomized dual-rail encoding.
//
// The engine is iterative: one load cycle, then one Feistel round per clock
// for 16 clocks. Its complete register state is the packed struct des_state_t
// (127 bits); its primary inputs are des_in_t (130 bits) and its outputs
// des_out_t (65 bits). Keeping every register in one struct is what lets the
// encoding wrappers move all flip-flops into the secure tier and treat the DES
// datapath as a pure combinational function of {state, inputs}.
//
// Bit numbering follows the DES standard: bit 1 of a table is the most
// significant bit of the vector. The S-box, P, PC-1 and PC-2 tables are the
// standard's; IP, IP^-1 and E are generated from their closed forms.
package des_pkg;

  typedef struct packed {
    logic        busy;   // a 16-round operation is in progress
    logic        done;   // result in {r,l} is final
    logic        dec;    // 1: decryption key schedule (right rotations)
    logic [3:0]  rnd;    // number of rounds already applied
    logic [31:0] l;
    logic [31:0] r;
    logic [27:0] c;      // key schedule halves after PC-1
    logic [27:0] d;
  } des_state_t;

  typedef struct packed {
    logic        start;  // load key and block; honoured only while idle
    logic        dec;
    logic [63:0] key;    // 64-bit key including the 8 parity bits
    logic [63:0] din;
  } des_in_t;

  typedef struct packed {
    logic        done;
    logic [63:0] dout;
  } des_out_t;

  localparam int STATE_W = $bits(des_state_t);
  localparam int IN_W    = $bits(des_in_t);
  localparam int OUT_W   = $bits(des_out_t);

  localparam byte unsigned P_T [32] = '{
    16,  7, 20, 21, 29, 12, 28, 17,
     1, 15, 23, 26,  5, 18, 31, 10,
     2,  8, 24, 14, 32, 27,  3,  9,
    19, 13, 30,  6, 22, 11,  4, 25};

  localparam byte unsigned PC1_T [56] = '{
    57, 49, 41, 33, 25, 17,  9,
     1, 58, 50, 42, 34, 26, 18,
    10,  2, 59, 51, 43, 35, 27,
    19, 11,  3, 60, 52, 44, 36,
    63, 55, 47, 39, 31, 23, 15,
     7, 62, 54, 46, 38, 30, 22,
    14,  6, 61, 53, 45, 37, 29,
    21, 13,  5, 28, 20, 12,  4};

  localparam byte unsigned PC2_T [48] = '{
    14, 17, 11, 24,  1,  5,
     3, 28, 15,  6, 21, 10,
    23, 19, 12,  4, 26,  8,
    16,  7, 27, 20, 13,  2,
    41, 52, 31, 37, 47, 55,
    30, 40, 51, 45, 33, 48,
    44, 49, 39, 56, 34, 53,
    46, 42, 50, 36, 29, 32};

  // Eight S-boxes, 4 rows of 16 columns each, row-major.
  localparam logic [3:0] S_T [512] = '{
    // S1
    14,  4, 13,  1,  2, 15, 11,  8,  3, 10,  6, 12,  5,  9,  0,  7,
     0, 15,  7,  4, 14,  2, 13,  1, 10,  6, 12, 11,  9,  5,  3,  8,
     4,  1, 14,  8, 13,  6,  2, 11, 15, 12,  9,  7,  3, 10,  5,  0,
    15, 12,  8,  2,  4,  9,  1,  7,  5, 11,  3, 14, 10,  0,  6, 13,
    // S2
    15,  1,  8, 14,  6, 11,  3,  4,  9,  7,  2, 13, 12,  0,  5, 10,
     3, 13,  4,  7, 15,  2,  8, 14, 12,  0,  1, 10,  6,  9, 11,  5,
     0, 14,  7, 11, 10,  4, 13,  1,  5,  8, 12,  6,  9,  3,  2, 15,
    13,  8, 10,  1,  3, 15,  4,  2, 11,  6,  7, 12,  0,  5, 14,  9,
    // S3
    10,  0,  9, 14,  6,  3, 15,  5,  1, 13, 12,  7, 11,  4,  2,  8,
    13,  7,  0,  9,  3,  4,  6, 10,  2,  8,  5, 14, 12, 11, 15,  1,
    13,  6,  4,  9,  8, 15,  3,  0, 11,  1,  2, 12,  5, 10, 14,  7,
     1, 10, 13,  0,  6,  9,  8,  7,  4, 15, 14,  3, 11,  5,  2, 12,
    // S4
     7, 13, 14,  3,  0,  6,  9, 10,  1,  2,  8,  5, 11, 12,  4, 15,
    13,  8, 11,  5,  6, 15,  0,  3,  4,  7,  2, 12,  1, 10, 14,  9,
    10,  6,  9,  0, 12, 11,  7, 13, 15,  1,  3, 14,  5,  2,  8,  4,
     3, 15,  0,  6, 10,  1, 13,  8,  9,  4,  5, 11, 12,  7,  2, 14,
    // S5
     2, 12,  4,  1,  7, 10, 11,  6,  8,  5,  3, 15, 13,  0, 14,  9,
    14, 11,  2, 12,  4,  7, 13,  1,  5,  0, 15, 10,  3,  9,  8,  6,
     4,  2,  1, 11, 10, 13,  7,  8, 15,  9, 12,  5,  6,  3,  0, 14,
    11,  8, 12,  7,  1, 14,  2, 13,  6, 15,  0,  9, 10,  4,  5,  3,
    // S6
    12,  1, 10, 15,  9,  2,  6,  8,  0, 13,  3,  4, 14,  7,  5, 11,
    10, 15,  4,  2,  7, 12,  9,  5,  6,  1, 13, 14,  0, 11,  3,  8,
     9, 14, 15,  5,  2,  8, 12,  3,  7,  0,  4, 10,  1, 13, 11,  6,
     4,  3,  2, 12,  9,  5, 15, 10, 11, 14,  1,  7,  6,  0,  8, 13,
    // S7
     4, 11,  2, 14, 15,  0,  8, 13,  3, 12,  9,  7,  5, 10,  6,  1,
    13,  0, 11,  7,  4,  9,  1, 10, 14,  3,  5, 12,  2, 15,  8,  6,
     1,  4, 11, 13, 12,  3,  7, 14, 10, 15,  6,  8,  0,  5,  9,  2,
     6, 11, 13,  8,  1,  4, 10,  7,  9,  5,  0, 15, 14,  2,  3, 12,
    // S8
    13,  2,  8,  4,  6, 15, 11,  1, 10,  9,  3, 14,  5,  0, 12,  7,
     1, 15, 13,  8, 10,  3,  7,  4, 12,  5,  6, 11,  0, 14,  9,  2,
     7, 11,  4,  1,  9, 12, 14,  2,  0,  6, 10, 13, 15,  3,  5,  8,
     2,  1, 14,  7,  4, 10,  8, 13, 15, 12,  9,  0,  3,  5,  6, 11};

  // Position (1-based, MSB first) that bit j of the initial permutation
  // takes from its input: rows of 8 count down by 8 from 58, 60, 62, 64,
  // 57, 59, 61, 63.
  function automatic int ip_src(input int j);
    int row, col, top;
    row = (j - 1) / 8;
    col = (j - 1) % 8;
    top = (row < 4) ? 58 + 2 * row : 57 + 2 * (row - 4);
    return top - 8 * col;
  endfunction

  function automatic logic [63:0] ip(input logic [63:0] x);
    logic [63:0] o;
    for (int j = 1; j <= 64; j++) o[64-j] = x[64-ip_src(j)];
    return o;
  endfunction

  // Final permutation IP^-1.
  function automatic logic [63:0] fp(input logic [63:0] x);
    logic [63:0] o;
    for (int j = 1; j <= 64; j++) o[64-ip_src(j)] = x[64-j];
    return o;
  endfunction

  // Expansion E: eight groups of six, each group starting one bit before
  // the nibble it covers, wrapping around the 32-bit half.
  function automatic logic [47:0] expand(input logic [31:0] x);
    logic [47:0] o;
    int src;
    for (int j = 1; j <= 48; j++) begin
      src = ((4 * ((j - 1) / 6) + ((j - 1) % 6) - 1 + 32) % 32) + 1;
      o[48-j] = x[32-src];
    end
    return o;
  endfunction

  function automatic logic [31:0] perm_p(input logic [31:0] x);
    logic [31:0] o;
    for (int j = 1; j <= 32; j++) o[32-j] = x[32-int'(P_T[j-1])];
    return o;
  endfunction

  function automatic logic [55:0] pc1(input logic [63:0] k);
    logic [55:0] o;
    for (int j = 1; j <= 56; j++) o[56-j] = k[64-int'(PC1_T[j-1])];
    return o;
  endfunction

  function automatic logic [47:0] pc2(input logic [55:0] cd);
    logic [47:0] o;
    for (int j = 1; j <= 48; j++) o[48-j] = cd[56-int'(PC2_T[j-1])];
    return o;
  endfunction

  function automatic logic [31:0] sboxes(input logic [47:0] x);
    logic [31:0] o;
    logic [5:0]  six;
    for (int n = 0; n < 8; n++) begin
      six = x[47-6*n -: 6];
      o[31-4*n -: 4] = S_T[64*n + 16*int'({six[5], six[0]}) + int'(six[4:1])];
    end
    return o;
  endfunction

  // Cipher function f(R, K).
  function automatic logic [31:0] feistel(input logic [31:0] r, input logic [47:0] k);
    return perm_p(sboxes(expand(r) ^ k));
  endfunction

  // Left-rotation amount of key-schedule round i (1..16): 1 in rounds
  // 1, 2, 9 and 16, otherwise 2.
  function automatic int unsigned key_shift(input int unsigned i);
    return (i == 1 || i == 2 || i == 9 || i == 16) ? 1 : 2;
  endfunction

  function automatic logic [27:0] rotl28(input logic [27:0] x, input int unsigned n);
    return (n == 1) ? {x[26:0], x[27]} : {x[25:0], x[27:26]};
  endfunction

  function automatic logic [27:0] rotr28(input logic [27:0] x, input int unsigned n);
    return (n == 1) ? {x[0], x[27:1]} : {x[1:0], x[27:2]};
  endfunction

endpackage
