// ice_pkg: types, constants and wiring functions shared by the ICE cipher datapath.
//
// ICE ("Information Concealment Engine") is a 16-round Feistel cipher with a 64-bit block
// and a 64-bit key. Each round uses a 60-bit subkey made of a 20-bit permutation ("salt")
// key and a 40-bit XOR key. The S-box row tables (XOR offsets and GF(2^8) moduli) are the
// ones the design description tabulates; offset O1 of S4 is 203 (0xCB), the ICE
// specification's value. The P-box bit order, the key-schedule word rotation order and the
// expansion function follow the ICE specification. The packing of the three 20-bit subkey
// fields into one 60-bit RAM word is this design's own choice.
package ice_pkg;

  localparam int unsigned BLOCK_BITS  = 64;
  localparam int unsigned HALF_BITS   = 32;
  localparam int unsigned SUBKEY_BITS = 60;
  localparam int unsigned ROUNDS      = 16;
  // Bit length of the S-box moduli (largest is 505, 9 bits): Montgomery word size n.
  localparam int unsigned MM_BITS     = 9;

  typedef logic [BLOCK_BITS-1:0] block_t;
  typedef logic [HALF_BITS-1:0]  half_t;

  // One round's subkey as stored in a RAM word: permutation key on top, then the two
  // 20-bit halves of the 40-bit XOR key (k0 salts the left 20 bits, k1 the right 20).
  typedef struct packed {
    logic [19:0] perm;
    logic [19:0] k0;
    logic [19:0] k1;
  } subkey_t;

  // S-box XOR offsets O_R and moduli P_R, [sbox][row], row = {X9, X0}.
  localparam logic [0:3][0:3][7:0] SBOX_XOR = '{
    '{8'd131, 8'd133, 8'd155, 8'd205},
    '{8'd204, 8'd167, 8'd173, 8'd65 },
    '{8'd75,  8'd46,  8'd212, 8'd51 },
    '{8'd234, 8'd203, 8'd46,  8'd4  }};

  localparam logic [0:3][0:3][8:0] SBOX_MOD = '{
    '{9'd333, 9'd313, 9'd505, 9'd369},
    '{9'd379, 9'd375, 9'd319, 9'd391},
    '{9'd361, 9'd445, 9'd451, 9'd397},
    '{9'd397, 9'd425, 9'd395, 9'd505}};

  // P-box: bit i of the concatenated S-box outputs {S1,S2,S3,S4} goes to bit PBOX[i].
  localparam int unsigned PBOX [32] = '{
     0,  7, 10, 13, 19, 21, 24, 30,
     3,  5,  8, 14, 16, 23, 26, 29,
     2,  4,  9, 15, 17, 22, 27, 28,
     1,  6, 11, 12, 18, 20, 25, 31};

  // Key-schedule word rotation for each of the 16 subkeys.
  localparam logic [0:15][1:0] KEYROT = '{
    2'd0, 2'd1, 2'd2, 2'd3, 2'd2, 2'd1, 2'd3, 2'd0,
    2'd1, 2'd3, 2'd2, 2'd0, 2'd3, 2'd1, 2'd0, 2'd2};

  // x^(2*nbits) mod p over GF(2): the Montgomery constant R' = R^2 mod P for R = x^nbits.
  // p must have its top bit (bit nbits-1) set.
  function automatic logic [MM_BITS-1:0] mont_r2(input logic [MM_BITS-1:0] p);
    logic [MM_BITS-1:0] r;
    r = MM_BITS'(1);
    for (int i = 0; i < 2 * MM_BITS; i++) begin
      r = r << 1;
      if (r[MM_BITS-1]) r = r ^ p;
    end
    return r;
  endfunction

  // Expansion E: 32-bit half to four 10-bit values, returned as {E1, E2, E3, E4}.
  function automatic logic [39:0] ice_expand(input half_t p);
    logic [9:0] e1, e2, e3, e4;
    e1 = {p[1:0], p[31:24]};
    e2 = p[25:16];
    e3 = p[17:8];
    e4 = p[9:0];
    return {e1, e2, e3, e4};
  endfunction

  // Permutation P on the concatenated S-box outputs.
  function automatic half_t ice_perm(input half_t x);
    half_t y;
    y = '0;
    for (int i = 0; i < 32; i++) y[PBOX[i]] = x[i];
    return y;
  endfunction

endpackage
