// ice_sbox: one ICE S-box, 10 bits in, 8 bits out.
//
// The outer bits {X9, X0} form the row R; the inner bits X8..X1 form the column C. One 4:1
// multiplexer picks the row's XOR offset O_R, a second picks the row's modulus P_R together
// with its precomputed Montgomery constant R' = x^18 mod P_R. The output is
// (C xor O_R)^7 mod P_R in GF(2^8), computed by gf_pow7. SBOX (0..3) selects which of the
// four S-boxes' tables is used. Combinational.
//
// From the design description: row/column split of the input, the two 4:1 multiplexers and
// the row tables. Own choice: the modulus multiplexer also carries the row's R' constant,
// which is computed at elaboration from the modulus.
module ice_sbox
  import ice_pkg::*;
#(
  parameter int unsigned SBOX = 0
) (
  input  logic [9:0] x,
  output logic [7:0] y
);
  logic [1:0]         row;
  logic [7:0]         col, offset;
  logic [MM_BITS-1:0] modulus, r2;

  // Montgomery constants of this S-box's four moduli, worked out at elaboration.
  localparam logic [MM_BITS-1:0] R2_0 = mont_r2(SBOX_MOD[SBOX][0]);
  localparam logic [MM_BITS-1:0] R2_1 = mont_r2(SBOX_MOD[SBOX][1]);
  localparam logic [MM_BITS-1:0] R2_2 = mont_r2(SBOX_MOD[SBOX][2]);
  localparam logic [MM_BITS-1:0] R2_3 = mont_r2(SBOX_MOD[SBOX][3]);

  always_comb begin
    row = {x[9], x[0]};
    col = x[8:1];
    offset = SBOX_XOR[SBOX][row];
    unique case (row)
      2'd0: begin modulus = SBOX_MOD[SBOX][0]; r2 = R2_0; end
      2'd1: begin modulus = SBOX_MOD[SBOX][1]; r2 = R2_1; end
      2'd2: begin modulus = SBOX_MOD[SBOX][2]; r2 = R2_2; end
      default: begin modulus = SBOX_MOD[SBOX][3]; r2 = R2_3; end
    endcase
  end

  gf_pow7 #(.N_BITS(MM_BITS)) u_pow7 (.a(col ^ offset), .p(modulus), .r2(r2), .y(y));
endmodule
