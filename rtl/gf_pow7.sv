// gf_pow7: A^7 mod P in GF(2)[x], built from six Montgomery multiplications.
//
// With R = x^n (n = N_BITS) and R' = R^2 mod P supplied by the caller:
//   A1 = MM(X, R')  = X*R         (into Montgomery form)
//   B  = MM(A1, A1) = X^2*R
//   C  = MM(B, A1)  = X^3*R
//   D  = MM(C, C)   = X^6*R
//   E  = MM(D, A1)  = X^7*R
//   Y  = MM(E, 1)   = X^7 mod P   (out of Montgomery form)
// The six multipliers are cascaded without registers between them, so the result is
// combinational; X = 0 gives 0. P must be of degree N_BITS-1 with bit 0 set; the result
// has N_BITS-1 bits (8 for the ICE S-boxes).
//
// From the design description: the six-step Montgomery sequence and R' = R^2 mod P. Own
// choices: GF(2) arithmetic with R = x^9, and the six steps cascaded without pipeline
// registers, because the engine completes one whole round per clock cycle.
module gf_pow7 #(
  parameter int unsigned N_BITS = 9
) (
  input  logic [N_BITS-2:0] a,   // base (S-box column value after the XOR offset)
  input  logic [N_BITS-1:0] p,   // modulus
  input  logic [N_BITS-1:0] r2,  // R' = x^(2*N_BITS) mod p
  output logic [N_BITS-2:0] y    // a^7 mod p
);
  logic [N_BITS-1:0] xa, m1, m2, m3, m4, m5, m6;
  localparam logic [N_BITS-1:0] ONE = N_BITS'(1);

  assign xa = {1'b0, a};

  mont_mult #(.N_BITS(N_BITS)) u_mm1 (.x(xa), .y(r2), .n(p), .a(m1));
  mont_mult #(.N_BITS(N_BITS)) u_mm2 (.x(m1), .y(m1), .n(p), .a(m2));
  mont_mult #(.N_BITS(N_BITS)) u_mm3 (.x(m2), .y(m1), .n(p), .a(m3));
  mont_mult #(.N_BITS(N_BITS)) u_mm4 (.x(m3), .y(m3), .n(p), .a(m4));
  mont_mult #(.N_BITS(N_BITS)) u_mm5 (.x(m4), .y(m1), .n(p), .a(m5));
  mont_mult #(.N_BITS(N_BITS)) u_mm6 (.x(m5), .y(ONE), .n(p), .a(m6));

  // m6 has degree below N_BITS-1, so its top bit is always 0.
  assign y = m6[N_BITS-2:0];
endmodule
