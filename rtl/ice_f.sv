// ice_f: the ICE round function F(R, subkey), 32 bits in, 32 bits out.
//
// 1. Expansion E turns R into four overlapping 10-bit values E1..E4 (wiring only).
// 2. Key permutation: wherever bit i of the 20-bit permutation key is 1, bit i of {E1,E2}
//    and bit i of {E3,E4} trade places (two 2:1 multiplexers per bit).
// 3. The two 20-bit halves are XORed with the two halves of the 40-bit XOR key.
// 4. Four S-boxes map 10 bits to 8 bits each.
// 5. Permutation P scatters the 32 S-box output bits (wiring only).
// Combinational; the depth is dominated by the S-boxes' Montgomery multipliers.
//
// From the design description: the four stages E, key permutation with 2:1 multiplexers,
// XOR and S-boxes, then P. The P-box bit order and the assignment of the four 10-bit values
// to the S-boxes follow the ICE specification.
module ice_f
  import ice_pkg::*;
(
  input  half_t   r,
  input  subkey_t sk,
  output half_t   f
);
  logic [39:0] e;
  logic [19:0] tl, tr, al, ar;
  logic [7:0]  s1, s2, s3, s4;

  always_comb begin
    e  = ice_expand(r);
    tl = e[39:20];             // {E1, E2}
    tr = e[19:0];              // {E3, E4}
    for (int i = 0; i < 20; i++) begin
      al[i] = sk.perm[i] ? tr[i] : tl[i];
      ar[i] = sk.perm[i] ? tl[i] : tr[i];
    end
    al = al ^ sk.k0;
    ar = ar ^ sk.k1;
  end

  ice_sbox #(.SBOX(0)) u_s1 (.x(al[19:10]), .y(s1));
  ice_sbox #(.SBOX(1)) u_s2 (.x(al[9:0]),   .y(s2));
  ice_sbox #(.SBOX(2)) u_s3 (.x(ar[19:10]), .y(s3));
  ice_sbox #(.SBOX(3)) u_s4 (.x(ar[9:0]),   .y(s4));

  always_comb f = ice_perm({s1, s2, s3, s4});
endmodule
