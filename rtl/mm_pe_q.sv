// mm_pe_q: Q-calc processing element, column 0 of the Montgomery multiplication array.
//
// Computes the row's Montgomery quotient bit q_k = (a_0 + x_k*y_0) mod 2 with one more
// XOR than the basic element, and sends it along the row. It also forms its own sum bit
// s_0 + x_k*y_0 + q_k*n_0, which is always 0 for an odd modulus (n_0 = 1): that zero is
// what makes the row's sum exactly divisible by x (radix 2). GF(2) arithmetic, no carries.
// Purely combinational.
//
// From the design description: a Q-calc element with one XOR gate more than the basic
// element at the head of every row. Own choice: GF(2) arithmetic, hence no carry ports.
module mm_pe_q (
  input  logic xi,  // multiplier bit x_k of this row
  input  logic yi,  // multiplicand bit y_0
  input  logic ni,  // modulus bit n_0
  input  logic si,  // partial-sum bit a_0 in
  output logic qo,  // quotient bit q_k for the rest of the row
  output logic so   // own sum bit (0 whenever ni = 1)
);
  logic t;
  always_comb begin
    t  = si ^ (xi & yi);
    qo = t;
    so = t ^ (t & ni);
  end
endmodule
