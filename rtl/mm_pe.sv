// mm_pe: basic processing element of the Montgomery multiplication array.
//
// Element (k, j) of the array adds the partial products x_k*y_j and q_k*n_j to the
// incoming partial-sum bit s_j of row k. The arithmetic is over GF(2) (the ICE S-boxes
// are GF(2^8) exponentiations), so the additions are XORs and no carries are produced or
// consumed; in an integer Montgomery array the same element would need a full adder and
// carry-save outputs. x_k and q_k run along the row, y_j and n_j down the column, and the
// sum leaves diagonally to column j-1 of the next row. Purely combinational.
//
// From the design description: the element's place in the array and its inputs (x_i, y_i,
// n_i, the row's q and the incoming sum). Own choice: GF(2) arithmetic, which turns the
// described full/half adders into XOR gates and removes the carry inputs and outputs.
module mm_pe (
  input  logic xi,  // multiplier bit x_k of this row
  input  logic yi,  // multiplicand bit y_j of this column
  input  logic ni,  // modulus bit n_j of this column
  input  logic qi,  // quotient bit q_k of this row (from the Q-calc element)
  input  logic si,  // partial-sum bit in
  output logic so   // partial-sum bit out
);
  always_comb so = si ^ (xi & yi) ^ (qi & ni);
endmodule
