// mont_mult: radix-2 Montgomery multiplication MM(X, Y, N) = X * Y * x^-n mod N over GF(2)[x].
//
// The array has one row per multiplier bit x_k (k = 0..n-1) and n columns. Column 0 is a
// Q-calc element (mm_pe_q) that works out q_k so that the row sum A + x_k*Y + q_k*N has a
// zero low bit; columns 1..n-1 are basic elements (mm_pe). Sum bit j of row k becomes
// input bit j-1 of row k+1, which is the division by
// b = 2. The first row's sum inputs are 0. N is an n-bit polynomial of degree n-1 with
// n_0 = 1 (all ICE S-box moduli qualify); X and Y have fewer than n bits. In GF(2) the
// result after n rows has degree below n-1 and is already fully reduced, so the array needs
// neither a carry-resolving adder nor a final subtraction. The whole array is combinational:
// in this design it sits inside the one-round-per-cycle feedback loop.
//
// From the design description: the radix-2 algorithm (q = (a0 + x_k*y0) mod 2,
// A = (A + x_k*Y + q*N)/2) and its array of Q-calc and basic elements. Own choices: GF(2)
// arithmetic instead of integer carry-save arithmetic (so no final carry-lookahead adder),
// and no registers inside the array.
module mont_mult #(
  parameter int unsigned N_BITS = 9
) (
  input  logic [N_BITS-1:0] x,
  input  logic [N_BITS-1:0] y,
  input  logic [N_BITS-1:0] n,
  output logic [N_BITS-1:0] a
);
  // s[k] is the partial sum entering row k.
  logic [N_BITS-1:0] s [N_BITS+1];
  logic [N_BITS-1:0] q;
  logic [N_BITS-1:0] t [N_BITS];

  assign s[0] = '0;

  for (genvar k = 0; k < N_BITS; k++) begin : g_row
    mm_pe_q u_q (
      .xi(x[k]), .yi(y[0]), .ni(n[0]), .si(s[k][0]), .qo(q[k]), .so(t[k][0])
    );
    for (genvar j = 1; j < N_BITS; j++) begin : g_col
      mm_pe u_pe (
        .xi(x[k]), .yi(y[j]), .ni(n[j]), .qi(q[k]), .si(s[k][j]), .so(t[k][j])
      );
    end
    // Divide by 2: sum bit j becomes bit j-1 of the next row; t[k][0] is always 0.
    assign s[k+1] = {1'b0, t[k][N_BITS-1:1]};
  end

  assign a = s[N_BITS];
endmodule
