// ice_round: one ICE transformation round (Feistel round).
//
// din = {L(n), R(n)}; dout = {L(n+1), R(n+1)} with L(n+1) = R(n) and
// R(n+1) = L(n) xor F(R(n), subkey). The halves are swapped in every round; the output
// register of the engine undoes the swap of the last round. Combinational.
//
// From the design description: the Feistel structure and the 60-bit subkey input. The
// order of the subkey fields inside the 60 bits is this design's own choice (see ice_pkg).
module ice_round
  import ice_pkg::*;
(
  input  block_t  din,
  input  subkey_t sk,
  output block_t  dout
);
  half_t l, r, fo;
  assign l = din[63:32];
  assign r = din[31:0];

  ice_f u_f (.r(r), .sk(sk), .f(fo));

  assign dout = {r, l ^ fo};
endmodule
