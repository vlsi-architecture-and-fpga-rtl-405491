// ice_input_reg: the 64-bit input register {left part, right part} of the feedback loop.
//
// load_ext takes a new block from the data input; load_fb takes the transformation round's
// output back for the next round (the round output is already swapped). load_ext wins if
// both are high. Otherwise the register holds. Asynchronous active-low reset to zero.
//
// The register and its two sources follow the design description; the priority and the
// reset value are this design's own choices.
module ice_input_reg
  import ice_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load_ext,
  input  block_t din,
  input  logic   load_fb,
  input  block_t fb,
  output block_t q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (load_ext) q <= din;
    else if (load_fb)  q <= fb;
  end
endmodule
