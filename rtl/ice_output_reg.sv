// ice_output_reg: the 64-bit output register of the engine.
//
// On capture it stores the last round's output {L16, R16} with its halves exchanged,
// {R16, L16}, which cancels the swap of the final round (ICE omits it), and pulses valid
// for one cycle. The data is held until the next capture. Asynchronous active-low reset.
//
// The exchange of the halves on capture follows the design description; the valid pulse
// and the reset are this design's own choices.
module ice_output_reg
  import ice_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   capture,
  input  block_t d,
  output block_t q,
  output logic   valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= capture;
      if (capture) q <= {d[31:0], d[63:32]};
    end
  end
endmodule
