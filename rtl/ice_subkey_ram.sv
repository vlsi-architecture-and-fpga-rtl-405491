// ice_subkey_ram: 16 x 60-bit round-key memory.
//
// One synchronous write port (used by the key expansion unit) and one asynchronous read
// port (used by the transformation round), so the subkey of the current round is available
// in the same cycle as its address. This maps to LUT/distributed RAM on an FPGA.
//
// Size (16 x 60) from the design description; the asynchronous read port is this design's
// own choice, needed for a round per cycle.
module ice_subkey_ram #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 60,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
