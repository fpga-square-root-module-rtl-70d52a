// sqrt_rom: initial-approximation look-up table.
//
// Indexed by the ROM_BITS most significant bits of the radicand, it returns
// the ROM_BITS/2-bit integer square root of that index, floor(sqrt(addr)).
// Because floor(sqrt(floor(X / 4^k))) = floor(floor(sqrt(X)) / 2^k), this is
// exactly the top ROM_BITS/2 bits of the root of the whole radicand, so the
// refinement that follows never has to correct it.
//
// The contents are computed when the design is elaborated (entry i holds
// floor(sqrt(i))), so the table follows ROM_BITS without a data file. The
// read is synchronous, one cycle from en to data, like an FPGA block RAM;
// data holds its value while en is low. Using the radicand's MSBs as the
// index and a root as the entry follows the source design; the registered
// read port is this implementation's choice.
module sqrt_rom
  import sqrt_pkg::*;
#(
  parameter int unsigned ROM_BITS = 8           // index width, even
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic [ROM_BITS-1:0]     addr,
  output logic [ROM_BITS/2-1:0]   data
);

  localparam int unsigned DEPTH  = 2 ** ROM_BITS;
  localparam int unsigned ROOT_W = ROM_BITS / 2;

  logic [ROOT_W-1:0] mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = ROOT_W'(isqrt_int(i));
  end

  always_ff @(posedge clk) begin
    if (en) data <= mem[addr];
  end

endmodule
