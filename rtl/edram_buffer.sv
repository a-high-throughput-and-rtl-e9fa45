// edram_buffer: the tile's eDRAM buffer, 32 KB behind a 256-bit bus.
//
// Holds the input feature maps the tile reads and the outputs it writes
// back. Modelled as a single-port synchronous memory of DEPTH words of
// WIDTH bits: a write takes effect at the clock edge; a read returns the
// addressed word in `rdata` one cycle after `en` with `we` low. Contents are
// not reset. Size and bus width follow the design's tile configuration; the
// single-port organisation and one-cycle read latency are this design's
// choice. (The physical part is a dense eDRAM macro; refresh is not modelled.)
module edram_buffer #(
  parameter int unsigned BYTES = rram_pkg::EDRAM_BYTES,
  parameter int unsigned WIDTH = rram_pkg::EDRAM_BUS,
  localparam int unsigned DEPTH = BYTES * 8 / WIDTH,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
