// maxpool_unit: the tile's max-pooling (MP) unit.
//
// Keeps one pooled value per output of every MAC (NUM_MAC x LANES). A
// pooling window is evaluated as a sequence of tile operations, one per
// window position: the first overwrites the stored values (`pool` low), the
// following ones keep the element-wise maximum of the stored and the new
// activation (`pool` high). `out` shows, combinationally, the value that
// `wr_en` stores at the edge into the row `mac_sel`, so the tile can write it
// to the eDRAM in the same cycle. Reset clears the store. Pooling by a
// sequence of operations is this design's choice.
module maxpool_unit #(
  parameter int unsigned NUM_MAC = rram_pkg::NUM_MAC,
  parameter int unsigned LANES   = rram_pkg::OUT_COLS,
  parameter int unsigned A_BITS  = rram_pkg::A_BITS,
  localparam int unsigned MW     = (NUM_MAC > 1) ? $clog2(NUM_MAC) : 1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                wr_en,
  input  logic                                pool,
  input  logic [MW-1:0]                       mac_sel,
  input  logic signed [LANES-1:0][A_BITS-1:0] in,
  output logic signed [LANES-1:0][A_BITS-1:0] out
);

  logic signed [LANES-1:0][A_BITS-1:0] store [NUM_MAC];

  always_comb begin
    for (int l = 0; l < LANES; l++)
      out[l] = (pool && signed'(store[mac_sel][l]) > signed'(in[l])) ? store[mac_sel][l] : in[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < NUM_MAC; m++) store[m] <= '0;
    end else if (wr_en) begin
      store[mac_sel] <= out;
    end
  end

endmodule
