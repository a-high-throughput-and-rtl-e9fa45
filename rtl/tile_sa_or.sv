// tile_sa_or: the tile's shift-and-add (S+A) stage and output register (OR).
//
// The OR keeps one wide partial sum per output of every MAC of the tile
// (NUM_MAC x LANES entries). When a layer's kernel has more rows than a
// crossbar, the host runs several operations on successive slices of the
// input; S+A then adds each new MAC result to the sum kept in the OR, so
// the slices combine into the full dot product. Without `accumulate` the new
// result overwrites the entry. One MAC's LANES results are handled per
// clock: `wr_en` with `mac_sel` updates that row of the OR at the edge; the
// read port shows the row named by `rd_sel` combinationally. Reset clears
// the OR. The per-operation accumulate flag is this design's choice.
module tile_sa_or #(
  parameter int unsigned NUM_MAC = rram_pkg::NUM_MAC,
  parameter int unsigned LANES   = rram_pkg::OUT_COLS,
  parameter int unsigned OUT_W   = 40,
  localparam int unsigned MW     = (NUM_MAC > 1) ? $clog2(NUM_MAC) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               wr_en,
  input  logic                               accumulate,
  input  logic [MW-1:0]                      mac_sel,
  input  logic signed [LANES-1:0][OUT_W-1:0] mac_result,
  input  logic [MW-1:0]                      rd_sel,
  output logic signed [LANES-1:0][OUT_W-1:0] rd_data
);

  logic signed [LANES-1:0][OUT_W-1:0] orr [NUM_MAC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < NUM_MAC; m++) orr[m] <= '0;
    end else if (wr_en) begin
      for (int l = 0; l < LANES; l++)
        orr[mac_sel][l] <= accumulate ? orr[mac_sel][l] + mac_result[l] : mac_result[l];
    end
  end

  assign rd_data = orr[rd_sel];

endmodule
