// shift_add_reg: shift-and-add unit with output registers of one MAC.
//
// Every ADC code is a partial product of iteration i (activation digit i)
// and cell b (weight bits [2b+1:2b]), so it is worth code * 2**(i + 2b).
// The unit shifts the sign-extended code by i + 2b and adds it to the
// output register of the weight column group the bitline belongs to
// (group g owns bitlines g*CELLS .. g*CELLS+CELLS-1, cell b on bitline
// g*CELLS + CELLS-1-b). `clear` zeroes all outputs; it takes effect at the
// clock edge and has priority over an add in the same cycle. One add per
// clock, result visible the cycle after `in_valid`.
module shift_add_reg #(
  parameter int unsigned COLS      = rram_pkg::XBAR_COLS,
  parameter int unsigned CELLS     = rram_pkg::CELLS_PER_W,
  parameter int unsigned CELL_BITS = rram_pkg::CELL_BITS,
  parameter int unsigned ITERS     = rram_pkg::A_BITS,
  parameter int unsigned ADC_BITS  = rram_pkg::ADC_BITS,
  parameter int unsigned OUT_W     = 40,
  localparam int unsigned GROUPS   = COLS / CELLS,
  localparam int unsigned IT_W     = $clog2(ITERS),
  localparam int unsigned BL_IW    = $clog2(COLS)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               clear,
  input  logic                               in_valid,
  input  logic signed [ADC_BITS-1:0]         code,
  input  logic [IT_W-1:0]                    iter,
  input  logic [BL_IW-1:0]                   bl,
  output logic signed [GROUPS-1:0][OUT_W-1:0] result
);

  logic [$clog2(CELLS)-1:0]  b;
  logic [BL_IW-1:0]          g;
  logic signed [OUT_W-1:0]   term;

  always_comb begin
    b    = $clog2(CELLS)'(CELLS - 1 - (int'(bl) % CELLS));
    g    = BL_IW'(int'(bl) / CELLS);
    term = OUT_W'(code) <<< (int'(iter) + int'(CELL_BITS) * int'(b));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result <= '0;
    end else if (clear) begin
      result <= '0;
    end else if (in_valid) begin
      result[g] <= result[g] + term;
    end
  end

endmodule
