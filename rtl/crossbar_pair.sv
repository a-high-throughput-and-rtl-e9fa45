// crossbar_pair: behavioural model of one MAC's analog array -- the
// positive and negative 128x128 RRAM crossbars, the 1-bit DACs on their
// wordlines and the sample-and-hold (S&H) circuit on every bitline.
//
// This is not synthesizable hardware in the real part (resistive cells,
// analog summation of currents); it models the computation digitally so the
// digital periphery around it can be built and tested. Each cell stores a
// CELL_BITS-wide level. A row is driven by one CSD digit: +1 applies the
// read voltage to the row, -1 applies it with inverted sign, 0 leaves it
// idle (two 1-bit DACs per row, one per crossbar). The current of bitline c
// is the difference of the two crossbars,
//   I(c) = sum_r d(r) * (G+(r,c) - G-(r,c)),
// in units of one cell level. When `sample` is high, the S&H captures I(c)
// of all bitlines at the clock edge; `held` keeps them until the next sample,
// so the ADC can convert the previous iteration while the next one is set up.
// Programming writes one row of CELLS_PER_GROUP cells of a column group per
// clock; bitline of cell b in group g is g*CELLS_PER_GROUP + (CELLS-1-b), so
// the most significant cell of each weight sits on the lowest bitline.
// The cell contents are not reset (an RRAM array keeps its state); only
// programmed cells should be read.
module crossbar_pair #(
  parameter int unsigned ROWS      = rram_pkg::XBAR_ROWS,
  parameter int unsigned COLS      = rram_pkg::XBAR_COLS,
  parameter int unsigned CELL_BITS = rram_pkg::CELL_BITS,
  parameter int unsigned CELLS     = rram_pkg::CELLS_PER_W,
  localparam int unsigned GROUPS   = COLS / CELLS,
  localparam int unsigned BL_W     = $clog2(ROWS) + CELL_BITS + 1
) (
  input  logic                                 clk,
  // programming port: one row of one weight column per cycle
  input  logic                                 prog_en,
  input  logic [$clog2(ROWS)-1:0]              prog_row,
  input  logic [$clog2(GROUPS)-1:0]            prog_group,
  input  logic [CELLS-1:0][CELL_BITS-1:0]      prog_pos,
  input  logic [CELLS-1:0][CELL_BITS-1:0]      prog_neg,
  // wordline drive (one CSD digit per row) and S&H control
  input  logic [ROWS-1:0]                      row_pos,
  input  logic [ROWS-1:0]                      row_neg,
  input  logic                                 sample,
  output logic signed [COLS-1:0][BL_W-1:0]     held
);

  logic [CELL_BITS-1:0] gpos [ROWS][COLS];
  logic [CELL_BITS-1:0] gneg [ROWS][COLS];

  always_ff @(posedge clk) begin
    if (prog_en) begin
      for (int b = 0; b < CELLS; b++) begin
        gpos[prog_row][prog_group*CELLS + (CELLS-1-b)] <= prog_pos[b];
        gneg[prog_row][prog_group*CELLS + (CELLS-1-b)] <= prog_neg[b];
      end
    end
  end

  // Bitline currents are evaluated only at the sampling edge.
  always_ff @(posedge clk) begin
    if (sample) begin
      for (int c = 0; c < COLS; c++) begin
        int acc;
        acc = 0;
        for (int r = 0; r < ROWS; r++) begin
          if (row_pos[r]) acc += int'(gpos[r][c]) - int'(gneg[r][c]);
          if (row_neg[r]) acc -= int'(gpos[r][c]) - int'(gneg[r][c]);
        end
        held[c] <= BL_W'(acc);
      end
    end
  end

endmodule
