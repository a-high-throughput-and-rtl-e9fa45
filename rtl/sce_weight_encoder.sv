// sce_weight_encoder: segmented compression encoding (SCE) of one weight.
//
// A signed weight is cut into CELL_BITS-wide sub-words, least significant
// first. A sub-word (plus the carry from the one below) that exceeds the
// middle of its range, 2**(CELL_BITS-1), is replaced by 2**CELL_BITS minus
// itself: that difference goes to the negative crossbar and a carry of one
// goes to the next sub-word. Otherwise the sub-word goes to the positive
// crossbar unchanged. Every stored cell value is therefore at most half the
// cell range, so cells sit at low conductance, while
//   w = sum_j (pos[j] - neg[j]) * 2**(CELL_BITS*j).
// The topmost sub-word is read as signed two's complement (this design's
// choice, so that negative weights are covered); after its carry it lies in
// [-half, +half] and goes to whichever crossbar matches its sign.
// Purely combinational; one instance feeds the weight programming path.
module sce_weight_encoder #(
  parameter int unsigned W_BITS    = rram_pkg::W_BITS,
  parameter int unsigned CELL_BITS = rram_pkg::CELL_BITS,
  localparam int unsigned CELLS    = W_BITS / CELL_BITS
) (
  input  logic signed [W_BITS-1:0]          weight,
  output logic [CELLS-1:0][CELL_BITS-1:0]   pos_cells,  // to crossbar (+)
  output logic [CELLS-1:0][CELL_BITS-1:0]   neg_cells   // to crossbar (-)
);

  localparam int HALF = 2 ** (CELL_BITS - 1);
  localparam int FULL = 2 ** CELL_BITS;

  always_comb begin
    int carry;
    int sw;
    carry     = 0;
    pos_cells = '0;
    neg_cells = '0;
    for (int j = 0; j < CELLS; j++) begin
      if (j < CELLS - 1) begin
        sw = int'(weight[j*CELL_BITS +: CELL_BITS]) + carry;
        if (sw > HALF) begin
          neg_cells[j] = CELL_BITS'(FULL - sw);
          carry        = 1;
        end else begin
          pos_cells[j] = CELL_BITS'(sw);
          carry        = 0;
        end
      end else begin
        // top sub-word carries the sign of the weight
        sw = int'(signed'(weight[j*CELL_BITS +: CELL_BITS])) + carry;
        if (sw < 0) neg_cells[j] = CELL_BITS'(-sw);
        else        pos_cells[j] = CELL_BITS'(sw);
      end
    end
  end

endmodule
