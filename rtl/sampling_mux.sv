// sampling_mux: the bitline sampling multiplexer in front of the ADC.
//
// All bitlines of a crossbar pair are held by their sample-and-hold
// circuits; one ADC serves them all, so this multiplexer routes the bitline
// named by the scheduler to the ADC input in the same cycle. With dynamic
// quantization the sequence of selected bitlines is irregular (only the
// bitlines that matter in the current iteration), which is why the select
// is an index and not a counter. Combinational.
module sampling_mux #(
  parameter int unsigned COLS = rram_pkg::XBAR_COLS,
  parameter int unsigned W    = $clog2(rram_pkg::XBAR_ROWS) + rram_pkg::CELL_BITS + 1
) (
  input  logic signed [COLS-1:0][W-1:0] held,
  input  logic [$clog2(COLS)-1:0]       sel,
  output logic signed [W-1:0]           out
);

  always_comb out = held[sel];

endmodule
