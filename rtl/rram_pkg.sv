// rram_pkg: constants and types shared by the RRAM convolution tile.
//
// The numbers follow the design's main configuration: 128x128 crossbars,
// 16-bit weights split into eight 2-bit cells, 16-bit activations streamed
// one (signed) digit per iteration through 1-bit DACs, a 5-bit ADC, and a
// dynamic-quantization threshold of i + 2b <= 14 below which a bitline's
// conversion is skipped. Modules take these as parameter defaults so that a
// testbench can shrink them.
package rram_pkg;

  localparam int unsigned XBAR_ROWS  = 128;  // wordlines per crossbar
  localparam int unsigned XBAR_COLS  = 128;  // bitlines per crossbar
  localparam int unsigned W_BITS     = 16;   // weight width
  localparam int unsigned A_BITS     = 16;   // activation width = iterations
  localparam int unsigned CELL_BITS  = 2;    // bits stored per RRAM cell
  localparam int unsigned ADC_BITS   = 5;    // reduced ADC resolution
  localparam int signed   DQ_THRESH  = 14;   // skip conversion when i+2b <= DQ_THRESH
  localparam int unsigned NUM_MAC    = 24;   // MAC units per tile
  localparam int unsigned EDRAM_BYTES = 32 * 1024;
  localparam int unsigned EDRAM_BUS   = 256;

  // Cell digits per weight and the resulting number of output columns.
  localparam int unsigned CELLS_PER_W = W_BITS / CELL_BITS;        // 8
  localparam int unsigned OUT_COLS    = XBAR_COLS / CELLS_PER_W;   // 16

  // Tile command issued by the host.
  typedef struct packed {
    logic [9:0] in_addr;    // eDRAM word holding the first activations
    logic [9:0] out_addr;   // eDRAM word receiving the first outputs
    logic       accumulate; // add to the output register instead of overwrite
    logic       pool;       // keep max(previous, new) after the activation
    logic       writeback;  // write the tile results back to eDRAM
    logic [5:0] shift;      // right shift applied before saturation to 16 bits
  } tile_cmd_t;

endpackage
