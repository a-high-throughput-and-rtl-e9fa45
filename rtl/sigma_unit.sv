// sigma_unit: the tile's activation-function unit.
//
// Turns LANES wide output sums into 16-bit activations for the next layer:
// an arithmetic right shift by `shift` (the fixed-point scaling of the
// layer), a rectified linear function (negative values become zero) and
// saturation to the largest positive A_BITS-bit two's complement value.
// ReLU is used because the benchmark networks are ReLU CNNs; the choice of
// function, the shift and the saturation are this design's. Combinational.
module sigma_unit #(
  parameter int unsigned LANES  = rram_pkg::OUT_COLS,
  parameter int unsigned IN_W   = 40,
  parameter int unsigned A_BITS = rram_pkg::A_BITS
) (
  input  logic signed [LANES-1:0][IN_W-1:0]   in,
  input  logic [5:0]                          shift,
  output logic signed [LANES-1:0][A_BITS-1:0] out
);

  localparam logic signed [IN_W-1:0] MAXV = IN_W'(2 ** (A_BITS - 1) - 1);

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [IN_W-1:0] s;
      s = signed'(in[l]) >>> shift;
      if (s < 0)         out[l] = '0;
      else if (s > MAXV) out[l] = MAXV[A_BITS-1:0];
      else               out[l] = s[A_BITS-1:0];
    end
  end

endmodule
