// adc_model: behavioural model of the per-MAC successive-approximation ADC
// at reduced resolution.
//
// The real part is a mixed-signal converter sampling at 1.28 GS/s; here it
// is a clocked digital stand-in. It converts the held bitline value chosen
// by the sampling multiplexer into an ADC_BITS-wide two's complement code
// with the same LSB (one cell level) as a full-resolution converter, so it
// covers [-2**(ADC_BITS-1), 2**(ADC_BITS-1)-1]. Values outside that range,
// which the sparse, encoded data makes rare, saturate to the nearest end of
// the range (saturation is this design's choice). One conversion per clock,
// result registered: `code`/`code_valid` appear one cycle after `in_valid`,
// together with the tag that travelled with the request.
module adc_model #(
  parameter int unsigned IN_W     = $clog2(rram_pkg::XBAR_ROWS) + rram_pkg::CELL_BITS + 1,
  parameter int unsigned ADC_BITS = rram_pkg::ADC_BITS,
  parameter int unsigned TAG_W    = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic signed [IN_W-1:0]     in_value,
  input  logic [TAG_W-1:0]           in_tag,
  output logic                       code_valid,
  output logic signed [ADC_BITS-1:0] code,
  output logic [TAG_W-1:0]           code_tag,
  output logic                       saturated   // this conversion clipped
);

  localparam int MAXV = 2 ** (ADC_BITS - 1) - 1;
  localparam int MINV = -(2 ** (ADC_BITS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_valid <= 1'b0;
      code       <= '0;
      code_tag   <= '0;
      saturated  <= 1'b0;
    end else begin
      code_valid <= in_valid;
      code_tag   <= in_tag;
      if (int'(in_value) > MAXV) begin
        code      <= ADC_BITS'(MAXV);
        saturated <= in_valid;
      end else if (int'(in_value) < MINV) begin
        code      <= ADC_BITS'(MINV);
        saturated <= in_valid;
      end else begin
        code      <= ADC_BITS'(in_value);
        saturated <= 1'b0;
      end
    end
  end

endmodule
