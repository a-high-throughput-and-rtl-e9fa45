// tb_adc_model: sweeps every 10-bit input through the 5-bit converter and
// checks code, clipping flag, tag and the one-cycle latency.
module tb_adc_model;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic signed [9:0] in_value;
  logic [7:0] in_tag;
  logic code_valid, saturated;
  logic signed [4:0] code;
  logic [7:0] code_tag;
  int checks = 0, failures = 0;

  adc_model #(.IN_W(10), .ADC_BITS(5), .TAG_W(8)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = -512; v < 512; v++) begin
      int e;
      @(negedge clk);
      in_valid = 1; in_value = 10'(v); in_tag = 8'(v);
      @(negedge clk);
      in_valid = 0;
      e = (v > 15) ? 15 : (v < -16) ? -16 : v;
      checks++;
      if (!code_valid || int'(code) != e || code_tag != 8'(v) || saturated != (v > 15 || v < -16)) begin
        failures++;
        $display("v=%0d code=%0d valid=%0b sat=%0b", v, code, code_valid, saturated);
      end
    end
    @(negedge clk);
    checks++;
    if (code_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
