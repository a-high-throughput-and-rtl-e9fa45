// tb_sce_weight_encoder: exhaustive check of the weight encoder for 2-bit
// cells (the design's default) and 4-bit sub-words (the worked example).
// For every 16-bit weight each cell digit must match tb_ref_pkg::sce_digit,
// the digits must add back up to the weight, every stored level must be at
// most half the cell range, and no cell may be set in both crossbars.
// The example 0010_1110_1001_1100 b must give crossbar (+) = 0011,0,0,0 and
// crossbar (-) = 0,0001,0110,0100 (sub-words 3..0).
module tb_sce_weight_encoder;
  import tb_ref_pkg::*;
  logic signed [15:0] w;
  logic [7:0][1:0] p2, n2;
  logic [3:0][3:0] p4, n4;
  int checks = 0, failures = 0;

  sce_weight_encoder #(.W_BITS(16), .CELL_BITS(2)) dut2 (.weight(w), .pos_cells(p2), .neg_cells(n2));
  sce_weight_encoder #(.W_BITS(16), .CELL_BITS(4)) dut4 (.weight(w), .pos_cells(p4), .neg_cells(n4));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w = 16'b0010_1110_1001_1100;
    #1;
    checks++;
    if (p4 !== {4'b0011, 4'b0, 4'b0, 4'b0} || n4 !== {4'b0, 4'b0001, 4'b0110, 4'b0100}) begin
      failures++;
      $display("example: pos=%h neg=%h", p4, n4);
    end
    for (int v = -32768; v < 32768; v++) begin
      int s2, s4;
      bit ok;
      w = 16'(v);
      #1;
      s2 = 0; s4 = 0; ok = 1;
      for (int j = 0; j < 8; j++) begin
        int d;
        d = int'(p2[j]) - int'(n2[j]);
        s2 += d * (1 << (2 * j));
        if (d != sce_digit(v, j, 2, 8) || p2[j] > 2 || n2[j] > 2 || (p2[j] != 0 && n2[j] != 0)) ok = 0;
      end
      for (int j = 0; j < 4; j++) begin
        int d;
        d = int'(p4[j]) - int'(n4[j]);
        s4 += d * (1 << (4 * j));
        if (d != sce_digit(v, j, 4, 4) || p4[j] > 8 || n4[j] > 8 || (p4[j] != 0 && n4[j] != 0)) ok = 0;
      end
      checks++;
      if (s2 != v || s4 != v || !ok) begin
        failures++;
        if (failures < 10) $display("v=%0d p2=%b n2=%b p4=%h n4=%h", v, p2, n2, p4, n4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
