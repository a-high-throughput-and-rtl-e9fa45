// tb_csd_encoder: exhaustive check of the CSD recoder over all 16-bit
// inputs: the digits must add back up to the input, no two non-zero digits
// may be adjacent, no position may be both +1 and -1, and every digit must
// equal the non-adjacent form computed by tb_ref_pkg. Also checks the worked
// example 0010_1110_1001_1100 b -> 010-1_00-10_1010_0-100 b (6 non-zero digits).
module tb_csd_encoder;
  import tb_ref_pkg::*;
  logic signed [15:0] act;
  logic [15:0] pos, neg;
  int checks = 0, failures = 0;

  csd_encoder #(.A_BITS(16)) dut (.act, .pos_digits(pos), .neg_digits(neg));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    act = 16'b0010_1110_1001_1100;
    #1;
    checks++;
    if (pos !== 16'b0100_0000_1010_0000 || neg !== 16'b0001_0010_0000_0100 ||
        $countones(pos | neg) != 6) begin
      failures++;
      $display("example: pos=%b neg=%b", pos, neg);
    end
    for (int v = -32768; v < 32768; v++) begin
      int sum;
      bit ok;
      act = 16'(v);
      #1;
      sum = 0;
      ok  = 1;
      for (int i = 0; i < 16; i++) begin
        int d;
        d = int'(pos[i]) - int'(neg[i]);
        sum += d * (1 << i);
        if (d != csd_digit(v, i)) ok = 0;
      end
      checks++;
      if (sum != v || ((pos | neg) & ((pos | neg) >> 1)) != 0 || (pos & neg) != 0 || !ok) begin
        failures++;
        if (failures < 10) $display("v=%0d pos=%b neg=%b", v, pos, neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
