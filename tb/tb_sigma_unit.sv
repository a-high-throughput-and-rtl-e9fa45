// tb_sigma_unit: random and corner inputs through shift, ReLU and
// saturation to 16 bits, checked against integer arithmetic.
module tb_sigma_unit;
  logic signed [15:0][39:0] in;
  logic [5:0] shift;
  logic signed [15:0][15:0] out;
  int checks = 0, failures = 0;

  sigma_unit #(.LANES(16), .IN_W(40), .A_BITS(16)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint v[16];
      shift = 6'($urandom_range(0, 22));
      for (int l = 0; l < 16; l++) begin
        v[l] = (longint'($urandom) <<< 8) ^ longint'($urandom);
        v[l] = v[l] % (longint'(1) <<< $urandom_range(4, 38));
        if (l == 0) v[l] = -1;
        if (l == 1) v[l] = 32767 <<< shift;
        if (l == 2) v[l] = 32768 <<< shift;
        in[l] = 40'(v[l]);
      end
      #1;
      for (int l = 0; l < 16; l++) begin
        longint s, e;
        s = v[l] >>> shift;
        e = (s < 0) ? 0 : (s > 32767) ? 32767 : s;
        checks++;
        if (longint'(signed'(out[l])) != e) begin
          failures++;
          $display("in=%0d shift=%0d got %0d exp %0d", v[l], shift, signed'(out[l]), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
