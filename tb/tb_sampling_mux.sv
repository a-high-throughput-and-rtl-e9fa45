// tb_sampling_mux: every select value must route exactly that held bitline.
module tb_sampling_mux;
  logic signed [127:0][9:0] held;
  logic [6:0] sel;
  logic signed [9:0] out;
  int checks = 0, failures = 0;

  sampling_mux #(.COLS(128), .W(10)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int c = 0; c < 128; c++) held[c] = 10'($urandom);
      for (int s = 0; s < 128; s++) begin
        sel = 7'(s);
        #1;
        checks++;
        if (out !== held[s]) begin
          failures++;
          $display("sel=%0d out=%0d exp=%0d", s, out, held[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
