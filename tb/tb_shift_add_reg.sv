// tb_shift_add_reg: feeds random (code, iteration, bitline) triples and
// checks every output against a reference that adds code * 2**(i + 2b) to
// column bl/8 with b = 7 - bl%8; also checks `clear` and its priority.
module tb_shift_add_reg;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, in_valid = 0;
  logic signed [4:0] code;
  logic [3:0] iter;
  logic [6:0] bl;
  logic signed [15:0][39:0] result;
  longint ref_out[16];
  int checks = 0, failures = 0;

  shift_add_reg #(.COLS(128), .CELLS(8), .CELL_BITS(2), .ITERS(16), .ADC_BITS(5), .OUT_W(40)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int g = 0; g < 16; g++) begin
      checks++;
      if (longint'(signed'(result[g])) != ref_out[g]) begin
        failures++;
        $display("g=%0d got %0d exp %0d", g, signed'(result[g]), ref_out[g]);
      end
    end
  endtask

  initial begin
    foreach (ref_out[g]) ref_out[g] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      for (int t = 0; t < 3000; t++) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 3) != 0);
        code = 5'($urandom); iter = 4'($urandom); bl = 7'($urandom);
        if (in_valid)
          ref_out[int'(bl) / 8] += longint'(code) <<< (int'(iter) + 2 * (7 - int'(bl) % 8));
      end
      @(negedge clk);
      in_valid = 0;
      compare();
      // clear wins over a simultaneous add
      in_valid = 1; clear = 1;
      @(negedge clk);
      in_valid = 0; clear = 0;
      foreach (ref_out[g]) ref_out[g] = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
