// tb_maxpool_unit: random sequences of overwrite (pool low) and max
// (pool high) updates per MAC row, checked against a shadow model through
// the combinational output.
module tb_maxpool_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, pool = 0;
  logic [4:0] mac_sel;
  logic signed [15:0][15:0] in, out;
  int shadow[24][16];
  int checks = 0, failures = 0;

  maxpool_unit #(.NUM_MAC(24), .LANES(16), .A_BITS(16)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (shadow[m, l]) shadow[m][l] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      pool = ($urandom_range(0, 3) != 0);
      wr_en = 1;
      mac_sel = 5'($urandom_range(0, 23));
      for (int l = 0; l < 16; l++) in[l] = 16'($urandom);
      #1;
      for (int l = 0; l < 16; l++) begin
        int e;
        e = int'(signed'(in[l]));
        if (pool && shadow[mac_sel][l] > e) e = shadow[mac_sel][l];
        shadow[mac_sel][l] = e;
        checks++;
        if (int'(signed'(out[l])) != e) begin
          failures++;
          $display("row %0d lane %0d got %0d exp %0d", mac_sel, l, signed'(out[l]), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
