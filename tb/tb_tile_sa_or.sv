// tb_tile_sa_or: random overwrite / accumulate updates of the output
// register rows, checked through the read port against a shadow model.
module tb_tile_sa_or;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, accumulate = 0;
  logic [4:0] mac_sel, rd_sel;
  logic signed [15:0][39:0] mac_result, rd_data;
  longint shadow[24][16];
  int checks = 0, failures = 0;

  tile_sa_or #(.NUM_MAC(24), .LANES(16), .OUT_W(40)) dut (.*);

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
      wr_en = ($urandom_range(0, 1) == 1);
      accumulate = ($urandom_range(0, 2) != 0);
      mac_sel = 5'($urandom_range(0, 23));
      for (int l = 0; l < 16; l++) mac_result[l] = 40'(signed'(32'($urandom)));
      if (wr_en)
        for (int l = 0; l < 16; l++)
          shadow[mac_sel][l] = (accumulate ? shadow[mac_sel][l] : 0) + longint'(signed'(mac_result[l]));
      @(negedge clk);
      wr_en = 0;
      rd_sel = 5'($urandom_range(0, 23));
      #1;
      for (int l = 0; l < 16; l++) begin
        checks++;
        if (longint'(signed'(rd_data[l])) != shadow[rd_sel][l]) begin
          failures++;
          $display("row %0d lane %0d got %0d exp %0d", rd_sel, l, signed'(rd_data[l]), shadow[rd_sel][l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
