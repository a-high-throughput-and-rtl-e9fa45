// tb_mac_unit: two MAC units at the full 128x128 size hold the same random
// signed weights. One uses the design's defaults (threshold 14, 5-bit ADC),
// the other skips nothing and has a 10-bit ADC, so its results must be the
// exact dot products sum_r act[r]*w[r][g]. The default unit is compared with
// tb_ref_pkg::mac_ref, which models skipped conversions and clipping
// independently. Checks the latency (conversions + 3 cycles: 1027 and
// 2051), the number of conversions per operation (1024 and 2048), and that
// clipping occurred in the dense random vectors. Vectors: dense random,
// sparse small (ReLU-like) and extreme values.
module tb_mac_unit;
  import tb_ref_pkg::*;
  localparam int ROWS = 128, G = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic prog_en = 0;
  logic [6:0] prog_row;
  logic [3:0] prog_group;
  logic signed [15:0] prog_weight;
  logic start = 0;
  logic signed [ROWS-1:0][15:0] act;
  logic busy_q, done_q, conv_q, sat_q, busy_x, done_x, conv_x, sat_x;
  logic signed [G-1:0][39:0] res_q, res_x;
  int wts[G][ROWS];
  int checks = 0, failures = 0, sat_total = 0, conv_q_n = 0, conv_x_n = 0;

  mac_unit dut_q (
    .clk, .rst_n, .prog_en, .prog_row, .prog_group, .prog_weight, .start, .act,
    .busy(busy_q), .done(done_q), .result(res_q), .adc_conv(conv_q), .adc_sat(sat_q));
  mac_unit #(.THRESH(-1), .ADC_BITS(10)) dut_x (
    .clk, .rst_n, .prog_en, .prog_row, .prog_group, .prog_weight, .start, .act,
    .busy(busy_x), .done(done_x), .result(res_x), .adc_conv(conv_x), .adc_sat(sat_x));

  always @(posedge clk) begin
    if (conv_q) conv_q_n++;
    if (conv_x) conv_x_n++;
    if (sat_q) sat_total++;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_vector(int kind);
    int a[ROWS];
    int tq, tx, cyc;
    for (int r = 0; r < ROWS; r++) begin
      case (kind)
        0: a[r] = int'(signed'(16'($urandom)));
        1: a[r] = ($urandom_range(0, 2) == 0) ? int'($urandom_range(0, 255)) : 0;
        default: a[r] = (r % 2 == 0) ? 32767 : -32768;
      endcase
      act[r] = 16'(a[r]);
    end
    conv_q_n = 0; conv_x_n = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    tq = -1; tx = -1; cyc = 1;
    while (tq < 0 || tx < 0) begin
      if (done_q && tq < 0) tq = cyc;
      if (done_x && tx < 0) tx = cyc;
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (tq != 1027 || tx != 2051 || conv_q_n != 1024 || conv_x_n != 2048) begin
      failures++;
      $display("latency %0d/%0d conversions %0d/%0d", tq, tx, conv_q_n, conv_x_n);
    end
    for (int g = 0; g < G; g++) begin
      longint exact, q;
      exact = 0;
      for (int r = 0; r < ROWS; r++) exact += longint'(a[r]) * longint'(wts[g][r]);
      q = mac_ref(a, wts[g], ROWS, 16, 2, 8, 5, 14);
      checks += 2;
      if (longint'(signed'(res_x[g])) != exact) begin
        failures++;
        $display("exact g=%0d got %0d exp %0d", g, signed'(res_x[g]), exact);
      end
      if (longint'(signed'(res_q[g])) != q) begin
        failures++;
        $display("quantized g=%0d got %0d exp %0d", g, signed'(res_q[g]), q);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int r = 0; r < ROWS; r++)
        for (int g = 0; g < G; g++) begin
          @(negedge clk);
          wts[g][r] = (pass == 0) ? int'(signed'(16'($urandom))) : int'($urandom_range(0, 600)) - 300;
          prog_en = 1; prog_row = 7'(r); prog_group = 4'(g); prog_weight = 16'(wts[g][r]);
        end
      @(negedge clk);
      prog_en = 0;
      run_vector(0);
      run_vector(1);
      run_vector(2);
    end
    checks++;
    if (sat_total == 0) begin
      failures++;
      $display("no ADC clipping happened");
    end
    $display("ADC clipped %0d conversions", sat_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
