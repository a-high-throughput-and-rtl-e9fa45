// tb_lenet_conv1: runs part of the first LeNet layer (5x5 kernels, one input
// channel, 20 output channels) on the tile, followed by 2x2 max pooling.
// The 25 kernel taps map to crossbar rows 0..24 (the other rows hold zero
// weights), channels 0..15 to the columns of MAC 0 and 16..19 to MAC 1.
// The image is a synthetic 28x28 8-bit digit-like ring generated here,
// placed in the upper bits of the 16-bit activations (pixel * 2**7); the
// weights also use the upper bits (|w| <= 16000). Skipped conversions are
// the low-order ones, so data must be scaled towards the top of the range.
// The host side of the test gathers each 5x5 patch into one input vector.
// For four pooling windows, each made of four commands (the first
// overwrites the pooled value, the next three keep the maximum), the pooled
// outputs are compared with the reference (skipped conversions and ADC
// clipping included), and the total deviation from the exact convolution is
// reported. The activation unit of the tile applies ReLU, which commutes
// with the maximum; it is kept here.
module tb_lenet_conv1;
  import tb_ref_pkg::*;
  localparam int NM = 2, NR = 128, G = 16, NW = NR * 16 / 256, SH = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic host_en = 0, host_we = 0;
  logic [9:0] host_addr;
  logic [255:0] host_wdata, host_rdata;
  logic prog_en = 0;
  logic [0:0] prog_mac;
  logic [6:0] prog_row;
  logic [3:0] prog_group;
  logic signed [15:0] prog_weight;
  logic cmd_valid = 0, cmd_ready, done;
  rram_pkg::tile_cmd_t cmd;
  logic [31:0] conv_count, sat_count;

  rram_tile #(.NUM_MACS(NM)) dut (.*);

  int img[28][28];
  int k[20][25];
  int checks = 0, failures = 0;
  longint err_sum = 0, mag_sum = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sig(longint v);
    longint s;
    s = v >>> SH;
    return (s < 0) ? 0 : (s > 32767) ? 32767 : int'(s);
  endfunction

  initial begin
    int patch[NR];
    int wcol[NR];
    int best_q[20], best_x[20];
    logic [255:0] w;
    cmd = '0;
    for (int y = 0; y < 28; y++)
      for (int x = 0; x < 28; x++) begin
        int d2;
        d2 = (y - 14) * (y - 14) + (x - 14) * (x - 14);
        img[y][x] = (d2 >= 36 && d2 <= 81) ? 255 <<< 7 : 0;
      end
    for (int c = 0; c < 20; c++)
      for (int t = 0; t < 25; t++) k[c][t] = int'($urandom_range(0, 32000)) - 16000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < NM; m++)
      for (int r = 0; r < NR; r++)
        for (int g = 0; g < G; g++) begin
          int c;
          c = m * 16 + g;
          @(negedge clk);
          prog_en = 1; prog_mac = 1'(m); prog_row = 7'(r); prog_group = 4'(g);
          prog_weight = (r < 25 && c < 20) ? 16'(k[c][r]) : '0;
        end
    @(negedge clk);
    prog_en = 0;
    for (int win = 0; win < 4; win++) begin
      int wy, wx;
      wy = 4 + 2 * (win / 2) * 4;   // windows at rows 4 and 12, columns 4 and 12
      wx = 4 + 2 * (win % 2) * 4;
      foreach (best_q[c]) begin best_q[c] = 0; best_x[c] = 0; end
      for (int p = 0; p < 4; p++) begin
        int oy, ox;
        oy = wy + p / 2; ox = wx + p % 2;
        for (int r = 0; r < NR; r++) patch[r] = (r < 25) ? img[oy + r / 5][ox + r % 5] : 0;
        for (int kw = 0; kw < NW; kw++) begin
          for (int j = 0; j < 16; j++) w[j*16 +: 16] = 16'(patch[kw*16 + j]);
          @(negedge clk);
          host_en = 1; host_we = 1; host_addr = 10'(kw); host_wdata = w;
        end
        @(negedge clk);
        host_en = 0; host_we = 0;
        cmd = '{in_addr: 10'd0, out_addr: 10'd100, accumulate: 1'b0, pool: (p != 0),
                writeback: 1'b1, shift: 6'(SH)};
        cmd_valid = 1;
        @(negedge clk);
        cmd_valid = 0;
        while (!done) @(negedge clk);
        for (int c = 0; c < 20; c++) begin
          longint ex;
          int qv, xv;
          for (int r = 0; r < NR; r++) wcol[r] = (r < 25) ? k[c][r] : 0;
          ex = 0;
          for (int r = 0; r < 25; r++) ex += longint'(patch[r]) * longint'(k[c][r]);
          qv = sig(mac_ref(patch, wcol, NR, 16, 2, 8, 5, 14));
          xv = sig(ex);
          if (p == 0 || qv > best_q[c]) best_q[c] = qv;
          if (p == 0 || xv > best_x[c]) best_x[c] = xv;
        end
      end
      for (int m = 0; m < NM; m++) begin
        @(negedge clk);
        host_en = 1; host_we = 0; host_addr = 10'(100 + m);
        @(negedge clk);
        host_en = 0;
        for (int g = 0; g < G; g++) begin
          int c;
          c = m * 16 + g;
          if (c >= 20) continue;
          checks++;
          if (int'(host_rdata[g*16 +: 16]) != best_q[c]) begin
            failures++;
            $display("window %0d channel %0d got %0d exp %0d", win, c, host_rdata[g*16 +: 16], best_q[c]);
          end
          err_sum += (best_q[c] > best_x[c]) ? best_q[c] - best_x[c] : best_x[c] - best_q[c];
          mag_sum += best_x[c];
        end
      end
    end
    $display("pooled outputs: sum |quantized - exact| = %0d against sum |exact| = %0d over %0d values, %0d ADC clips",
             err_sum, mag_sum, checks, sat_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
