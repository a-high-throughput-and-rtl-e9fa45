// tb_rram_tile_full: the end-to-end tile test of tb_rram_tile with every
// parameter of the tile at its default: 24 MACs, 128x128 crossbar pairs,
// 16-bit weights in 2-bit cells, 5-bit ADC, threshold 14, 32 KB eDRAM.
// Programs all 24 x 128 x 16 weights, runs the same three commands
// (overwrite, accumulate + write back, max pooling + write back) and checks
// every output word against the reference model, the conversion count of
// 1024 per MAC and command, and that every mechanism occurred.
module tb_rram_tile_full;
  import tb_ref_pkg::*;
  localparam int NM = 24;          // MACs (default)
  localparam int NR = 128;         // crossbar rows (default)
  localparam int G  = 16;          // weight columns per MAC
  localparam int NW = NR * 16 / 256;
  localparam int SH = 12;          // output shift

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic host_en = 0, host_we = 0;
  logic [9:0] host_addr;
  logic [255:0] host_wdata, host_rdata;
  logic prog_en = 0;
  logic [$clog2(NM > 1 ? NM : 2)-1:0] prog_mac;
  logic [$clog2(NR)-1:0] prog_row;
  logic [3:0] prog_group;
  logic signed [15:0] prog_weight;
  logic cmd_valid = 0, cmd_ready, done;
  rram_pkg::tile_cmd_t cmd;
  logic [31:0] conv_count, sat_count;

  rram_tile dut (.*);

  int wts[NM][G][NR];
  int vec[3][NR];
  longint q[3][NM][G];
  int checks = 0, failures = 0;
  int n_acc = 0, n_relu0 = 0, n_sat = 0, n_keep = 0, n_take = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sig(longint v);
    longint s;
    s = v >>> SH;
    return (s < 0) ? 0 : (s > 32767) ? 32767 : int'(s);
  endfunction

  task automatic issue(int in_a, int out_a, bit acc, bit pool, bit wb);
    int cyc;
    int c0;
    c0 = int'(conv_count);
    @(negedge clk);
    checks++;
    if (!cmd_ready) begin failures++; $display("tile not ready"); end
    cmd = '{in_addr: 10'(in_a), out_addr: 10'(out_a), accumulate: acc, pool: pool,
            writeback: wb, shift: 6'(SH)};
    cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    checks++;
    if (cmd_ready) begin failures++; $display("tile ready while busy"); end
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    checks++;
    if (int'(conv_count) - c0 != 1024 * NM) begin
      failures++;
      $display("conversions %0d, expected %0d", int'(conv_count) - c0, 1024 * NM);
    end
    $display("command took %0d cycles", cyc + 1);
  endtask

  initial begin
    logic [255:0] w;
    int pooled[NM][G];
    cmd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // weights
    for (int m = 0; m < NM; m++)
      for (int r = 0; r < NR; r++)
        for (int g = 0; g < G; g++) begin
          @(negedge clk);
          wts[m][g][r] = int'(signed'(16'($urandom)));
          if (g == 0) wts[m][g][r] = 20000;        // drives large sums
          prog_en = 1; prog_mac = $bits(prog_mac)'(m); prog_row = $bits(prog_row)'(r);
          prog_group = 4'(g); prog_weight = 16'(wts[m][g][r]);
        end
    @(negedge clk);
    prog_en = 0;
    // activations: vectors 0..2 at words 0, NW, 2*NW; guard pattern elsewhere
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      host_en = 1; host_we = 1; host_addr = 10'(a); host_wdata = {8{32'hA5A5_0000 + 32'(a)}};
    end
    for (int v = 0; v < 3; v++)
      for (int k = 0; k < NW; k++) begin
        for (int j = 0; j < 16; j++) begin
          vec[v][k*16 + j] = int'($urandom_range(0, 32767));
          if ($urandom_range(0, 3) == 0) vec[v][k*16 + j] = 0;
          w[j*16 +: 16] = 16'(vec[v][k*16 + j]);
        end
        @(negedge clk);
        host_en = 1; host_we = 1; host_addr = 10'(v * NW + k); host_wdata = w;
      end
    @(negedge clk);
    host_en = 0; host_we = 0;
    for (int v = 0; v < 3; v++)
      for (int m = 0; m < NM; m++)
        for (int g = 0; g < G; g++)
          q[v][m][g] = mac_ref(vec[v], wts[m][g], NR, 16, 2, 8, 5, 14);

    issue(0, 40, 0, 0, 0);
    issue(NW, 40, 1, 0, 1);
    n_acc++;
    // check B
    for (int m = 0; m < NM; m++) begin
      @(negedge clk);
      host_en = 1; host_we = 0; host_addr = 10'(40 + m);
      @(negedge clk);
      host_en = 0;
      for (int g = 0; g < G; g++) begin
        int e;
        e = sig(q[0][m][g] + q[1][m][g]);
        pooled[m][g] = e;
        if (q[0][m][g] + q[1][m][g] < 0) n_relu0++;
        if (e == 32767) n_sat++;
        checks++;
        if (int'(host_rdata[g*16 +: 16]) != e) begin
          failures++;
          $display("B mac %0d col %0d got %0d exp %0d", m, g, host_rdata[g*16 +: 16], e);
        end
      end
    end
    issue(2 * NW, 40, 0, 1, 1);
    for (int m = 0; m < NM; m++) begin
      @(negedge clk);
      host_en = 1; host_we = 0; host_addr = 10'(40 + m);
      @(negedge clk);
      host_en = 0;
      for (int g = 0; g < G; g++) begin
        int e, n;
        n = sig(q[2][m][g]);
        e = (pooled[m][g] > n) ? pooled[m][g] : n;
        if (pooled[m][g] > n) n_keep++;
        if (n > pooled[m][g]) n_take++;
        checks++;
        if (int'(host_rdata[g*16 +: 16]) != e) begin
          failures++;
          $display("C mac %0d col %0d got %0d exp %0d", m, g, host_rdata[g*16 +: 16], e);
        end
      end
    end
    // guard words next to the output area are untouched
    for (int a = 3 * NW; a < 40; a++) begin
      @(negedge clk);
      host_en = 1; host_we = 0; host_addr = 10'(a);
      @(negedge clk);
      host_en = 0;
      checks++;
      if (host_rdata !== {8{32'hA5A5_0000 + 32'(a)}}) begin
        failures++;
        $display("word %0d overwritten", a);
      end
    end
    $display("mechanisms: skipped conversions %0d, ADC clipping %0d, accumulate %0d, relu-zero %0d, saturate %0d, pool-keep %0d, pool-take %0d",
             3 * NM * 1024, sat_count, n_acc, n_relu0, n_sat, n_keep, n_take);
    checks++;
    if (sat_count == 0 || n_acc == 0 || n_relu0 == 0 || n_sat == 0 || n_keep == 0 || n_take == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
