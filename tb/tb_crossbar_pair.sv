// tb_crossbar_pair: programs a 16x16 crossbar pair (two weight groups of
// eight 2-bit cells) with random levels, drives random signed digits on the
// rows, and checks every held bitline against sum_r d(r)*(G+ - G-) computed
// here. Also checks that the held values do not move without `sample`, and
// that programming lands on bitline g*8 + 7 - b.
module tb_crossbar_pair;
  localparam int ROWS = 16, COLS = 16, CB = 2, CELLS = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic prog_en = 0;
  logic [3:0] prog_row;
  logic [0:0] prog_group;
  logic [CELLS-1:0][CB-1:0] prog_pos, prog_neg;
  logic [ROWS-1:0] row_pos, row_neg;
  logic sample = 0;
  logic signed [COLS-1:0][$clog2(ROWS)+CB:0] held;
  int gp[ROWS][COLS], gn[ROWS][COLS];
  int checks = 0, failures = 0;

  crossbar_pair #(.ROWS(ROWS), .COLS(COLS), .CELL_BITS(CB), .CELLS(CELLS)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int c = 0; c < COLS; c++) begin
      int e;
      e = 0;
      for (int r = 0; r < ROWS; r++) begin
        if (row_pos[r]) e += gp[r][c] - gn[r][c];
        if (row_neg[r]) e -= gp[r][c] - gn[r][c];
      end
      checks++;
      if (int'(signed'(held[c])) != e) begin
        failures++;
        $display("col %0d held=%0d exp=%0d", c, held[c], e);
      end
    end
  endtask

  initial begin
    row_pos = '0; row_neg = '0;
    for (int r = 0; r < ROWS; r++)
      for (int g = 0; g < COLS / CELLS; g++) begin
        @(negedge clk);
        prog_en = 1; prog_row = 4'(r); prog_group = 1'(g);
        for (int b = 0; b < CELLS; b++) begin
          prog_pos[b] = 2'($urandom_range(0, 3));
          prog_neg[b] = 2'($urandom_range(0, 3));
          gp[r][g*CELLS + CELLS-1-b] = int'(prog_pos[b]);
          gn[r][g*CELLS + CELLS-1-b] = int'(prog_neg[b]);
        end
      end
    @(negedge clk);
    prog_en = 0;
    for (int t = 0; t < 50; t++) begin
      logic [ROWS-1:0] pp, nn;
      @(negedge clk);
      pp = ROWS'($urandom); nn = ROWS'($urandom) & ~pp;
      if (t == 0) begin pp = '1; nn = '0; end
      if (t == 1) begin pp = '0; nn = '1; end
      row_pos = pp; row_neg = nn; sample = 1;
      @(negedge clk);
      sample = 0;
      check_all();
      row_pos = ~pp; row_neg = '0;
      @(negedge clk);
      row_pos = pp; row_neg = nn;
      check_all();   // still the sampled values
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
