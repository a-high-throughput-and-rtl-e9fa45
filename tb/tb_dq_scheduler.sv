// tb_dq_scheduler: runs the scheduler with the default threshold (14) and
// with skipping disabled (-1). For each run it checks that every (iteration,
// bitline) pair with i + 2b > threshold is converted exactly once and no
// other, that conversions come in ascending iteration and bitline order with
// no idle cycle, that the crossbar is sampled for iteration i before its
// first conversion and never for an iteration with nothing to convert, the
// totals (1024 and 2048), the per-iteration counts of the schedule (16, 16,
// 32, 32, 48, ..., 128) and the latency start -> done = conversions + 1.
module tb_dq_scheduler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start_a = 0, busy_a, done_a, sample_a, cv_a;
  logic [3:0] si_a, ci_a;
  logic [6:0] cb_a;
  logic start_b = 0, busy_b, done_b, sample_b, cv_b;
  logic [3:0] si_b, ci_b;
  logic [6:0] cb_b;

  dq_scheduler #(.ITERS(16), .COLS(128), .CELLS(8), .THRESH(14)) dut_a (
    .clk, .rst_n, .start(start_a), .busy(busy_a), .done(done_a), .sample(sample_a),
    .sample_iter(si_a), .conv_valid(cv_a), .conv_iter(ci_a), .conv_bl(cb_a));
  dq_scheduler #(.ITERS(16), .COLS(128), .CELLS(8), .THRESH(-1)) dut_b (
    .clk, .rst_n, .start(start_b), .busy(busy_b), .done(done_b), .sample(sample_b),
    .sample_iter(si_b), .conv_valid(cv_b), .conv_iter(ci_b), .conv_bl(cb_b));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int thresh, input int exp_total, input bit which);
    int seen[16][128];
    int per_iter[16];
    int held_iter, cycles, total, last;
    bit started;
    foreach (seen[i, c]) seen[i][c] = 0;
    foreach (per_iter[i]) per_iter[i] = 0;
    held_iter = -1; cycles = 0; total = 0; last = -1; started = 0;
    @(negedge clk);
    if (which) start_b = 1; else start_a = 1;
    forever begin
      logic s, cv, dn;
      logic [3:0] si, ci;
      logic [6:0] cb;
      #1;
      s  = which ? sample_b : sample_a;  si = which ? si_b : si_a;
      cv = which ? cv_b : cv_a;          ci = which ? ci_b : ci_a;
      cb = which ? cb_b : cb_a;          dn = which ? done_b : done_a;
      if (dn) break;
      if (cv) begin
        int idx, b;
        started = 1;
        idx = int'(ci) * 128 + int'(cb);
        b = 7 - int'(cb) % 8;
        seen[ci][cb]++;
        per_iter[ci]++;
        total++;
        checks++;
        if (int'(ci) + 2 * b <= thresh || held_iter != int'(ci) || idx <= last) begin
          failures++;
          $display("bad conversion i=%0d bl=%0d held=%0d", ci, cb, held_iter);
        end
        last = idx;
      end else if (started) begin
        checks++; failures++;
        $display("idle cycle inside the schedule");
      end
      if (s) held_iter = int'(si);
      @(negedge clk);
      start_a = 0; start_b = 0;
      cycles++;
    end
    foreach (seen[i, c]) begin
      int b;
      b = 7 - c % 8;
      checks++;
      if (seen[i][c] != ((i + 2 * b > thresh) ? 1 : 0)) begin
        failures++;
        $display("pair i=%0d bl=%0d converted %0d times", i, c, seen[i][c]);
      end
    end
    checks++;
    if (total != exp_total || cycles != exp_total + 1) begin
      failures++;
      $display("total=%0d cycles=%0d expected %0d", total, cycles, exp_total);
    end
    if (thresh == 14) begin
      int exp_it[16] = '{0, 16, 16, 32, 32, 48, 48, 64, 64, 80, 80, 96, 96, 112, 112, 128};
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (per_iter[i] != exp_it[i]) begin
          failures++;
          $display("iteration %0d: %0d conversions, expected %0d", i, per_iter[i], exp_it[i]);
        end
      end
    end
    $display("threshold %0d: %0d conversions in %0d cycles", thresh, total, cycles);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(14, 1024, 0);
    run(-1, 2048, 1);
    run(14, 1024, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
