// tb_edram_buffer: writes random words to random addresses of the full
// 32 KB buffer (1024 x 256 bit) and reads them back with the one-cycle read
// latency, comparing against a shadow copy.
module tb_edram_buffer;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, we = 0;
  logic [9:0] addr;
  logic [255:0] wdata, rdata;
  logic [255:0] shadow[1024];
  bit written[1024];
  int checks = 0, failures = 0;

  edram_buffer #(.BYTES(32768), .WIDTH(256)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [255:0] rnd();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 10'(a); wdata = rnd(); shadow[a] = wdata;
    end
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      en = 1; addr = 10'($urandom);
      we = ($urandom_range(0, 2) == 0);
      wdata = rnd();
      if (we) begin
        shadow[addr] = wdata;
      end else begin
        logic [9:0] a;
        a = addr;
        @(negedge clk);
        en = 0;
        checks++;
        if (rdata !== shadow[a]) begin
          failures++;
          $display("addr %0d mismatch", a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
