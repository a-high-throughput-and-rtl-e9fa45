// rram_tile: one tile of the RRAM convolution accelerator.
//
// A tile holds NUM_MAC matrix-vector units (mac_unit), an eDRAM buffer for
// feature maps, and the output chain shift-and-add + output register
// (tile_sa_or), activation function (sigma_unit) and max pooling
// (maxpool_unit). A tile operation takes ROWS activations from consecutive
// eDRAM words, broadcasts them to every MAC, lets each MAC compute its
// LANES dot products with the dynamically quantized, encoded crossbar
// schedule, combines the results in the output register, and (optionally)
// applies scaling + ReLU and max pooling and writes one eDRAM word of LANES
// 16-bit activations per MAC, MAC m to word out_addr + m.
//
// Host interface (plain signals):
//  * eDRAM port (host_en/we/addr/wdata, host_rdata one cycle later), used
//    only while the tile is idle;
//  * weight port (prog_en, prog_mac, prog_row, prog_group, prog_weight),
//    one signed weight per cycle, encoded on the fly; only while idle;
//  * command port: `cmd` is taken when `cmd_valid` and `cmd_ready` are both
//    high; `done` pulses when the operation has finished.
// Timing of one operation: NWORDS+1 cycles to load the activations, the MAC
// run (conversions + 3 cycles), NUM_MAC cycles of S+A, NUM_MAC cycles of
// write back, plus a few cycles of sequencing.
// conv_count and sat_count count the ADC conversions and the clipped
// conversions of all MACs since reset.
// The grouping into a tile with these parts follows the design; the command
// format, the controller and the eDRAM layout are this design's choices.
module rram_tile #(
  parameter int unsigned NUM_MACS  = rram_pkg::NUM_MAC,
  parameter int unsigned ROWS      = rram_pkg::XBAR_ROWS,
  parameter int unsigned COLS      = rram_pkg::XBAR_COLS,
  parameter int unsigned W_BITS    = rram_pkg::W_BITS,
  parameter int unsigned A_BITS    = rram_pkg::A_BITS,
  parameter int unsigned CELL_BITS = rram_pkg::CELL_BITS,
  parameter int unsigned ADC_BITS  = rram_pkg::ADC_BITS,
  parameter int signed   THRESH    = rram_pkg::DQ_THRESH,
  parameter int unsigned EDRAM_B   = rram_pkg::EDRAM_BYTES,
  parameter int unsigned BUS_W     = rram_pkg::EDRAM_BUS,
  localparam int unsigned OUT_W    = 40,
  localparam int unsigned CELLS    = W_BITS / CELL_BITS,
  localparam int unsigned LANES    = COLS / CELLS,
  localparam int unsigned NWORDS   = ROWS * A_BITS / BUS_W,
  localparam int unsigned AW       = $clog2(EDRAM_B * 8 / BUS_W),
  localparam int unsigned MW       = (NUM_MACS > 1) ? $clog2(NUM_MACS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // eDRAM host port
  input  logic                      host_en,
  input  logic                      host_we,
  input  logic [AW-1:0]             host_addr,
  input  logic [BUS_W-1:0]          host_wdata,
  output logic [BUS_W-1:0]          host_rdata,
  // weight programming
  input  logic                      prog_en,
  input  logic [MW-1:0]             prog_mac,
  input  logic [$clog2(ROWS)-1:0]   prog_row,
  input  logic [$clog2(LANES)-1:0]  prog_group,
  input  logic signed [W_BITS-1:0]  prog_weight,
  // commands
  input  logic                      cmd_valid,
  output logic                      cmd_ready,
  input  rram_pkg::tile_cmd_t       cmd,
  output logic                      done,
  // statistics since reset
  output logic [31:0]               conv_count,
  output logic [31:0]               sat_count
);

  typedef enum logic [2:0] {T_IDLE, T_LOAD, T_START, T_WAIT, T_SA, T_OUT, T_FIN} tstate_e;
  tstate_e   state;
  rram_pkg::tile_cmd_t cmd_q;
  logic [$clog2(NWORDS+1)-1:0] k;
  logic [MW-1:0]               m;

  // ---- eDRAM with host / controller arbitration
  logic             e_en, e_we;
  logic [AW-1:0]    e_addr;
  logic [BUS_W-1:0] e_wdata, e_rdata;

  edram_buffer #(.BYTES(EDRAM_B), .WIDTH(BUS_W)) u_edram (
    .clk, .en(e_en), .we(e_we), .addr(e_addr), .wdata(e_wdata), .rdata(e_rdata)
  );
  assign host_rdata = e_rdata;

  // ---- input register: ROWS activations, filled word by word
  logic [NWORDS-1:0][BUS_W-1:0] in_reg;
  logic signed [ROWS-1:0][A_BITS-1:0] act_bus;
  assign act_bus = in_reg;

  // ---- MACs
  logic mac_start;
  logic [NUM_MACS-1:0] mac_done, mac_conv, mac_sat, done_seen;
  logic signed [NUM_MACS-1:0][LANES-1:0][OUT_W-1:0] mac_res;

  for (genvar g = 0; g < NUM_MACS; g++) begin : g_mac
    logic busy_unused;
    mac_unit #(.ROWS(ROWS), .COLS(COLS), .W_BITS(W_BITS), .A_BITS(A_BITS),
               .CELL_BITS(CELL_BITS), .ADC_BITS(ADC_BITS), .THRESH(THRESH),
               .OUT_W(OUT_W)) u_mac (
      .clk, .rst_n,
      .prog_en(prog_en && state == T_IDLE && prog_mac == MW'(g)),
      .prog_row, .prog_group, .prog_weight,
      .start(mac_start), .act(act_bus), .busy(busy_unused), .done(mac_done[g]),
      .result(mac_res[g]), .adc_conv(mac_conv[g]), .adc_sat(mac_sat[g])
    );
  end

  // ---- output chain: S+A / OR -> sigma -> MP
  logic signed [LANES-1:0][OUT_W-1:0]  or_rd;
  logic signed [LANES-1:0][A_BITS-1:0] sig_out, mp_out;

  tile_sa_or #(.NUM_MAC(NUM_MACS), .LANES(LANES), .OUT_W(OUT_W)) u_sa_or (
    .clk, .rst_n, .wr_en(state == T_SA), .accumulate(cmd_q.accumulate),
    .mac_sel(m), .mac_result(mac_res[m]), .rd_sel(m), .rd_data(or_rd)
  );

  sigma_unit #(.LANES(LANES), .IN_W(OUT_W), .A_BITS(A_BITS)) u_sigma (
    .in(or_rd), .shift(cmd_q.shift), .out(sig_out)
  );

  maxpool_unit #(.NUM_MAC(NUM_MACS), .LANES(LANES), .A_BITS(A_BITS)) u_mp (
    .clk, .rst_n, .wr_en(state == T_OUT), .pool(cmd_q.pool), .mac_sel(m),
    .in(sig_out), .out(mp_out)
  );

  // ---- eDRAM port mux
  always_comb begin
    e_en    = 1'b0;
    e_we    = 1'b0;
    e_addr  = '0;
    e_wdata = '0;
    unique case (state)
      T_IDLE: begin
        e_en    = host_en;
        e_we    = host_we;
        e_addr  = host_addr;
        e_wdata = host_wdata;
      end
      T_LOAD: begin
        e_en   = (int'(k) < int'(NWORDS));
        e_addr = AW'(cmd_q.in_addr) + AW'(k);
      end
      T_OUT: begin
        e_en    = 1'b1;
        e_we    = 1'b1;
        e_addr  = AW'(cmd_q.out_addr) + AW'(m);
        e_wdata = BUS_W'(mp_out);
      end
      default: ;
    endcase
  end

  assign cmd_ready = (state == T_IDLE);
  assign mac_start = (state == T_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= T_IDLE;
      cmd_q      <= '0;
      k          <= '0;
      m          <= '0;
      in_reg     <= '0;
      done       <= 1'b0;
      done_seen  <= '0;
      conv_count <= '0;
      sat_count  <= '0;
    end else begin
      done       <= 1'b0;
      conv_count <= conv_count + 32'($countones(mac_conv));
      sat_count  <= sat_count + 32'($countones(mac_sat));
      unique case (state)
        T_IDLE: if (cmd_valid) begin
          cmd_q <= cmd;
          k     <= '0;
          state <= T_LOAD;
        end
        T_LOAD: begin
          if (k != 0) in_reg[k-1] <= e_rdata;
          if (int'(k) == int'(NWORDS)) state <= T_START;
          k <= k + 1'b1;
        end
        T_START: begin
          done_seen <= '0;
          state     <= T_WAIT;
        end
        T_WAIT: begin
          done_seen <= done_seen | mac_done;
          if (&(done_seen | mac_done)) begin
            m     <= '0;
            state <= T_SA;
          end
        end
        T_SA: begin
          m <= m + 1'b1;
          if (int'(m) == int'(NUM_MACS) - 1) begin
            m     <= '0;
            state <= cmd_q.writeback ? T_OUT : T_FIN;
          end
        end
        T_OUT: begin
          m <= m + 1'b1;
          if (int'(m) == int'(NUM_MACS) - 1) state <= T_FIN;
        end
        T_FIN: begin
          done  <= 1'b1;
          state <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // The eDRAM must hold the input and output words addressed by a command.
  a_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd_valid && cmd_ready) |-> (int'(cmd.in_addr) + int'(NWORDS) <= 2**AW &&
                                  int'(cmd.out_addr) + int'(NUM_MACS) <= 2**AW));

endmodule
