// mac_unit: one RRAM matrix-vector multiply unit ("MAC") of the tile.
//
// It multiplies a vector of ROWS signed activations by a ROWS x GROUPS
// matrix of signed weights held in a positive/negative crossbar pair, and
// returns GROUPS dot products. Weights are written through the segmented
// compression encoder, so each cell holds at most half its level range.
// Activations are recoded into canonic signed digits by one CSD encoder per
// row and applied one digit per iteration through 1-bit DACs. After each
// iteration the bitlines are sampled and held, and a single ADC converts,
// through the sampling multiplexer, only the bitlines the dynamic
// quantization scheduler keeps. The shift-and-add unit weights every code by
// 2**(i + 2b) and accumulates it into the output register of its column.
//
// Interface: `prog_en` writes weight `prog_weight` at (row, group) in one
// cycle. `start` (one cycle, while not busy) latches `act`; results are
// valid when `done` pulses and stay until the next start. Timing: start,
// one cycle to latch, one to sample the first kept iteration, one cycle per
// conversion (1024 at the default sizes), one to drain the ADC:
// done rises NUM_CONV + 3 cycles after start.
// `adc_conv`/`adc_sat` pulse for every conversion and every clipped one.
// Because skipped conversions and ADC clipping are the quantization the
// design trades for speed and energy, the results are exact only when
// nothing is skipped (THRESH < 0) and no bitline leaves the ADC range.
module mac_unit #(
  parameter int unsigned ROWS      = rram_pkg::XBAR_ROWS,
  parameter int unsigned COLS      = rram_pkg::XBAR_COLS,
  parameter int unsigned W_BITS    = rram_pkg::W_BITS,
  parameter int unsigned A_BITS    = rram_pkg::A_BITS,
  parameter int unsigned CELL_BITS = rram_pkg::CELL_BITS,
  parameter int unsigned ADC_BITS  = rram_pkg::ADC_BITS,
  parameter int signed   THRESH    = rram_pkg::DQ_THRESH,
  parameter int unsigned OUT_W     = 40,
  localparam int unsigned CELLS    = W_BITS / CELL_BITS,
  localparam int unsigned GROUPS   = COLS / CELLS,
  localparam int unsigned BL_W     = $clog2(ROWS) + CELL_BITS + 1,
  localparam int unsigned IT_W     = $clog2(A_BITS),
  localparam int unsigned BL_IW    = $clog2(COLS)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // weight programming
  input  logic                                prog_en,
  input  logic [$clog2(ROWS)-1:0]             prog_row,
  input  logic [$clog2(GROUPS)-1:0]           prog_group,
  input  logic signed [W_BITS-1:0]            prog_weight,
  // operation
  input  logic                                start,
  input  logic signed [ROWS-1:0][A_BITS-1:0]  act,
  output logic                                busy,
  output logic                                done,
  output logic signed [GROUPS-1:0][OUT_W-1:0] result,
  // event pulses
  output logic                                adc_conv,
  output logic                                adc_sat
);

  // ---- weight path: SCE then crossbar programming
  logic [CELLS-1:0][CELL_BITS-1:0] enc_pos, enc_neg;

  sce_weight_encoder #(.W_BITS(W_BITS), .CELL_BITS(CELL_BITS)) u_sce (
    .weight(prog_weight), .pos_cells(enc_pos), .neg_cells(enc_neg)
  );

  // ---- input register and CSD encoders
  logic signed [ROWS-1:0][A_BITS-1:0] act_q;
  logic [ROWS-1:0][A_BITS-1:0]        dig_pos, dig_neg;

  for (genvar r = 0; r < ROWS; r++) begin : g_csd
    csd_encoder #(.A_BITS(A_BITS)) u_csd (
      .act(act_q[r]), .pos_digits(dig_pos[r]), .neg_digits(dig_neg[r])
    );
  end

  // ---- control
  logic            sched_start, sched_busy, sched_done;
  logic            sample;
  logic [IT_W-1:0] sample_iter;
  logic            conv_valid;
  logic [IT_W-1:0] conv_iter;
  logic [BL_IW-1:0] conv_bl;
  logic            drain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q       <= '0;
      sched_start <= 1'b0;
      drain       <= 1'b0;
      busy        <= 1'b0;
    end else begin
      sched_start <= start && !busy;
      if (start && !busy) begin
        act_q <= act;
        busy  <= 1'b1;
      end else if (drain) begin
        busy  <= 1'b0;
      end
      drain <= sched_done;
    end
  end
  assign done = drain;

  dq_scheduler #(.ITERS(A_BITS), .COLS(COLS), .CELLS(CELLS), .THRESH(THRESH)) u_sched (
    .clk, .rst_n, .start(sched_start), .busy(sched_busy), .done(sched_done),
    .sample, .sample_iter, .conv_valid, .conv_iter, .conv_bl
  );

  // ---- DAC drive: digit `sample_iter` of every row
  logic [ROWS-1:0] row_pos, row_neg;
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      row_pos[r] = dig_pos[r][sample_iter];
      row_neg[r] = dig_neg[r][sample_iter];
    end
  end

  logic signed [COLS-1:0][BL_W-1:0] held;

  crossbar_pair #(.ROWS(ROWS), .COLS(COLS), .CELL_BITS(CELL_BITS), .CELLS(CELLS)) u_xbar (
    .clk, .prog_en, .prog_row, .prog_group, .prog_pos(enc_pos), .prog_neg(enc_neg),
    .row_pos, .row_neg, .sample, .held
  );

  logic signed [BL_W-1:0] mux_out;
  sampling_mux #(.COLS(COLS), .W(BL_W)) u_mux (.held, .sel(conv_bl), .out(mux_out));

  logic                       code_valid;
  logic signed [ADC_BITS-1:0] code;
  logic [IT_W+BL_IW-1:0]      code_tag;

  adc_model #(.IN_W(BL_W), .ADC_BITS(ADC_BITS), .TAG_W(IT_W + BL_IW)) u_adc (
    .clk, .rst_n, .in_valid(conv_valid), .in_value(mux_out), .in_tag({conv_iter, conv_bl}),
    .code_valid, .code, .code_tag, .saturated(adc_sat)
  );
  assign adc_conv = code_valid;

  shift_add_reg #(.COLS(COLS), .CELLS(CELLS), .CELL_BITS(CELL_BITS), .ITERS(A_BITS),
                  .ADC_BITS(ADC_BITS), .OUT_W(OUT_W)) u_sa (
    .clk, .rst_n, .clear(sched_start), .in_valid(code_valid), .code,
    .iter(code_tag[IT_W+BL_IW-1:BL_IW]), .bl(code_tag[BL_IW-1:0]), .result
  );

  // A new operation is only accepted while idle.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) sched_start |-> !sched_busy);

endmodule
