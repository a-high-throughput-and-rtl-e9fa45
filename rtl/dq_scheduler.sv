// dq_scheduler: MAC rescheduling by dynamic quantization.
//
// An activation is applied one digit per iteration (i = 0 .. ITERS-1,
// least significant first) and every weight occupies CELLS bitlines, cell b
// holding weight bits [2b+1:2b]. The partial product of iteration i on cell
// b has significance 2**(i + 2b). Conversions with i + 2b <= THRESH are
// skipped: they barely affect the result. For cell b this keeps iterations
// i >= THRESH + 1 - 2b, so iteration i converts only cells b >= bmin(i) of
// every weight, and an iteration with nothing to convert is not run at all
// (the crossbar is not even sampled). With THRESH = 14, 16 iterations and 8
// cells: iteration 0 is skipped, iterations 1-2 keep b = 7, 3-4 keep b >= 6,
// ..., 15 keeps all, for 1024 of 2048 conversions. A negative THRESH keeps
// everything and gives the plain schedule of 16 x 128 conversions.
//
// Bitline index of cell b of weight group g is g*CELLS + (CELLS-1-b), so the
// kept bitlines are those with (index mod CELLS) <= CELLS-1-bmin(i); they are
// visited in ascending order, one conversion per clock, with no idle cycles.
// `sample` (with `sample_iter`) asks the crossbar to sample-and-hold the
// bitlines of the next iteration; it is raised on the start cycle and on the
// last conversion cycle of each iteration, so conversions run back to back:
// a full operation takes 1 + (number of conversions) cycles from `start`,
// `done` being high in the cycle after the last conversion.
module dq_scheduler #(
  parameter int unsigned ITERS  = rram_pkg::A_BITS,
  parameter int unsigned COLS   = rram_pkg::XBAR_COLS,
  parameter int unsigned CELLS  = rram_pkg::CELLS_PER_W,
  parameter int signed   THRESH = rram_pkg::DQ_THRESH,
  localparam int unsigned IT_W  = $clog2(ITERS),
  localparam int unsigned BL_IW = $clog2(COLS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic             sample,
  output logic [IT_W-1:0]  sample_iter,
  output logic             conv_valid,
  output logic [IT_W-1:0]  conv_iter,
  output logic [BL_IW-1:0] conv_bl
);

  // Largest (index mod CELLS) kept in iteration i; -1 when nothing is kept.
  function automatic int lim_of(int i);
    int bmin;
    bmin = THRESH + 1 - i;
    bmin = (bmin <= 0) ? 0 : (bmin + 1) / 2;
    return int'(CELLS) - 1 - bmin;
  endfunction

  // First iteration at or after i that converts anything; ITERS if none.
  function automatic int next_iter(int i);
    for (int k = i; k < int'(ITERS); k++)
      if (lim_of(k) >= 0) return k;
    return int'(ITERS);
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_CONV, S_DONE} state_e;
  state_e           state;
  logic [IT_W-1:0]  iter;
  logic [BL_IW-1:0] bl;
  int               lim;
  logic             last_in_iter;
  int               nxt;
  int               first_it;

  always_comb begin
    lim          = lim_of(int'(iter));
    last_in_iter = (int'(bl) == int'(COLS) - int'(CELLS) + lim);
    nxt          = next_iter(int'(iter) + 1);
    first_it     = next_iter(0);
  end

  assign busy        = (state != S_IDLE);
  assign done        = (state == S_DONE);
  assign conv_valid  = (state == S_CONV);
  assign conv_iter   = iter;
  assign conv_bl     = bl;
  assign sample      = ((state == S_IDLE) && start && first_it < int'(ITERS)) ||
                       ((state == S_CONV) && last_in_iter && nxt < int'(ITERS));
  assign sample_iter = (state == S_IDLE) ? IT_W'(first_it) : IT_W'(nxt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      iter  <= '0;
      bl    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          iter  <= IT_W'(first_it);
          bl    <= '0;
          state <= (first_it < int'(ITERS)) ? S_CONV : S_DONE;
        end
        S_CONV: begin
          if (last_in_iter) begin
            bl <= '0;
            if (nxt < int'(ITERS)) iter  <= IT_W'(nxt);
            else                   state <= S_DONE;
          end else if ((int'(bl) % int'(CELLS)) < lim) begin
            bl <= bl + 1'b1;
          end else begin
            bl <= BL_IW'(int'(bl) + int'(CELLS) - lim);
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
