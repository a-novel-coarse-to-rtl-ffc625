// cbps_control: timing and control section of the CBPS motion estimator.
//
// A start pulse runs the estimator over every block of the frame in raster
// order. Each block takes a fixed 5443 cycles:
//   LOAD    1 cycle     pixel counter and candidate generator restart
//   COARSE  77 x 64     one sub-sampled pixel read per cycle
//   BUBBLE  1 cycle     the last coarse SSAD reaches the MV calculation, so
//                       that the best coarse point is known
//   FINE    8 x 64      the 8 neighbours of the best coarse point
//   DRAIN   1 cycle     the last fine SSAD is compared, the block's motion
//                       vector is registered; then the next block's LOAD
// 85 x 64 = 5440 pixel cycles plus 3 overhead cycles matches the 5443
// cycles per block of the published architecture; how the 3 cycles are
// spent is this design's choice.
//
// Interface and timing: start is sampled in IDLE. issue is high in every
// cycle in which a pixel pair is read. The counter commands (blk_clear,
// blk_next, pix_clear, pix_step, start_coarse, start_fine, cand_step) act at
// the next rising edge. done pulses for one cycle, after the last block's
// motion vector has been registered (together with its mv_valid); busy is
// high from the edge that accepts start until then.
module cbps_control
  import cbps_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  pix_last,
  input  logic  cand_last,
  input  logic  blk_last,
  output logic  blk_clear,
  output logic  blk_next,
  output logic  pix_clear,
  output logic  pix_step,
  output logic  start_coarse,
  output logic  start_fine,
  output logic  cand_step,
  output logic  issue,
  output logic  busy,
  output logic  done
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_COARSE, S_BUBBLE, S_FINE, S_DRAIN} state_e;
  state_e state_q, state_d;

  always_comb begin
    state_d      = state_q;
    blk_clear    = 1'b0;
    blk_next     = 1'b0;
    pix_clear    = 1'b0;
    pix_step     = 1'b0;
    start_coarse = 1'b0;
    start_fine   = 1'b0;
    cand_step    = 1'b0;
    issue        = 1'b0;
    unique case (state_q)
      S_IDLE: begin
        if (start) begin
          blk_clear = 1'b1;
          state_d   = S_LOAD;
        end
      end
      S_LOAD: begin
        pix_clear    = 1'b1;
        start_coarse = 1'b1;
        state_d      = S_COARSE;
      end
      S_COARSE, S_FINE: begin
        issue    = 1'b1;
        pix_step = 1'b1;
        if (pix_last) begin
          cand_step = 1'b1;
          if (cand_last) state_d = (state_q == S_COARSE) ? S_BUBBLE : S_DRAIN;
        end
      end
      S_BUBBLE: begin
        start_fine = 1'b1;
        state_d    = S_FINE;
      end
      S_DRAIN: begin
        if (blk_last) begin
          state_d = S_IDLE;
        end else begin
          blk_next = 1'b1;
          state_d  = S_LOAD;
        end
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      done    <= 1'b0;
    end else begin
      state_q <= state_d;
      done    <= (state_q == S_DRAIN) && blk_last;
    end
  end

  assign busy = (state_q != S_IDLE);

endmodule
