// cbps_mv_calc: motion vector calculation of the CBPS motion estimator.
//
// It receives the SSAD of each candidate from the processing element and
// keeps the smallest one, together with its displacement (u, v). The motion
// vector of a block is the displacement with the minimum SSAD over all the
// candidates that were compared, coarse and fine. On equal SSADs the
// candidate seen first is kept (the design's own tie rule). Candidates with
// cand_ok = 0 (outside the search window or the frame) are not compared.
//
// Two minima are kept: the overall one, and the minimum over the coarse
// candidates only (ctr_u, ctr_v), which is the centre around which the
// candidate generator places the 8 fine-search positions. The coarse minimum
// stops changing once fine candidates arrive; it restarts from (0, 0) with
// every block.
//
// Interface and timing: sum/sum_valid come straight from the processing
// element's adder, with the candidate's cand_ok, phase and (u, v); blk_last
// marks the final candidate of a block. The comparison is combinational and
// the minima are registered at the edge. At the edge that closes a block the
// result is registered on mv_* with a one-cycle mv_valid pulse, tagged with
// the block position (blk_x, blk_y), and the minima restart for the next
// block.
module cbps_mv_calc
  import cbps_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  ssad_t              sum,
  input  logic               sum_valid,
  input  logic               cand_ok,
  input  phase_e             phase,
  input  disp_t              u,
  input  disp_t              v,
  input  logic               blk_last,
  input  logic [BLK_W-1:0]   blk_x,
  input  logic [BLK_W-1:0]   blk_y,
  output disp_t              ctr_u,
  output disp_t              ctr_v,
  output logic               mv_valid,
  output disp_t              mv_u,
  output disp_t              mv_v,
  output ssad_t              mv_ssad,
  output logic [BLK_W-1:0]   mv_x,
  output logic [BLK_W-1:0]   mv_y
);
  logic  have_q, chave_q;
  ssad_t best_q, cbest_q;
  disp_t bu_q, bv_q, cu_q, cv_q;

  logic better, cbetter;
  assign better  = sum_valid && cand_ok && (!have_q || (sum < best_q));
  assign cbetter = sum_valid && cand_ok && (phase == PH_COARSE) &&
                   (!chave_q || (sum < cbest_q));

  // Winner including the candidate now on the input.
  ssad_t win_s;
  disp_t win_u, win_v;
  always_comb begin
    if (better) begin
      win_s = sum;
      win_u = u;
      win_v = v;
    end else if (have_q) begin
      win_s = best_q;
      win_u = bu_q;
      win_v = bv_q;
    end else begin
      win_s = '1;       // no candidate was compared
      win_u = '0;
      win_v = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_q   <= 1'b0;
      chave_q  <= 1'b0;
      best_q   <= '0;
      cbest_q  <= '0;
      bu_q     <= '0;
      bv_q     <= '0;
      cu_q     <= '0;
      cv_q     <= '0;
      mv_valid <= 1'b0;
      mv_u     <= '0;
      mv_v     <= '0;
      mv_ssad  <= '0;
      mv_x     <= '0;
      mv_y     <= '0;
    end else begin
      mv_valid <= 1'b0;
      if (sum_valid && blk_last) begin
        mv_valid <= 1'b1;
        mv_u     <= win_u;
        mv_v     <= win_v;
        mv_ssad  <= win_s;
        mv_x     <= blk_x;
        mv_y     <= blk_y;
        have_q   <= 1'b0;
        chave_q  <= 1'b0;
        cu_q     <= '0;
        cv_q     <= '0;
      end else begin
        if (better) begin
          have_q <= 1'b1;
          best_q <= sum;
          bu_q   <= u;
          bv_q   <= v;
        end
        if (cbetter) begin
          chave_q <= 1'b1;
          cbest_q <= sum;
          cu_q    <= u;
          cv_q    <= v;
        end
      end
    end
  end

  assign ctr_u = cu_q;
  assign ctr_v = cv_q;

endmodule
