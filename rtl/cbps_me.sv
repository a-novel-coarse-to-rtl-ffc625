// cbps_me: CBPS (Candidate Block and Pixel Sub-sampling) block-matching
// motion estimator, top level.
//
// For every 16 x 16 block of the current frame it searches the previous
// frame within a +-8 pixel window, but instead of all 289 displacements it
// tries 85: a coarse pass over 77 displacements spread evenly over the whole
// window, then a fine pass over the 8 displacements around the best coarse
// one. Each candidate is scored on only 64 of the block's 256 pixels (a
// 4-queen pattern: four pixels per row, one per column group of four). One
// processing element scores one pixel per cycle, so a block takes
// 85 x 64 + 3 = 5443 cycles and a CIF frame (396 blocks) 2,155,428 cycles:
// 30 frames/s need a 65 MHz clock.
//
// Data flow: the control FSM sequences blocks, candidates and pixels; the
// candidate generator gives the displacement (u, v); the address generator
// forms the current-frame pixel coordinate (Cx, Cy) and the displaced one
// (Sx, Sy); C-Mem and S-Mem (synchronous read) return the two pixels a cycle
// later, together with the pipelined control word; the processing element
// accumulates |c - s| and hands each candidate's SSAD to the MV calculation,
// which keeps the minimum and feeds the best coarse displacement back to
// the candidate generator.
//
// Interface: the host writes the current frame through c_* and the previous
// frame through s_* (one pixel per cycle, any time the estimator is idle),
// then pulses start with trunc set (0 = SSAD, t = 1..4 = RBSSAD with t LSBs
// dropped; sampled at start). For each block, in raster order, mv_valid
// pulses with the block position (mv_x = block row, mv_y = block column), the
// motion vector (mv_u vertical, mv_v horizontal, signed) and its SSAD. The first
// mv_valid comes 5443 cycles after the edge that accepts start, the next
// ones every 5443 cycles; done pulses with the last.
//
// The candidate pattern, the 4-queen pixel pattern, the address generator
// structure, the single PE with its 14-bit accumulator, RBSSAD and the
// 5443-cycle budget follow the published architecture. This design's own
// choices are the frame-loading port, the pipeline split of the 3 overhead
// cycles, the candidate order and tie rule, and skipping candidates whose
// displaced block leaves the frame. PIX_BITS below 8 builds a narrower processing element that always
// compares only the PIX_BITS most significant bits of each pixel (a fixed
// RBSSAD); the default is the full 8-bit SSAD datapath.
module cbps_me
  import cbps_pkg::*;
#(
  parameter int unsigned ROWS = 288,
  parameter int unsigned COLS = 352,
  parameter int unsigned PIX_BITS = 8    // pixel bits compared by the PE
) (
  input  logic                clk,
  input  logic                rst_n,
  // frame loading
  input  logic                c_we,
  input  logic [CRD_W-1:0]    c_wr_row,
  input  logic [CRD_W-1:0]    c_wr_col,
  input  logic [7:0]          c_wr_data,
  input  logic                s_we,
  input  logic [CRD_W-1:0]    s_wr_row,
  input  logic [CRD_W-1:0]    s_wr_col,
  input  logic [7:0]          s_wr_data,
  // command
  input  logic                start,
  input  logic [TRUNC_W-1:0]  trunc,
  output logic                busy,
  output logic                done,
  // results
  output logic                mv_valid,
  output logic [BLK_W-1:0]    mv_x,
  output logic [BLK_W-1:0]    mv_y,
  output disp_t               mv_u,
  output disp_t               mv_v,
  output ssad_t               mv_ssad
);
  // Control section.
  logic blk_clear, blk_next, pix_clear, pix_step;
  logic start_coarse, start_fine, cand_step, issue;
  logic pix_first, pix_last, blk_last, cand_last;

  cbps_control u_ctrl (
    .clk, .rst_n, .start,
    .pix_last, .cand_last, .blk_last,
    .blk_clear, .blk_next, .pix_clear, .pix_step,
    .start_coarse, .start_fine, .cand_step, .issue,
    .busy, .done
  );

  // RBSSAD setting, held for the whole frame.
  logic [TRUNC_W-1:0] trunc_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               trunc_q <= '0;
    else if (start && !busy)  trunc_q <= trunc;
  end

  // Candidate generator.
  disp_t  u, v, ctr_u, ctr_v;
  phase_e phase;
  logic   in_range;

  cbps_uv_gen u_uv (
    .clk, .rst_n,
    .start_coarse, .start_fine, .step(cand_step),
    .ctr_u, .ctr_v,
    .u, .v, .phase, .in_range, .cand_last
  );

  // Address generator.
  logic [BLK_W-1:0]         blk_x, blk_y;
  logic [3:0]               pix_i, pix_j;
  logic [CRD_W-1:0]         cx, cy;
  logic signed [SCRD_W-1:0] sx, sy;
  logic                     cand_in_frame;

  cbps_addr_gen #(.ROWS(ROWS), .COLS(COLS)) u_addr (
    .clk, .rst_n,
    .blk_clear, .blk_next, .pix_clear, .pix_step,
    .u, .v,
    .blk_x, .blk_y, .pix_i, .pix_j,
    .cx, .cy, .sx, .sy,
    .pix_first, .pix_last, .blk_last, .cand_in_frame
  );

  logic cand_ok;
  assign cand_ok = in_range && cand_in_frame;

  // Previous-frame read address; a skipped candidate reads pixel (0,0).
  logic [CRD_W-1:0] s_rd_row, s_rd_col;
  assign s_rd_row = cand_ok ? sx[CRD_W-1:0] : '0;
  assign s_rd_col = cand_ok ? sy[CRD_W-1:0] : '0;

  // Frame stores.
  logic [7:0] c_pix, s_pix;

  cbps_frame_mem #(.ROWS(ROWS), .COLS(COLS)) u_cmem (
    .clk, .we(c_we), .wr_row(c_wr_row), .wr_col(c_wr_col), .wr_data(c_wr_data),
    .rd_row(cx), .rd_col(cy), .rd_data(c_pix)
  );

  cbps_frame_mem #(.ROWS(ROWS), .COLS(COLS)) u_smem (
    .clk, .we(s_we), .wr_row(s_wr_row), .wr_col(s_wr_col), .wr_data(s_wr_data),
    .rd_row(s_rd_row), .rd_col(s_rd_col), .rd_data(s_pix)
  );

  // Control word travelling alongside the memory read.
  pix_ctl_t ctl_d, ctl_q;
  always_comb begin
    ctl_d.valid    = issue;
    ctl_d.first    = pix_first;
    ctl_d.last     = pix_last;
    ctl_d.cand_ok  = cand_ok;
    ctl_d.blk_last = (phase == PH_FINE) && cand_last && pix_last;
    ctl_d.phase    = phase;
    ctl_d.u        = u;
    ctl_d.v        = v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctl_q <= '0;
    else        ctl_q <= ctl_d;
  end

  // Processing element.
  ssad_t sum;
  logic  sum_valid;

  cbps_pe #(.PIX_BITS(PIX_BITS)) u_pe (
    .clk, .rst_n,
    .in_valid(ctl_q.valid), .first(ctl_q.first), .last(ctl_q.last),
    .trunc(trunc_q), .cur_pix(c_pix), .prev_pix(s_pix),
    .sum, .sum_valid
  );

  // Motion vector calculation.
  cbps_mv_calc u_mv (
    .clk, .rst_n,
    .sum, .sum_valid,
    .cand_ok(ctl_q.cand_ok), .phase(ctl_q.phase), .u(ctl_q.u), .v(ctl_q.v),
    .blk_last(ctl_q.blk_last), .blk_x, .blk_y,
    .ctr_u, .ctr_v,
    .mv_valid, .mv_u, .mv_v, .mv_ssad, .mv_x, .mv_y
  );

  // A pixel read is issued only while a block is being searched.
  assert property (@(posedge clk) disable iff (!rst_n) issue |-> busy);
  // The end of a frame is signalled together with its last motion vector.
  assert property (@(posedge clk) disable iff (!rst_n) done |-> mv_valid);

endmodule
