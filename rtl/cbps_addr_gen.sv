// cbps_addr_gen: address generator of the CBPS motion estimator.
//
// It walks the current frame block by block and, inside a block, over the 64
// pixels of the 4-queen sub-sampling pattern, and forms for every pixel
//   current frame:   Cx = N*x + i,      Cy = N*y + j
//   previous frame:  Sx = N*x + i + u,  Sy = N*y + j + v
// where (x, y) is the block, (i, j) the pixel inside it and (u, v) the
// candidate displacement supplied by the candidate generator.
//
// Structure, as in the published block diagram: 5-bit block counters x
// (rows, 0..17 for CIF) and y (columns, 0..21), 4-bit pixel counters, the
// block counter shifted left by 4 (times N = 16) and added to the pixel
// counter in a 9-bit adder, and a 10-bit signed adder that adds the 5-bit
// displacement. In row i four pixels are taken, at columns
// j = j0(i mod 4) + 4m, m = 0..3, with j0 = 1, 3, 0, 2 (the 4-queen pattern).
// The column counter therefore counts m and j is formed from it.
//
// cand_in_frame tells whether the whole displaced block lies inside the
// frame; the estimator ignores candidates that do not (this edge rule is the
// design's own choice).
//
// Interface and timing: all outputs are combinational functions of the
// counters and of u, v. Counters change at the rising edge when asked:
// blk_clear (block 0,0), blk_next (next block in raster order, y fastest),
// pix_clear (pixel 0) and pix_step (next pixel, wrapping after 64).
// The active-low asynchronous reset rst_n clears all counters.
module cbps_addr_gen
  import cbps_pkg::*;
#(
  parameter int unsigned ROWS = 288,
  parameter int unsigned COLS = 352
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      blk_clear,
  input  logic                      blk_next,
  input  logic                      pix_clear,
  input  logic                      pix_step,
  input  disp_t                     u,
  input  disp_t                     v,
  output logic [BLK_W-1:0]          blk_x,
  output logic [BLK_W-1:0]          blk_y,
  output logic [3:0]                pix_i,
  output logic [3:0]                pix_j,
  output logic [CRD_W-1:0]          cx,
  output logic [CRD_W-1:0]          cy,
  output logic signed [SCRD_W-1:0]  sx,
  output logic signed [SCRD_W-1:0]  sy,
  output logic                      pix_first,
  output logic                      pix_last,
  output logic                      blk_last,
  output logic                      cand_in_frame
);
  localparam int unsigned BLK_ROWS = ROWS / N;   // 18 for CIF
  localparam int unsigned BLK_COLS = COLS / N;   // 22 for CIF

  logic [BLK_W-1:0] x_q, y_q;
  logic [3:0]       i_q;
  logic [1:0]       m_q;     // which of the four pixels of row i

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      y_q <= '0;
    end else if (blk_clear) begin
      x_q <= '0;
      y_q <= '0;
    end else if (blk_next) begin
      if (y_q == BLK_W'(BLK_COLS - 1)) begin
        y_q <= '0;
        x_q <= (x_q == BLK_W'(BLK_ROWS - 1)) ? '0 : x_q + 1'b1;
      end else begin
        y_q <= y_q + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_q <= '0;
      m_q <= '0;
    end else if (pix_clear) begin
      i_q <= '0;
      m_q <= '0;
    end else if (pix_step) begin
      m_q <= m_q + 1'b1;
      if (m_q == 2'd3) i_q <= i_q + 1'b1;
    end
  end

  // 4-queen column of this pixel.
  logic [3:0] j_w;
  assign j_w = {m_q, queen_col0(i_q[1:0])};

  // 9-bit adders: block origin (counter shifted by 4) plus pixel offset.
  logic [CRD_W-1:0] bx, by;
  assign bx = {x_q, 4'b0000};
  assign by = {y_q, 4'b0000};
  assign cx = bx + CRD_W'(i_q);
  assign cy = by + CRD_W'(j_w);

  // 10-bit signed adders for the previous-frame coordinates.
  assign sx = $signed({1'b0, cx}) + SCRD_W'(u);
  assign sy = $signed({1'b0, cy}) + SCRD_W'(v);

  // Origin of the displaced block and its bounds check.
  logic signed [SCRD_W-1:0] ox, oy;
  assign ox = $signed({1'b0, bx}) + SCRD_W'(u);
  assign oy = $signed({1'b0, by}) + SCRD_W'(v);
  localparam logic signed [SCRD_W-1:0] OX_MAX = SCRD_W'(ROWS - N);
  localparam logic signed [SCRD_W-1:0] OY_MAX = SCRD_W'(COLS - N);
  assign cand_in_frame = !ox[SCRD_W-1] && (ox <= OX_MAX) &&
                         !oy[SCRD_W-1] && (oy <= OY_MAX);

  assign blk_x     = x_q;
  assign blk_y     = y_q;
  assign pix_i     = i_q;
  assign pix_j     = j_w;
  assign pix_first = (i_q == 4'd0)  && (m_q == 2'd0);
  assign pix_last  = (i_q == 4'd15) && (m_q == 2'd3);
  assign blk_last  = (x_q == BLK_W'(BLK_ROWS - 1)) && (y_q == BLK_W'(BLK_COLS - 1));

endmodule
