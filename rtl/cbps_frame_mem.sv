// cbps_frame_mem: one luminance frame store, used both as S-Mem (the
// previous, searched frame) and as C-Mem (the current frame).
//
// The estimator addresses pixels by their (row, column) frame coordinates,
// exactly as the address generator produces them; the store turns a
// coordinate pair into a linear address row * COLS + col. It holds one 8-bit
// pixel per location, ROWS x COLS of them (CIF, 288 x 352, by default).
//
// Interface and timing:
//   - write port (we, wr_row, wr_col, wr_data): the host loads a frame, one
//     pixel per cycle, written at the rising clock edge.
//   - read port (rd_row, rd_col -> rd_data): synchronous, the pixel appears
//     one cycle after its address. The estimator issues one read per cycle.
// A write and a read of the same location in one cycle return the old pixel.
// The frame-coordinate addressing is the design's own reading of the block
// diagram; how a frame is loaded is not specified and the plain write port is
// this design's choice.
module cbps_frame_mem #(
  parameter int unsigned ROWS = 288,
  parameter int unsigned COLS = 352
) (
  input  logic                          clk,
  input  logic                          we,
  input  logic [cbps_pkg::CRD_W-1:0]    wr_row,
  input  logic [cbps_pkg::CRD_W-1:0]    wr_col,
  input  logic [7:0]                    wr_data,
  input  logic [cbps_pkg::CRD_W-1:0]    rd_row,
  input  logic [cbps_pkg::CRD_W-1:0]    rd_col,
  output logic [7:0]                    rd_data
);
  localparam int unsigned DEPTH = ROWS * COLS;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [7:0] mem [DEPTH];

  logic [AW-1:0] wa, ra;
  assign wa = AW'(wr_row * COLS + wr_col);
  assign ra = AW'(rd_row * COLS + rd_col);

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wr_data;
    rd_data <= mem[ra];
  end

endmodule
