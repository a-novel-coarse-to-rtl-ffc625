// cbps_pe: the single processing element of the CBPS motion estimator.
//
// For each pixel pair it subtracts the previous-frame pixel from the
// current-frame pixel (8-bit subtractor), takes the absolute value and adds
// it into a 14-bit accumulator. Over the 64 sub-sampled pixels of one
// candidate block this gives the sub-sampled sum of absolute differences
// (SSAD); 64 x 255 = 16320 fits in 14 bits, so the sum never overflows.
//
// RBSSAD (reduced-bit SSAD): with trunc = t > 0 both pixels lose their t
// least significant bits before the subtraction, so the pixels are compared
// as (8 - t)-bit numbers (t = 1..4 gives the criteria RBSSAD7..RBSSAD4).
// trunc = 0 gives the plain SSAD. trunc must stay constant during a block.
//
// The parameter PIX_BITS (default 8) builds the narrower hardware that
// RBSSAD allows: only the PIX_BITS most significant bits of each pixel enter
// a PIX_BITS-bit subtractor and absolute value, e.g. PIX_BITS = 5 for a
// fixed RBSSAD5 with 62.5 % of the comparison width. trunc then drops
// further bits at run time. The accumulator stays 14 bits wide.
//
// Interface and timing: in_valid qualifies a pixel pair; first marks the
// first pixel of a candidate (the accumulator restarts from it) and last the
// final one. The adder output sum = (first ? 0 : acc) + |c - s| is
// combinational, so the complete SSAD of a candidate is on sum, with
// sum_valid high, in the same cycle as its last pixel; the accumulator
// register takes it at the following edge.
module cbps_pe
  import cbps_pkg::*;
#(
  parameter int unsigned PIX_BITS = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                first,
  input  logic                last,
  input  logic [TRUNC_W-1:0]  trunc,
  input  logic [7:0]          cur_pix,
  input  logic [7:0]          prev_pix,
  output ssad_t               sum,
  output logic                sum_valid
);
  if (PIX_BITS < 1 || PIX_BITS > 8) begin : g_bad_width
    $error("cbps_pe: PIX_BITS must be 1..8");
  end

  localparam int unsigned K = PIX_BITS;

  ssad_t acc_q;

  // Reduced-bit representation of the two pixels: the K most significant
  // bits, less trunc more at run time.
  logic [K-1:0] c_r, s_r;
  assign c_r = cur_pix[7 -: K]  >> trunc;
  assign s_r = prev_pix[7 -: K] >> trunc;

  // K-bit subtractor with borrow, then absolute value.
  logic [K:0]   diff;
  logic [K-1:0] absd;
  assign diff = {1'b0, c_r} - {1'b0, s_r};
  assign absd = diff[K] ? K'(-diff) : diff[K-1:0];

  // 14-bit adder.
  assign sum       = (first ? '0 : acc_q) + SSAD_W'(absd);
  assign sum_valid = in_valid && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        acc_q <= '0;
    else if (in_valid) acc_q <= sum;
  end

endmodule
