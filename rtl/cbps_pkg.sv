// cbps_pkg: constants and types shared by the CBPS (Candidate Block and
// Pixel Sub-sampling) motion estimator.
//
// The block size N = 16 and search range p = 8 are the configuration the
// architecture is built around; the coarse candidate pattern and the 4-queen
// pixel pattern below are only defined for these values, so they are fixed
// constants here rather than module parameters. The frame size (CIF,
// 288 x 352) is a parameter of the modules that hold frames.
//
// Widths follow the address generator: 5-bit block counters, 4-bit pixel
// counters, 9-bit current-frame coordinates, 10-bit signed previous-frame
// coordinates, 5-bit signed displacements and a 14-bit SSAD accumulator.
package cbps_pkg;

  localparam int unsigned N         = 16;  // block size (pixels)
  localparam int unsigned P         = 8;   // search range, u,v in [-P, P]
  localparam int unsigned PIX_PER_BLK = 64; // 4-queen sub-sampled pixels per block
  localparam int unsigned N_COARSE  = 5 * (2 * P + 1) - 8;  // 77 coarse candidates
  localparam int unsigned N_FINE    = 8;                    // 8 neighbours in fine search
  localparam int unsigned N_CAND    = N_COARSE + N_FINE;    // 85 candidates per block

  localparam int unsigned SSAD_W    = 14;  // 64 * 255 = 16320 < 2**14
  localparam int unsigned DISP_W    = 5;   // signed displacement
  localparam int unsigned CRD_W     = 9;   // current-frame coordinate (0..351)
  localparam int unsigned SCRD_W    = 10;  // previous-frame coordinate, signed
  localparam int unsigned BLK_W     = 5;   // block row/column counter
  localparam int unsigned TRUNC_W   = 3;   // number of LSBs dropped for RBSSAD

  // Cycles from the accepted start of a block to its motion vector:
  // 85 candidates x 64 pixels, plus one load cycle, one cycle between the
  // coarse and the fine phase and one drain cycle.
  localparam int unsigned CYCLES_PER_BLOCK = N_CAND * PIX_PER_BLK + 3;  // 5443

  typedef logic signed [DISP_W-1:0] disp_t;
  typedef logic        [SSAD_W-1:0] ssad_t;

  // First column of the 4-queen pattern in row i (k = i mod 4); the other
  // three selected columns follow at +4, +8 and +12.
  function automatic logic [1:0] queen_col0(input logic [1:0] k);
    case (k)
      2'd0:    return 2'd1;
      2'd1:    return 2'd3;
      2'd2:    return 2'd0;
      default: return 2'd2;
    endcase
  endfunction

  // Search phase of a candidate.
  typedef enum logic [0:0] {PH_COARSE = 1'b0, PH_FINE = 1'b1} phase_e;

  // Control information that travels down the pipeline with each pixel.
  typedef struct packed {
    logic   valid;      // a pixel read was issued
    logic   first;      // first pixel of a candidate
    logic   last;       // last pixel of a candidate
    logic   cand_ok;    // candidate is inside the search range and frame
    logic   blk_last;   // last pixel of the last candidate of the block
    phase_e phase;      // coarse or fine candidate
    disp_t  u;
    disp_t  v;
  } pix_ctl_t;

endpackage
