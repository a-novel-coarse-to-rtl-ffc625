// cbps_uv_gen: candidate displacement generator of the CBPS motion estimator.
//
// Coarse phase: 77 displacements (u, v) out of the 17 x 17 positions of the
// +-8 search window. Rows u = -8, -6, ..., 8 are used; rows with u a multiple
// of 4 take v = -8, -6, ..., 8 (9 points), the other rows take
// v = -7, -5, ..., 7 (8 points): 5 x 9 + 4 x 8 = 77. This is the candidate
// pattern of the published figure. Candidates are issued row by row, v
// increasing.
//
// Fine phase: the 8 positions around the best coarse candidate (ctr_u,
// ctr_v), in the order (-1,-1) (-1,0) (-1,1) (0,-1) (0,1) (1,-1) (1,0) (1,1).
// None of them is a coarse point. A neighbour outside the +-8 window is still
// issued (the cycle count stays fixed) but flagged by in_range = 0 so that it
// is not compared; this edge rule is this design's choice.
//
// Interface and timing: u, v, phase, in_range and cand_last are registered
// state or functions of it. start_coarse restarts the coarse sequence,
// start_fine starts the fine one (ctr_u/ctr_v must then be stable until the
// end of the fine phase), step moves to the next candidate at the clock edge.
// cand_last marks the last candidate of the current phase.
module cbps_uv_gen
  import cbps_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start_coarse,
  input  logic    start_fine,
  input  logic    step,
  input  disp_t   ctr_u,
  input  disp_t   ctr_v,
  output disp_t   u,
  output disp_t   v,
  output phase_e  phase,
  output logic    in_range,
  output logic    cand_last
);
  localparam disp_t PMAX = disp_t'(P);
  localparam disp_t PMIN = -disp_t'(P);

  phase_e     ph_q;
  disp_t      cu_q, cv_q;    // coarse position
  logic [2:0] f_q;           // fine neighbour index

  // v at the start of a coarse row: even columns on rows u = 0 mod 4.
  function automatic disp_t row_v0(input disp_t uu);
    return (uu[1:0] == 2'b00) ? PMIN : PMIN + 1;
  endfunction

  logic coarse_row_end;
  assign coarse_row_end = (cv_q == PMAX) || (cv_q == PMAX - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q <= PH_COARSE;
      cu_q <= PMIN;
      cv_q <= PMIN;
      f_q  <= '0;
    end else if (start_coarse) begin
      ph_q <= PH_COARSE;
      cu_q <= PMIN;
      cv_q <= PMIN;
      f_q  <= '0;
    end else if (start_fine) begin
      ph_q <= PH_FINE;
      f_q  <= '0;
    end else if (step) begin
      if (ph_q == PH_COARSE) begin
        if (coarse_row_end) begin
          cu_q <= cu_q + 2;
          cv_q <= row_v0(cu_q + 2);
        end else begin
          cv_q <= cv_q + 2;
        end
      end else begin
        f_q <= f_q + 1'b1;
      end
    end
  end

  // Fine neighbour offsets, skipping the centre.
  disp_t du, dv;
  always_comb begin
    case (f_q)
      3'd0: begin du = -1; dv = -1; end
      3'd1: begin du = -1; dv =  0; end
      3'd2: begin du = -1; dv =  1; end
      3'd3: begin du =  0; dv = -1; end
      3'd4: begin du =  0; dv =  1; end
      3'd5: begin du =  1; dv = -1; end
      3'd6: begin du =  1; dv =  0; end
      default: begin du = 1; dv = 1; end
    endcase
  end

  always_comb begin
    if (ph_q == PH_COARSE) begin
      u = cu_q;
      v = cv_q;
    end else begin
      u = ctr_u + du;
      v = ctr_v + dv;
    end
  end

  assign phase     = ph_q;
  assign in_range  = (u >= PMIN) && (u <= PMAX) && (v >= PMIN) && (v <= PMAX);
  assign cand_last = (ph_q == PH_COARSE) ? (cu_q == PMAX && cv_q == PMAX)
                                         : (f_q == 3'd7);

endmodule
