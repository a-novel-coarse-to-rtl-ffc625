// tb_cbps_me: end-to-end test of the CBPS motion estimator at full CIF size.
//
// The testbench builds a smooth textured previous frame (bilinear
// interpolation of a random 8 x 8-pixel grid) and a current frame in which
// every 16 x 16 block is a copy of the previous frame displaced by its own
// motion (u, v) in -8..8, plus a little noise. It loads both frames through
// the write ports, starts the estimator and checks every block's motion
// vector and SSAD against a reference model of the CBPS search written here
// (77-point coarse pattern, 8 fine neighbours of the best coarse point,
// 4-queen pixel pattern, candidates leaving the frame or the +-8 window
// skipped, first minimum kept). It also checks the timing: the first motion
// vector 5443 cycles after start, then one every 5443 cycles, done with the
// last.
//
// The frame is run five times: with the plain SSAD (trunc = 0) and with
// RBSSAD7..RBSSAD4 (1 to 4 LSBs dropped). For each setting it prints how
// many blocks found their true motion and the mean squared error of the
// motion-compensated prediction, and for comparison the same for a full
// search over all 289 displacements; these figures are informative, not
// checks. It counts how often each mechanism occurred: coarse
// and fine phases, a fine candidate beating the coarse best, a fine
// neighbour outside the search window, a candidate leaving the frame,
// truncation changing an SSAD, frame completion; one that never occurs
// counts as a failure.
module tb_cbps_me;
  import cbps_pkg::*;

  localparam int ROWS = 288;
  localparam int COLS = 352;
  localparam int BR = ROWS / 16;
  localparam int BC = COLS / 16;
  localparam int NBLK = BR * BC;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               c_we, s_we;
  logic [CRD_W-1:0]   c_wr_row, c_wr_col, s_wr_row, s_wr_col;
  logic [7:0]         c_wr_data, s_wr_data;
  logic               start;
  logic [TRUNC_W-1:0] trunc;
  logic               busy, done, mv_valid;
  logic [BLK_W-1:0]   mv_x, mv_y;
  disp_t              mv_u, mv_v;
  ssad_t              mv_ssad;

  cbps_me dut (.*);

  int checks = 0;
  int failures = 0;

  // Frames, kept in the testbench for the reference model.
  byte unsigned sfr [ROWS][COLS];
  byte unsigned cfr [ROWS][COLS];
  int           mot_u [NBLK];
  int           mot_v [NBLK];

  // Reference results.
  int ref_u [NBLK];
  int ref_v [NBLK];
  int ref_s [NBLK];

  // Mechanism counters.
  int n_fine_win = 0, n_coarse_win = 0, n_fine_outside = 0, n_out_of_frame = 0;
  int n_trunc_diff = 0, n_frames = 0, n_blocks = 0;

  function automatic int qcol0(int k);
    case (k)
      0: return 1;
      1: return 3;
      2: return 0;
      default: return 2;
    endcase
  endfunction

  // Loop bound held in a variable so that the reference loops stay loops.
  int npix = 64;

  function automatic int ssad_ref(int bx, int by, int u, int v, int t);
    int s = 0;
    for (int k = 0; k < npix; k++) begin
      int i = k / 4;
      int j = qcol0(i % 4) + 4 * (k % 4);
      int a = int'(cfr[bx*16+i][by*16+j]) >>> t;
      int b = int'(sfr[bx*16+i+u][by*16+j+v]) >>> t;
      s += (a > b) ? a - b : b - a;
    end
    return s;
  endfunction

  function automatic bit cand_valid(int bx, int by, int u, int v);
    return (u >= -8 && u <= 8 && v >= -8 && v <= 8 &&
            bx*16+u >= 0 && bx*16+u <= ROWS-16 &&
            by*16+v >= 0 && by*16+v <= COLS-16);
  endfunction

  // CBPS search for one block; also counts the mechanisms it exercises.
  // Candidates 0..76 are the coarse points row by row, 77..84 the fine
  // neighbours of the best coarse point.
  task automatic ref_block(int b, int t);
    int bx = b / BC, by = b % BC;
    int best = -1, bu = 0, bv = 0, cu = 0, cv = 0;
    int cand_u [85];
    int cand_v [85];
    int nc = 0;
    for (int u = -8; u <= 8; u += 2)
      for (int v = ((((u + 8) % 4) == 0) ? -8 : -7); v <= 8; v += 2) begin
        cand_u[nc] = u; cand_v[nc] = v; nc++;
      end
    if (nc != 77) $display("reference model error: %0d coarse points", nc);
    for (int k = 0; k < 85; k++) begin
      int u, v;
      if (k == 77) begin cu = bu; cv = bv; end
      if (k < 77) begin
        u = cand_u[k]; v = cand_v[k];
      end else begin
        int f = k - 77;
        int f9 = (f < 4) ? f : f + 1;     // skip the centre
        u = cu + f9 / 3 - 1;
        v = cv + f9 % 3 - 1;
      end
      if (!cand_valid(bx, by, u, v)) begin
        if (u < -8 || u > 8 || v < -8 || v > 8) n_fine_outside++;
        else n_out_of_frame++;
        continue;
      end
      begin
        int s = ssad_ref(bx, by, u, v, t);
        if (best < 0 || s < best) begin best = s; bu = u; bv = v; end
      end
    end
    if (bu != cu || bv != cv) n_fine_win++; else n_coarse_win++;
    ref_u[b] = bu;
    ref_v[b] = bv;
    ref_s[b] = best;
  endtask

  // Smooth texture: bilinear interpolation of random values on an 8-pixel grid.
  task automatic make_frames();
    byte unsigned g [ROWS/8+1][COLS/8+1];
    for (int r = 0; r <= ROWS/8; r++)
      for (int c = 0; c <= COLS/8; c++) g[r][c] = 8'($urandom_range(20, 235));
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int r0 = r / 8, c0 = c / 8, fr = r % 8, fc = c % 8;
        int val = (int'(g[r0][c0]) * (8-fr) * (8-fc) + int'(g[r0+1][c0]) * fr * (8-fc) +
                   int'(g[r0][c0+1]) * (8-fr) * fc + int'(g[r0+1][c0+1]) * fr * fc) / 64;
        sfr[r][c] = 8'(val);
      end
    for (int b = 0; b < NBLK; b++) begin
      mot_u[b] = $urandom_range(0, 16) - 8;
      mot_v[b] = $urandom_range(0, 16) - 8;
    end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int b = (r / 16) * BC + (c / 16);
        int sr = r - mot_u[b], sc = c - mot_v[b];
        int val;
        // current pixel (r,c) came from previous pixel (r + u, c + v)
        sr = r + mot_u[b];
        sc = c + mot_v[b];
        if (sr < 0) sr = 0;
        if (sr >= ROWS) sr = ROWS - 1;
        if (sc < 0) sc = 0;
        if (sc >= COLS) sc = COLS - 1;
        val = int'(sfr[sr][sc]) + int'($urandom_range(0, 4)) - 2;
        if (val < 0) val = 0;
        if (val > 255) val = 255;
        cfr[r][c] = 8'(val);
      end
  endtask

  task automatic load_frames();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        c_we <= 1'b1; c_wr_row <= CRD_W'(r); c_wr_col <= CRD_W'(c); c_wr_data <= cfr[r][c];
        s_we <= 1'b1; s_wr_row <= CRD_W'(r); s_wr_col <= CRD_W'(c); s_wr_data <= sfr[r][c];
        @(posedge clk);
      end
    c_we <= 1'b0;
    s_we <= 1'b0;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Runs one frame with the given truncation and checks every block.
  task automatic run_frame(int t);
    longint t_start, t_prev, t_now;
    int got = 0;
    for (int b = 0; b < NBLK; b++) ref_block(b, t);
    @(posedge clk);
    start <= 1'b1; trunc <= TRUNC_W'(t);
    @(posedge clk);                 // this edge accepts start
    t_start = cycle;
    start <= 1'b0;
    // Values are sampled one edge after the edge that registered them.
    t_prev = t_start + 1;
    while (got < NBLK) begin
      @(posedge clk);
      if (mv_valid) begin
        int b = got;
        t_now = cycle;
        check(t_now - t_prev == longint'(CYCLES_PER_BLOCK),
              $sformatf("block %0d came %0d cycles after the previous one", b, t_now - t_prev));
        t_prev = t_now;
        check(int'(mv_x) == b / BC && int'(mv_y) == b % BC,
              $sformatf("block order: got (%0d,%0d) expected block %0d", mv_x, mv_y, b));
        check(int'(mv_u) == ref_u[b] && int'(mv_v) == ref_v[b] && int'(mv_ssad) == ref_s[b],
              $sformatf("t=%0d block %0d: mv (%0d,%0d) ssad %0d, expected (%0d,%0d) ssad %0d",
                        t, b, mv_u, mv_v, mv_ssad, ref_u[b], ref_v[b], ref_s[b]));
        check(done == (b == NBLK - 1), $sformatf("done at block %0d", b));
        n_blocks++;
        got++;
      end
    end
    check(t_prev - t_start - 1 == longint'(NBLK) * CYCLES_PER_BLOCK, "frame cycle count");
    @(posedge clk);
    check(!busy, "busy after the frame");
    n_frames++;
  endtask

  // Mean squared error of the motion-compensated prediction of the whole
  // current frame, using the last frame's reference motion vectors.
  function automatic real pred_mse();
    real acc = 0.0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int b = (r / 16) * BC + (c / 16);
        int d = int'(cfr[r][c]) - int'(sfr[r + ref_u[b]][c + ref_v[b]]);
        acc += real'(d * d);
      end
    return acc / real'(ROWS * COLS);
  endfunction

  // Full search over all 289 displacements on all 256 pixels, for the
  // informative comparison only; returns the prediction MSE it achieves.
  function automatic real full_search_mse();
    real acc;
    int bx, by, best, bu, bv, sad, d, r, c;
    acc = 0.0;
    for (int b = 0; b < NBLK; b++) begin
      bx = b / BC;
      by = b % BC;
      best = -1;
      bu = 0;
      bv = 0;
      for (int u = -8; u <= 8; u++)
        for (int v = -8; v <= 8; v++)
          if (cand_valid(bx, by, u, v)) begin
            sad = 0;
            for (int k = 0; k < npix * 4; k++) begin
              r = bx * 16 + k / 16;
              c = by * 16 + k % 16;
              d = int'(cfr[r][c]) - int'(sfr[r + u][c + v]);
              sad += (d < 0) ? -d : d;
            end
            if (best < 0 || sad < best) begin best = sad; bu = u; bv = v; end
          end
      for (int k = 0; k < npix * 4; k++) begin
        r = bx * 16 + k / 16;
        c = by * 16 + k % 16;
        d = int'(cfr[r][c]) - int'(sfr[r + bu][c + bv]);
        acc += real'(d * d);
      end
    end
    return acc / real'(ROWS * COLS);
  endfunction

  function automatic real psnr(real mse);
    return 10.0 * $log10(255.0 * 255.0 / mse);
  endfunction

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Watchdog.
  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ssad0 [NBLK];
    c_we = 0; s_we = 0; start = 0; trunc = '0;
    c_wr_row = '0; c_wr_col = '0; c_wr_data = '0;
    s_wr_row = '0; s_wr_col = '0; s_wr_data = '0;
    make_frames();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    load_frames();

    // SSAD, then RBSSAD7, RBSSAD6, RBSSAD5 and RBSSAD4 (1 to 4 LSBs dropped).
    for (int t = 0; t <= 4; t++) begin
      int hit;
      real mse;
      run_frame(t);
      hit = 0;
      for (int b = 0; b < NBLK; b++) begin
        if (t == 0) ssad0[b] = ref_s[b];
        else if (ref_s[b] != ssad0[b]) n_trunc_diff++;
        if (ref_u[b] == mot_u[b] && ref_v[b] == mot_v[b]) hit++;
      end
      mse = pred_mse();
      // Informative figures, not checks.
      $display("trunc=%0d: %0d of %0d blocks found their true motion, prediction MSE %0.3f, PSNR %0.2f dB",
               t, hit, NBLK, mse, psnr(mse));
      if (t == 0) begin
        real fs_mse;
        fs_mse = full_search_mse();
        $display("full search for comparison: prediction MSE %0.3f, PSNR %0.2f dB", fs_mse, psnr(fs_mse));
      end
    end

    $display("mechanisms: frames=%0d blocks=%0d coarse_win=%0d fine_win=%0d fine_outside_window=%0d out_of_frame=%0d rbssad_differs=%0d",
             n_frames, n_blocks, n_coarse_win, n_fine_win, n_fine_outside, n_out_of_frame, n_trunc_diff);
    check(n_frames == 5, "five frames completed");
    check(n_coarse_win > 0, "a coarse point was the final motion vector");
    check(n_fine_win > 0, "a fine candidate beat the coarse best");
    check(n_fine_outside > 0, "a fine neighbour fell outside the window");
    check(n_out_of_frame > 0, "a candidate left the frame");
    check(n_trunc_diff > 0, "RBSSAD changed an SSAD");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
