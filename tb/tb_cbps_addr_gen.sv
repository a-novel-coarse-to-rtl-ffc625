// tb_cbps_addr_gen: self-checking test of the address generator (CIF size).
//
// Walks all 396 blocks with blk_next, checking the block counters, blk_last
// and the wrap back to block (0,0). In a sample of blocks it steps through
// the 64 pixels with random displacements and checks the 4-queen pixel
// positions (expected columns worked out here from the rule j = j0 + 4m),
// Cx/Cy/Sx/Sy, pix_first/pix_last, the 64-pixel wrap and the in-frame flag.
module tb_cbps_addr_gen;
  import cbps_pkg::*;

  localparam int ROWS = 288;
  localparam int COLS = 352;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     blk_clear, blk_next, pix_clear, pix_step;
  disp_t                    u, v;
  logic [BLK_W-1:0]         blk_x, blk_y;
  logic [3:0]               pix_i, pix_j;
  logic [CRD_W-1:0]         cx, cy;
  logic signed [SCRD_W-1:0] sx, sy;
  logic                     pix_first, pix_last, blk_last, cand_in_frame;

  cbps_addr_gen #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Expected 4-queen column of pixel m in row i.
  function automatic int qcol(int i, int m);
    int j0 [4] = '{1, 3, 0, 2};
    return j0[i % 4] + 4 * m;
  endfunction

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_clear = 0; blk_next = 0; pix_clear = 0; pix_step = 0; u = '0; v = '0;
    @(negedge clk);
    rst_n = 1;
    blk_clear = 1;
    @(negedge clk);
    blk_clear = 0;
    for (int b = 0; b < 18 * 22; b++) begin
      int bx, by;
      bx = b / 22;
      by = b % 22;
      #1;
      check(int'(blk_x) == bx && int'(blk_y) == by,
            $sformatf("block %0d: counters (%0d,%0d)", b, blk_x, blk_y));
      check(blk_last == (b == 18 * 22 - 1), "blk_last");
      // detailed pixel walk in corner, edge and random blocks
      if (b < 2 || b == 21 || b == 22 || b == 395 || $urandom_range(0, 15) == 0) begin
        bit [15:0] colseen [16];
        colseen = '{default: '0};
        pix_clear = 1;
        @(negedge clk);
        pix_clear = 0;
        for (int k = 0; k < 64 + 2; k++) begin
          int i, m, j, uu, vv, ox, oy;
          bit inf;
          i = (k % 64) / 4;
          m = k % 4;
          j = qcol(i, m);
          uu = $urandom_range(0, 18) - 9;
          vv = $urandom_range(0, 18) - 9;
          u = disp_t'(uu);
          v = disp_t'(vv);
          #1;
          ox = bx * 16 + uu;
          oy = by * 16 + vv;
          inf = (ox >= 0 && ox <= ROWS - 16 && oy >= 0 && oy <= COLS - 16);
          check(int'(pix_i) == i && int'(pix_j) == j,
                $sformatf("pixel %0d: (i,j)=(%0d,%0d) expected (%0d,%0d)", k, pix_i, pix_j, i, j));
          check(int'(cx) == bx * 16 + i && int'(cy) == by * 16 + j, "Cx/Cy");
          check(int'(sx) == bx * 16 + i + uu && int'(sy) == by * 16 + j + vv,
                $sformatf("Sx/Sy (%0d,%0d) for u,v=%0d,%0d", sx, sy, uu, vv));
          check(pix_first == (k % 64 == 0) && pix_last == (k % 64 == 63), "first/last");
          check(cand_in_frame == inf, $sformatf("in-frame flag for origin (%0d,%0d)", ox, oy));
          if (k < 64) colseen[i][j] = 1'b1;
          pix_step = 1;
          @(negedge clk);
          pix_step = 0;
        end
        // every row has 4 pixels, and in each group of 4 rows every column is used once
        for (int g = 0; g < 4; g++) begin
          bit [15:0] acc;
          acc = '0;
          for (int r = 4 * g; r < 4 * g + 4; r++) begin
            check($countones(colseen[r]) == 4, "4 pixels per row");
            check((acc & colseen[r]) == 0, "one pixel per column in a group of rows");
            acc |= colseen[r];
          end
          check(acc == 16'hffff, "all columns covered");
        end
      end
      blk_next = 1;
      @(negedge clk);
      blk_next = 0;
    end
    #1 check(blk_x == 0 && blk_y == 0, "wrap to block (0,0) after the frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
