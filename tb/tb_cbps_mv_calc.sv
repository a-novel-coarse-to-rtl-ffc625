// tb_cbps_mv_calc: self-checking test of the motion vector calculation.
//
// For 40 blocks it presents 77 coarse and 8 fine candidate SSADs (drawn from
// a narrow range so that equal values are common, some candidates flagged
// as not usable), with idle cycles in between. It checks after the coarse
// phase that the fine-search centre is the first coarse minimum, and at the
// end of the block that mv_valid pulses once with the first overall minimum,
// its SSAD and the block position. One block has no usable candidate.
module tb_cbps_mv_calc;
  import cbps_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  ssad_t            sum, mv_ssad;
  logic             sum_valid, cand_ok, blk_last, mv_valid;
  phase_e           phase;
  disp_t            u, v, ctr_u, ctr_v, mv_u, mv_v;
  logic [BLK_W-1:0] blk_x, blk_y, mv_x, mv_y;

  cbps_mv_calc dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_mv = 0;
  always @(negedge clk) if (mv_valid) n_mv++;

  initial begin
    sum = '0; sum_valid = 0; cand_ok = 0; blk_last = 0; phase = PH_COARSE;
    u = '0; v = '0; blk_x = '0; blk_y = '0;
    @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      int best, bu, bv, cbest, cbu, cbv;
      best = -1; bu = 0; bv = 0; cbest = -1; cbu = 0; cbv = 0;
      blk_x = BLK_W'(b / 7);
      blk_y = BLK_W'(b % 7);
      for (int k = 0; k < 85; k++) begin
        int s, uu, vv;
        bit ok;
        s  = (b == 0) ? 16000 + k : $urandom_range(100, 140);
        uu = $urandom_range(0, 16) - 8;
        vv = $urandom_range(0, 16) - 8;
        ok = (b != 5) && ($urandom_range(0, 9) != 0);
        if (k == 77) begin
          check(int'(ctr_u) == cbu && int'(ctr_v) == cbv,
                $sformatf("block %0d: centre (%0d,%0d) expected (%0d,%0d)", b, ctr_u, ctr_v, cbu, cbv));
        end
        if (ok && (best < 0 || s < best)) begin best = s; bu = uu; bv = vv; end
        if (ok && k < 77 && (cbest < 0 || s < cbest)) begin cbest = s; cbu = uu; cbv = vv; end
        sum = ssad_t'(s); u = disp_t'(uu); v = disp_t'(vv); cand_ok = ok;
        phase = (k < 77) ? PH_COARSE : PH_FINE;
        sum_valid = 1;
        blk_last = (k == 84);
        @(negedge clk);
        sum_valid = 0;
        blk_last = 0;
        check(mv_valid == (k == 84), "mv_valid only after the last candidate");
        if (k == 84) begin
          if (best < 0) begin
            check(mv_u == 0 && mv_v == 0 && mv_ssad == '1, "no usable candidate");
          end else begin
            check(int'(mv_u) == bu && int'(mv_v) == bv && int'(mv_ssad) == best,
                  $sformatf("block %0d: mv (%0d,%0d) ssad %0d expected (%0d,%0d) %0d",
                            b, mv_u, mv_v, mv_ssad, bu, bv, best));
          end
          check(mv_x == blk_x && mv_y == blk_y, "block tag");
        end
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    check(n_mv == 40, "one motion vector per block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
