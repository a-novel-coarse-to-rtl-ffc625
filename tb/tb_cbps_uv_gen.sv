// tb_cbps_uv_gen: self-checking test of the candidate generator.
//
// Runs the coarse sequence and checks it against the pattern worked out
// here (rows u = -8, -6, .., 8; even v on rows with u a multiple of 4, odd v
// otherwise): 77 distinct points, in order, cand_last on the 77th only. Then
// runs the fine sequence around several centres, including the window
// corners, and checks the 8 neighbours, their order and the in_range flag.
// The generator is stepped with idle cycles in between, as when it waits
// for 64 pixels per candidate.
module tb_cbps_uv_gen;
  import cbps_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   start_coarse, start_fine, step;
  disp_t  ctr_u, ctr_v, u, v;
  phase_e phase;
  logic   in_range, cand_last;

  cbps_uv_gen dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic advance();
    step = 1;
    @(negedge clk);
    step = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eu [77];
    int ev [77];
    int n;
    int centres_u [6] = '{0, 8, -8, 8, 3, -7};
    int centres_v [6] = '{0, 8, -8, -8, -5, 7};
    start_coarse = 0; start_fine = 0; step = 0; ctr_u = '0; ctr_v = '0;
    n = 0;
    for (int uu = -8; uu <= 8; uu++)
      for (int vv = -8; vv <= 8; vv++)
        if ((uu % 2 == 0) && (((uu % 4 == 0) && (vv % 2 == 0)) || ((uu % 4 != 0) && (vv % 2 != 0)))) begin
          eu[n] = uu; ev[n] = vv; n++;
        end
    check(n == 77, "reference pattern has 77 points");
    @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      start_coarse = 1;
      @(negedge clk);
      start_coarse = 0;
      for (int k = 0; k < 77; k++) begin
        check(phase == PH_COARSE, "coarse phase");
        check(int'(u) == eu[k] && int'(v) == ev[k],
              $sformatf("coarse %0d: (%0d,%0d) expected (%0d,%0d)", k, u, v, eu[k], ev[k]));
        check(in_range, "coarse point in range");
        check(cand_last == (k == 76), "coarse cand_last");
        advance();
      end
      for (int c = 0; c < 6; c++) begin
        ctr_u = disp_t'(centres_u[c]);
        ctr_v = disp_t'(centres_v[c]);
        start_fine = 1;
        @(negedge clk);
        start_fine = 0;
        for (int f = 0; f < 8; f++) begin
          int f9, du, dv, xu, xv;
          f9 = (f < 4) ? f : f + 1;
          du = f9 / 3 - 1;
          dv = f9 % 3 - 1;
          xu = centres_u[c] + du;
          xv = centres_v[c] + dv;
          check(phase == PH_FINE, "fine phase");
          check(int'(u) == xu && int'(v) == xv,
                $sformatf("fine %0d around (%0d,%0d): (%0d,%0d)", f, ctr_u, ctr_v, u, v));
          check(in_range == (xu >= -8 && xu <= 8 && xv >= -8 && xv <= 8), "fine in_range");
          check(cand_last == (f == 7), "fine cand_last");
          advance();
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
