// tb_cbps_pe: self-checking test of the processing element.
//
// Feeds candidates of 64 random pixel pairs (plus extreme pairs 0/255) with
// every truncation setting 0..4, with idle cycles between pixels, and checks
// the SSAD on the last pixel against a sum computed here. Also checks that
// sum_valid is high only on a last pixel. A second element built with
// PIX_BITS = 5 (5-bit subtractor, fixed RBSSAD5) gets the same pixels.
module tb_cbps_pe;
  import cbps_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               in_valid, first, last;
  logic [TRUNC_W-1:0] trunc;
  logic [7:0]         cur_pix, prev_pix;
  ssad_t              sum;
  logic               sum_valid;

  cbps_pe dut (.*);

  // A second element built for a fixed RBSSAD5: 5-bit subtractor.
  ssad_t sum5;
  logic  sum5_valid;
  cbps_pe #(.PIX_BITS(5)) dut5 (
    .clk, .rst_n, .in_valid, .first, .last, .trunc, .cur_pix, .prev_pix,
    .sum(sum5), .sum_valid(sum5_valid)
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; first = 0; last = 0; trunc = '0; cur_pix = '0; prev_pix = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int cand = 0; cand < 60; cand++) begin
      int t;
      int expect_sum, expect5;
      expect_sum = 0;
      expect5 = 0;
      t = cand % 5;
      for (int k = 0; k < 64; k++) begin
        int a, b;
        if (cand == 0) begin a = 255; b = 0; end            // largest possible SSAD
        else if (cand == 1) begin a = 0; b = 255; end
        else begin a = $urandom_range(0, 255); b = $urandom_range(0, 255); end
        expect_sum += ((a >> t) > (b >> t)) ? (a >> t) - (b >> t) : (b >> t) - (a >> t);
        expect5 += ((a >> (3 + t)) > (b >> (3 + t))) ? (a >> (3 + t)) - (b >> (3 + t))
                                                     : (b >> (3 + t)) - (a >> (3 + t));
        // an idle cycle now and then
        if ($urandom_range(0, 7) == 0) begin
          in_valid = 1'b0; first = 1'b0; last = 1'b0;
          #1 check(!sum_valid, "sum_valid while idle");
          @(negedge clk);
        end
        // inputs change at the falling edge, outputs are checked before the
        // rising edge that accumulates them
        in_valid = 1'b1;
        first    = (k == 0);
        last     = (k == 63);
        trunc    = TRUNC_W'(t);
        cur_pix  = 8'(a);
        prev_pix = 8'(b);
        #1 check(sum_valid == (k == 63), "sum_valid only on the last pixel");
        if (k == 63)
          check(int'(sum) == expect_sum,
                $sformatf("cand %0d trunc %0d: sum %0d expected %0d", cand, t, sum, expect_sum));
        if (k == 63)
          check(int'(sum5) == expect5 && sum5_valid,
                $sformatf("5-bit PE, cand %0d trunc %0d: sum %0d expected %0d", cand, t, sum5, expect5));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
