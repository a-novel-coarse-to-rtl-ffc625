// tb_cbps_control: self-checking test of the timing and control FSM.
//
// The testbench plays the pixel counter, candidate generator and block
// counter: it follows the FSM's commands and returns pix_last, cand_last and
// blk_last. A frame of 3 blocks is run twice. It checks that each block
// takes 5443 cycles (done comes 3 x 5443 edges after the edge that accepts
// start), that every block issues 77 x 64 coarse and then 8 x 64 fine pixel
// reads, that start_fine comes only after the 77th coarse candidate, that
// the counter commands come in the expected numbers, that start is ignored
// while busy and that busy drops with done.
module tb_cbps_control;
  import cbps_pkg::*;

  localparam int NB = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, pix_last, cand_last, blk_last;
  logic blk_clear, blk_next, pix_clear, pix_step;
  logic start_coarse, start_fine, cand_step, issue, busy, done;

  cbps_control dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Model of the counters the FSM drives.
  int pix = 0, cand = 0, blk = 0;
  bit fine = 0;
  int n_issue_coarse = 0, n_issue_fine = 0, n_start_fine = 0, n_start_coarse = 0;
  int n_blk_next = 0, n_blk_clear = 0, n_cand_step = 0, n_done = 0;

  assign pix_last  = (pix == 63);
  assign cand_last = fine ? (cand == 7) : (cand == 76);
  assign blk_last  = (blk == NB - 1);

  always @(posedge clk) begin
    if (rst_n) begin
      if (issue) begin
        if (fine) n_issue_fine++; else n_issue_coarse++;
      end
      if (start_fine) begin
        n_start_fine++;
        check(!fine && cand == 77, "start_fine only after the 77th coarse candidate");
      end
      if (start_coarse) n_start_coarse++;
      if (blk_next) n_blk_next++;
      if (blk_clear) n_blk_clear++;
      if (cand_step) n_cand_step++;
      if (done) n_done++;
      check(!(issue && !pix_step), "a pixel read always advances the pixel counter");
      // counter models
      if (pix_clear) pix <= 0;
      else if (pix_step) pix <= (pix + 1) % 64;
      if (start_coarse) begin fine <= 0; cand <= 0; end
      else if (start_fine) begin fine <= 1; cand <= 0; end
      else if (cand_step) cand <= cand + 1;
      if (blk_clear) blk <= 0;
      else if (blk_next) blk <= blk + 1;
    end
  end

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    start = 0;
    blk = 5;          // the FSM must clear the block counter itself
    @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(!busy && !issue, "idle after reset");
    for (int rep = 0; rep < 2; rep++) begin
      n_issue_coarse = 0; n_issue_fine = 0; n_start_fine = 0; n_start_coarse = 0;
      n_blk_next = 0; n_blk_clear = 0; n_cand_step = 0; n_done = 0;
      start = 1;
      @(posedge clk);        // accepts start
      @(negedge clk);
      t0 = cycle;            // edges counted up to the accepting one
      start = 0;
      check(busy, "busy after start");
      // a second start while busy must be ignored
      repeat (100) @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) begin
        @(negedge clk);
        if (!done) check(busy, "busy until done");
      end
      // done became visible after edge number t0 + 3 x 5443
      check(cycle - t0 == longint'(NB) * CYCLES_PER_BLOCK,
            $sformatf("frame took %0d cycles, expected %0d", cycle - t0, NB * CYCLES_PER_BLOCK));
      check(!busy, "busy drops with done");
      check(n_issue_coarse == NB * 77 * 64, $sformatf("coarse reads %0d", n_issue_coarse));
      check(n_issue_fine == NB * 8 * 64, $sformatf("fine reads %0d", n_issue_fine));
      check(n_start_fine == NB && n_start_coarse == NB, "one coarse and one fine phase per block");
      check(n_blk_clear == 1 && n_blk_next == NB - 1, "block counter commands");
      check(n_cand_step == NB * 85, "85 candidates per block");
      @(negedge clk);
      check(!done && n_done == 1, "done is a single pulse");
      repeat (5) @(negedge clk);
      check(!busy && !issue, "stays idle without start");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
