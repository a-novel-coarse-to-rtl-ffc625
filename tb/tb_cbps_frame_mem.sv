// tb_cbps_frame_mem: self-checking test of the frame store.
//
// Uses a small 32 x 48 frame. Writes a pattern to every location, reads
// every location back in random order checking the one-cycle read latency,
// then checks that a read of a location written in the same cycle returns
// the old pixel.
module tb_cbps_frame_mem;
  import cbps_pkg::*;

  localparam int ROWS = 32;
  localparam int COLS = 48;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             we;
  logic [CRD_W-1:0] wr_row, wr_col, rd_row, rd_col;
  logic [7:0]       wr_data, rd_data;

  cbps_frame_mem #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;
  byte unsigned model [ROWS][COLS];

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

  initial begin
    we = 0; wr_row = '0; wr_col = '0; wr_data = '0; rd_row = '0; rd_col = '0;
    @(negedge clk);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        model[r][c] = 8'($urandom);
        we = 1; wr_row = CRD_W'(r); wr_col = CRD_W'(c); wr_data = model[r][c];
        @(negedge clk);
      end
    we = 0;
    for (int n = 0; n < 3000; n++) begin
      int r, c;
      r = $urandom_range(0, ROWS-1);
      c = $urandom_range(0, COLS-1);
      rd_row = CRD_W'(r); rd_col = CRD_W'(c);
      @(negedge clk);
      check(rd_data == model[r][c],
            $sformatf("read (%0d,%0d) = %0d expected %0d", r, c, rd_data, model[r][c]));
    end
    // read-during-write returns the old pixel, the new one a cycle later
    we = 1; wr_row = 5; wr_col = 7; wr_data = ~model[5][7];
    rd_row = 5; rd_col = 7;
    @(negedge clk);
    check(rd_data == model[5][7], "read during write returns the old pixel");
    we = 0;
    @(negedge clk);
    check(rd_data == 8'(~model[5][7]), "new pixel after the write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
