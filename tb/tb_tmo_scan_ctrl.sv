// tb_tmo_scan_ctrl - checks the buffer access sequence of the scan
// controller at a reduced size (9 x 7 image, 3 x 4 window): every issued
// image address and window index against nested loops over positions and
// window elements, one closing clock per position, the done pulse, the total
// of (rows-wr+1)*(cols-wc+1)*(wr*wc+1) clocks, and that start is ignored
// while busy. Two scans are run back to back.
module tb_tmo_scan_ctrl;
  import tmo_pkg::*;
  localparam int unsigned IMG_ROWS = 9, IMG_COLS = 7, W_ROWS = 3, W_COLS = 4;
  localparam int unsigned ADDR_W = $clog2(IMG_ROWS * IMG_COLS);
  localparam int unsigned IDX_W  = $clog2(W_ROWS * W_COLS);
  localparam int unsigned ROW_W  = $clog2(IMG_ROWS + 1);
  localparam int unsigned COL_W  = $clog2(IMG_COLS + 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, step_valid, flush;
  logic [ADDR_W-1:0] img_addr;
  logic [IDX_W-1:0]  win_idx;
  logic [ROW_W-1:0]  pos_row;
  logic [COL_W-1:0]  pos_col;
  int checks = 0, failures = 0;

  tmo_scan_ctrl #(.IMG_ROWS(IMG_ROWS), .IMG_COLS(IMG_COLS), .W_ROWS(W_ROWS), .W_COLS(W_COLS),
                  .ADDR_W(ADDR_W), .IDX_W(IDX_W), .ROW_W(ROW_W), .COL_W(COL_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_scan();
    longint unsigned n_cyc = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    // sequence model
    for (int r = 0; r <= IMG_ROWS - W_ROWS; r++)
      for (int c = 0; c <= IMG_COLS - W_COLS; c++) begin
        for (int wr = 0; wr < W_ROWS; wr++)
          for (int wc = 0; wc < W_COLS; wc++) begin
            n_cyc++;
            chk(step_valid && !flush, "step expected");
            chk(int'(img_addr) == (r + wr) * IMG_COLS + c + wc, $sformatf("addr r%0d c%0d wr%0d wc%0d got %0d", r, c, wr, wc, img_addr));
            chk(int'(win_idx) == wr * W_COLS + wc, "index");
            chk(int'(pos_row) == r && int'(pos_col) == c, "position");
            chk(!done, "early done");
            if (wr == 1 && wc == 1) start = 1;   // must be ignored
            @(negedge clk) start = 0;
          end
        n_cyc++;
        chk(flush && !step_valid, "closing clock");
        chk(int'(pos_row) == r && int'(pos_col) == c, "flush position");
        chk(done == (r == IMG_ROWS - W_ROWS && c == IMG_COLS - W_COLS), "done pulse");
        @(negedge clk);
      end
    chk(!busy && !step_valid && !flush, "idle after scan");
    chk(n_cyc == scan_cycles(IMG_ROWS, IMG_COLS, W_ROWS, W_COLS), "cycle count");
    $display("scan took %0d clocks", n_cyc);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && !step_valid, "idle after reset");
    run_scan();
    repeat (3) @(negedge clk);
    run_scan();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
