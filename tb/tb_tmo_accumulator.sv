// tb_tmo_accumulator - checks phi = sum of (erosion AND anti-dilation) over
// windows of random length with random gaps in the element stream, each
// window closed by a flush: phi value, position tag, last flag, the
// one-clock output latency, and the restart of the count after each flush.
// Windows with all lambda = 1 (phi = N_WIN) and all 0 are included.
module tb_tmo_accumulator;
  localparam int unsigned N_WIN = 20;
  localparam int unsigned PHI_W = $clog2(N_WIN + 1);
  localparam int unsigned ROW_W = 5, COL_W = 6;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, ero_bit = 0, ad_bit = 0, flush = 0, flush_last = 0;
  logic [ROW_W-1:0] flush_row = '0, phi_row;
  logic [COL_W-1:0] flush_col = '0, phi_col;
  logic phi_valid, phi_last;
  logic [PHI_W-1:0] phi;
  int checks = 0, failures = 0, n_full = 0;

  tmo_accumulator #(.N_WIN(N_WIN), .PHI_W(PHI_W), .ROW_W(ROW_W), .COL_W(COL_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 500; w++) begin
      int sum;
      int mode;
      sum = 0; mode = w % 5;   // mode 0: all match, 1: none, else random
      for (int i = 0; i < N_WIN; i++) begin
        @(negedge clk);
        flush = 0;
        while ($urandom_range(0, 5) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        ero_bit = (mode == 0) ? 1'b1 : (mode == 1) ? 1'b0 : 1'($urandom);
        ad_bit  = (mode == 0) ? 1'b1 : (mode == 1) ? 1'($urandom) & ero_bit ^ 1'b1 : 1'($urandom);
        if (mode == 1) ad_bit = ~ero_bit;
        sum += int'(ero_bit & ad_bit);
      end
      @(negedge clk);
      in_valid = 0; flush = 1; flush_last = (w == 499);
      flush_row = ROW_W'(w); flush_col = COL_W'(w * 3);
      chk(!phi_valid, "phi_valid before flush");
      @(negedge clk);
      flush = 0; flush_last = 0;
      chk(phi_valid, "phi_valid one clock after flush");
      chk(int'(phi) == sum, $sformatf("window %0d phi %0d exp %0d", w, phi, sum));
      chk(phi_row == ROW_W'(w) && phi_col == COL_W'(w * 3), "position tag");
      chk(phi_last == (w == 499), "last flag");
      if (sum == N_WIN) n_full++;
    end
    @(negedge clk);
    chk(!phi_valid, "single-clock phi_valid");
    chk(n_full > 0, "full window exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
