// tb_ttmo_full - one complete detection at the full default size: a
// 116 x 131 image searched for a 48 x 26 pattern (1248 pixels), with slack
// c1 = -4, c2 = +4 and the similarity level at 86 % of the window
// (l = 1074). The image is random apart from a noisy copy of the pattern
// (about 90 % of its pixels within +-4 of the pattern, the rest random)
// planted at row 40, column 70. All 69 x 106 = 7314 values of phi are
// compared with the reference model, as are h/LED, the match count, the
// first match, the highest phi, and the scan time of 9,135,186 clocks plus
// the pipeline drain.
module tb_ttmo_full;
  import tmo_pkg::*;
  import tb_tmo_ref_pkg::*;

  localparam int unsigned IMG_ROWS = DEF_IMG_ROWS, IMG_COLS = DEF_IMG_COLS;
  localparam int unsigned W_ROWS = DEF_W_ROWS, W_COLS = DEF_W_COLS, PIX_W = DEF_PIX_W;
  localparam int unsigned N_WIN  = W_ROWS * W_COLS;
  localparam int unsigned N_IMG  = IMG_ROWS * IMG_COLS;
  localparam int unsigned ADDR_W = $clog2(N_IMG);
  localparam int unsigned PHI_W  = $clog2(N_WIN + 1);
  localparam int unsigned ROW_W  = $clog2(IMG_ROWS + 1);
  localparam int unsigned COL_W  = $clog2(IMG_COLS + 1);
  localparam int M = (1 << PIX_W) - 1;
  localparam int POS_R = IMG_ROWS - W_ROWS + 1, POS_C = IMG_COLS - W_COLS + 1;
  localparam int C1 = -4, C2 = 4;
  localparam int LEVEL = (N_WIN * 86 + 99) / 100;
  localparam int R0 = 40, C0 = 70;

  logic clk = 0, rst_n = 0;
  logic signed [PIX_W:0] c1 = '0, c2 = '0;
  logic [PHI_W-1:0] level = '0;
  logic load_we = 0;
  load_sel_e load_sel = LOAD_IMAGE;
  logic [ADDR_W-1:0] load_addr = '0;
  logic [PIX_W-1:0] load_data = '0;
  logic start = 0, busy, done, phi_valid, match, h, led;
  logic [PHI_W-1:0] phi, phi_max;
  logic [ROW_W-1:0] phi_row, match_row, first_row;
  logic [COL_W-1:0] phi_col, match_col, first_col;
  logic [15:0] match_count;

  ttmo_top dut (.*);

  int checks = 0, failures = 0, seen = 0, n_match_pulses = 0;
  int exp_phi [POS_R][POS_C];
  longint unsigned cyc = 0;

  always #2.5 clk = ~clk;   // 200 MHz

  initial begin
    repeat (9_300_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    #1;
    if (rst_n && phi_valid) begin
      int r, c;
      r = int'(phi_row); c = int'(phi_col);
      seen++;
      chk(int'(phi) == exp_phi[r][c], $sformatf("phi(%0d,%0d)=%0d exp %0d", r, c, phi, exp_phi[r][c]));
    end
    if (rst_n && match) n_match_pulses++;
  end

  initial begin
    int cnt = 0, best = 0, fr = -1, fc = -1;
    bit any = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    img = new[N_IMG];
    pat = new[N_WIN];
    for (int a = 0; a < N_IMG; a++) img[a] = int'($urandom_range(0, M));
    for (int a = 0; a < N_WIN; a++) pat[a] = int'($urandom_range(0, M));
    for (int wr = 0; wr < W_ROWS; wr++)
      for (int wc = 0; wc < W_COLS; wc++)
        if ($urandom_range(0, 9) != 0)
          img[(R0 + wr) * IMG_COLS + C0 + wc] =
            clamp_px(pat[wr * W_COLS + wc] + int'($urandom_range(0, 8)) - 4, M);
    for (int r = 0; r < POS_R; r++)
      for (int c = 0; c < POS_C; c++) begin
        int v;
        v = phi_ref(C1, C2, M, IMG_COLS, W_ROWS, W_COLS, r, c);
        exp_phi[r][c] = v;
        if (v >= LEVEL) begin
          if (!any) begin fr = r; fc = c; end
          any = 1; cnt++;
        end
        if (v > best) best = v;
      end
    $display("reference: phi at planted copy %0d of %0d, best %0d, matches %0d", exp_phi[R0][C0], N_WIN, best, cnt);

    for (int a = 0; a < N_IMG; a++) begin
      @(negedge clk);
      load_we = 1; load_sel = LOAD_IMAGE; load_addr = ADDR_W'(a); load_data = PIX_W'(img[a]);
    end
    c1 = (PIX_W+1)'(C1); c2 = (PIX_W+1)'(C2);
    for (int a = 0; a < N_WIN; a++) begin
      @(negedge clk);
      load_we = 1; load_sel = LOAD_PATTERN; load_addr = ADDR_W'(a); load_data = PIX_W'(pat[a]);
    end
    @(negedge clk) load_we = 0;
    level = PHI_W'(LEVEL);
    start = 1;
    @(posedge clk);
    @(negedge clk) start = 0;
    while (!done) begin
      @(posedge clk);
      cyc++;
      #1;
    end
    chk(cyc == scan_cycles(IMG_ROWS, IMG_COLS, W_ROWS, W_COLS) + PIPE_LAT,
        $sformatf("scan time %0d", cyc));
    $display("scan: %0d clocks = %0.2f ms at 200 MHz", cyc, real'(cyc) * 5.0e-6);
    chk(seen == POS_R * POS_C, $sformatf("positions seen %0d", seen));
    chk(h && led && any, "pattern detected");
    chk(int'(match_count) == cnt && n_match_pulses == cnt, "match count");
    chk(int'(first_row) == fr && int'(first_col) == fc, "first match");
    chk(fr == R0 && fc == C0, "found at the planted position");
    chk(int'(phi_max) == best, "phi max");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
