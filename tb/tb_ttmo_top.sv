// tb_ttmo_top - end-to-end test of the pattern detector at a reduced size
// (12 x 10 image, 3 x 4 window; parameters below).
//
// A random image is loaded with a copy of the pattern planted at a known
// position, then a series of scans is run:
//   1. exact matching (c1 = c2 = 0, l = n): only the planted copy matches;
//   2. a noisy copy, exact matching: no detection, LED off;
//   3. the same noisy copy with slack c1 < 0 < c2 and l = 86 % of n: found;
//   4. a pattern holding 0 and m, so that the slack bounds clamp;
//   5. the level set to a phi value that occurs, to hit phi == l exactly.
// During scans the bench also tries to write the image and to restart,
// which the device must ignore. Every phi(x) of every scan is compared with
// the reference model, as are h/LED, the match count, the first match, the
// highest phi and the scan time of (rows-wr+1)(cols-wc+1)(wr*wc+1) clocks
// plus the pipeline drain. Each mechanism must occur at least once.
module tb_ttmo_top;
  import tmo_pkg::*;
  import tb_tmo_ref_pkg::*;

  localparam int unsigned IMG_ROWS = 12, IMG_COLS = 10, W_ROWS = 3, W_COLS = 4, PIX_W = 8;
  localparam int unsigned N_WIN  = W_ROWS * W_COLS;
  localparam int unsigned N_IMG  = IMG_ROWS * IMG_COLS;
  localparam int unsigned ADDR_W = $clog2(N_IMG);
  localparam int unsigned PHI_W  = $clog2(N_WIN + 1);
  localparam int unsigned ROW_W  = $clog2(IMG_ROWS + 1);
  localparam int unsigned COL_W  = $clog2(IMG_COLS + 1);
  localparam int M = (1 << PIX_W) - 1;
  localparam int POS_R = IMG_ROWS - W_ROWS + 1, POS_C = IMG_COLS - W_COLS + 1;

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

  ttmo_top #(.IMG_ROWS(IMG_ROWS), .IMG_COLS(IMG_COLS), .W_ROWS(W_ROWS), .W_COLS(W_COLS),
             .PIX_W(PIX_W)) dut (.*);

  int checks = 0, failures = 0;
  int mc1 = 0, mc2 = 0;           // slack the pattern was loaded with
  int exp_phi [POS_R][POS_C];
  int seen;                       // phi values seen in the current scan
  int n_exact = 0, n_inexact = 0, n_nomatch = 0, n_clamp_lo = 0, n_clamp_hi = 0;
  int n_blocked_wr = 0, n_ignored_start = 0, n_boundary = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // phi stream monitor
  always @(posedge clk) begin
    #1;
    if (rst_n && phi_valid) begin
      int r, c;
      r = int'(phi_row); c = int'(phi_col);
      seen++;
      chk(int'(phi) == exp_phi[r][c], $sformatf("phi(%0d,%0d)=%0d exp %0d", r, c, phi, exp_phi[r][c]));
      if (int'(phi) == int'(level)) n_boundary++;
    end
  end

  task automatic load_image();
    for (int a = 0; a < N_IMG; a++) begin
      @(negedge clk);
      load_we = 1; load_sel = LOAD_IMAGE; load_addr = ADDR_W'(a); load_data = PIX_W'(img[a]);
    end
    @(negedge clk) load_we = 0;
  endtask

  task automatic load_pattern(int a1, int a2);
    c1 = (PIX_W+1)'(a1); c2 = (PIX_W+1)'(a2); mc1 = a1; mc2 = a2;
    for (int a = 0; a < N_WIN; a++) begin
      @(negedge clk);
      load_we = 1; load_sel = LOAD_PATTERN; load_addr = ADDR_W'(a); load_data = PIX_W'(pat[a]);
      if (pat[a] + a1 < 0) n_clamp_lo++;
      if (pat[a] + a2 > M) n_clamp_hi++;
    end
    @(negedge clk) load_we = 0;
    // change the offsets afterwards: must not affect the stored bounds
    c1 = '0; c2 = '0;
  endtask

  task automatic plant(int r0, int c0, int noise);
    for (int wr = 0; wr < W_ROWS; wr++)
      for (int wc = 0; wc < W_COLS; wc++)
        img[(r0 + wr) * IMG_COLS + c0 + wc] =
          clamp_px(pat[wr * W_COLS + wc] + int'($urandom_range(0, 2 * noise)) - noise, M);
  endtask

  // run one scan and check everything against the model; returns h
  task automatic scan(int lvl, output bit h_out);
    int cnt = 0, best = 0, fr = -1, fc = -1, cyc = 0;
    bit any = 0;
    for (int r = 0; r < POS_R; r++)
      for (int c = 0; c < POS_C; c++) begin
        int v = phi_ref(mc1, mc2, M, IMG_COLS, W_ROWS, W_COLS, r, c);
        exp_phi[r][c] = v;
        if (v >= lvl) begin
          if (!any) begin fr = r; fc = c; end
          any = 1; cnt++;
        end
        if (v > best) best = v;
      end
    seen = 0;
    level = PHI_W'(lvl);
    @(negedge clk) start = 1;
    @(posedge clk);
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin
      // disturbances while busy: a write to the image and a second start
      if (cyc == 7) begin
        load_we = 1; load_sel = LOAD_IMAGE; load_addr = ADDR_W'(W_COLS + 1);
        load_data = PIX_W'(img[W_COLS + 1] ^ 8'hFF);
      end else if (cyc == 8) begin
        load_we = 0; n_blocked_wr++;
      end else if (cyc == 20) begin
        start = 1; n_ignored_start++;
      end else begin
        start = 0;
      end
      chk(busy, "busy during scan");
      @(negedge clk);
      cyc++;
    end
    // cyc - 1 clock edges after the edge that sampled start
    cyc--;
    chk(cyc == int'(scan_cycles(IMG_ROWS, IMG_COLS, W_ROWS, W_COLS)) + int'(PIPE_LAT),
        $sformatf("scan time %0d exp %0d", cyc, scan_cycles(IMG_ROWS, IMG_COLS, W_ROWS, W_COLS) + PIPE_LAT));
    chk(seen == POS_R * POS_C, $sformatf("positions seen %0d", seen));
    chk(h == any && led == any, "h / led");
    chk(int'(match_count) == cnt, $sformatf("match count %0d exp %0d", match_count, cnt));
    chk(int'(phi_max) == best, "phi max");
    if (any) chk(int'(first_row) == fr && int'(first_col) == fc,
                 $sformatf("first match (%0d,%0d) exp (%0d,%0d)", first_row, first_col, fr, fc));
    @(negedge clk);
    chk(!busy, "idle after done");
    h_out = h;
  endtask

  initial begin
    bit hh;
    repeat (3) @(posedge clk);
    rst_n = 1;
    img = new[N_IMG];
    pat = new[N_WIN];
    for (int a = 0; a < N_IMG; a++) img[a] = int'($urandom_range(0, M));
    for (int a = 0; a < N_WIN; a++) pat[a] = int'($urandom_range(20, M - 20));

    // 1. exact matching of an exact copy
    plant(5, 2, 0);
    load_image();
    load_pattern(0, 0);
    scan(N_WIN, hh);
    chk(hh && first_row == 5 && first_col == 2, "exact copy found");
    if (hh) n_exact++;

    // 2. noisy copy, exact matching: not found
    plant(5, 2, 3);
    img[5 * IMG_COLS + 2] = clamp_px(pat[0] + 3, M);   // at least one pixel off
    load_image();
    scan(N_WIN, hh);
    chk(!hh && !led, "noisy copy not matched exactly");
    if (!hh) n_nomatch++;

    // 3. same noisy copy, inexact matching with slack, l = 86 % of n
    load_pattern(-3, 3);
    scan((N_WIN * 86 + 99) / 100, hh);
    chk(hh, "noisy copy matched with slack");
    if (hh) n_inexact++;

    // 4. pattern with extreme values: the slack bounds clamp at 0 and m
    pat[0] = 0; pat[1] = M; pat[N_WIN - 1] = 2;
    plant(0, 0, 0);
    img[0] = 0; img[1] = M;
    load_image();
    load_pattern(-10, 10);
    scan(N_WIN, hh);
    chk(hh && first_row == 0 && first_col == 0, "clamped pattern matched");

    // 5. level equal to an occurring phi
    scan(exp_phi[POS_R - 1][POS_C - 1], hh);
    chk(hh, "boundary level matched");

    chk(n_exact > 0,        "mechanism: exact match");
    chk(n_nomatch > 0,      "mechanism: no match");
    chk(n_inexact > 0,      "mechanism: inexact match");
    chk(n_clamp_lo > 0,     "mechanism: clamp at 0");
    chk(n_clamp_hi > 0,     "mechanism: clamp at m");
    chk(n_blocked_wr > 0,   "mechanism: write while busy");
    chk(n_ignored_start > 0,"mechanism: start while busy");
    chk(n_boundary > 0,     "mechanism: phi == l");
    $display("mechanisms: exact=%0d nomatch=%0d inexact=%0d clamp_lo=%0d clamp_hi=%0d blocked_wr=%0d ignored_start=%0d boundary=%0d",
             n_exact, n_nomatch, n_inexact, n_clamp_lo, n_clamp_hi, n_blocked_wr, n_ignored_start, n_boundary);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
