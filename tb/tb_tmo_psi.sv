// tb_tmo_psi - checks the detection operator: the per-position match pulse
// (phi >= l, with phi == l on the boundary), h/LED = OR of matches over a
// scan, clearing at scan start, the match count, first matching position,
// highest phi and the done pulse. Scans with no match and with matches are
// both run.
module tb_tmo_psi;
  localparam int unsigned N_WIN = 100;
  localparam int unsigned PHI_W = $clog2(N_WIN + 1);
  localparam int unsigned ROW_W = 6, COL_W = 6, CNT_W = 16;

  logic clk = 0, rst_n = 0, clear = 0;
  logic [PHI_W-1:0] level = '0, phi = '0, phi_max;
  logic phi_valid = 0, phi_last = 0;
  logic [ROW_W-1:0] phi_row = '0, match_row, first_row;
  logic [COL_W-1:0] phi_col = '0, match_col, first_col;
  logic match, h, led, done;
  logic [CNT_W-1:0] match_count;
  int checks = 0, failures = 0, n_eq = 0;

  tmo_psi #(.N_WIN(N_WIN), .PHI_W(PHI_W), .ROW_W(ROW_W), .COL_W(COL_W), .CNT_W(CNT_W)) dut (.*);

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

  task automatic scan(int lvl, int max_phi, int npos);
    int cnt = 0, best = 0, fr = 0, fc = 0;
    bit any = 0;
    @(negedge clk) clear = 1; level = PHI_W'(lvl);
    @(negedge clk) clear = 0;
    chk(!h && !led && match_count == 0, "cleared");
    for (int p = 0; p < npos; p++) begin
      int v = (p % 7 == 3) ? lvl : int'($urandom_range(0, max_phi));
      bit hit;
      if (v > N_WIN) v = N_WIN;
      hit = (v >= lvl);
      if (v == lvl) n_eq++;
      phi_valid = 1; phi = PHI_W'(v); phi_last = (p == npos - 1);
      phi_row = ROW_W'(p / 8); phi_col = COL_W'(p % 8);
      if (hit) begin
        if (!any) begin fr = p / 8; fc = p % 8; end
        any = 1; cnt++;
      end
      if (v > best) best = v;
      @(negedge clk);
      chk(match == hit, $sformatf("match p%0d phi %0d l %0d", p, v, lvl));
      chk(int'(match_row) == p / 8 && int'(match_col) == p % 8, "match position");
      chk(h == any && led == any, "h/led");
      chk(done == (p == npos - 1), "done");
      phi_valid = ($urandom_range(0, 3) == 0);  // idle clocks between positions
      phi_valid = 0;
      if ($urandom_range(0, 2) == 0) @(negedge clk);
    end
    phi_last = 0;
    @(negedge clk);
    chk(!match && !done, "no pulse without phi_valid");
    chk(int'(match_count) == cnt, $sformatf("count %0d exp %0d", match_count, cnt));
    chk(int'(phi_max) == best, "phi max");
    if (any) chk(int'(first_row) == fr && int'(first_col) == fc, "first position");
    chk(h == any, "h held");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    scan(90, 80, 60);     // no match possible except the forced l values
    scan(70, 100, 60);
    scan(100, 100, 40);
    scan(0, 10, 20);      // l = 0 always matches
    chk(n_eq > 0, "boundary phi == l exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
