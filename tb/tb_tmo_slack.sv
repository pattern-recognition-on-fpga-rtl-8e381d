// tb_tmo_slack - checks the slack pattern generator against an integer model
// of f_W+-(w) = max(0, min(m, f_W(w) + c)), for every pixel value with the
// offsets at their extremes and at random, including clamping at 0 and m.
module tb_tmo_slack;
  localparam int unsigned PIX_W = 8;
  localparam int M = (1 << PIX_W) - 1;

  logic [PIX_W-1:0]      f_w, f_lo, f_hi;
  logic signed [PIX_W:0] c1, c2;
  int checks = 0, failures = 0;
  int n_clamp_lo = 0, n_clamp_hi = 0;

  tmo_slack #(.PIX_W(PIX_W)) dut (.f_w, .c1, .c2, .f_lo, .f_hi);

  function automatic int ref_clamp(int f, int c);
    int s = f + c;
    return (s < 0) ? 0 : (s > M) ? M : s;
  endfunction

  task automatic check(int f, int a, int b);
    f_w = PIX_W'(f); c1 = (PIX_W+1)'(a); c2 = (PIX_W+1)'(b);
    #1;
    checks += 2;
    if (int'(f_lo) != ref_clamp(f, a)) begin
      failures++; $display("FAIL lo f=%0d c1=%0d got %0d exp %0d", f, a, f_lo, ref_clamp(f, a));
    end
    if (int'(f_hi) != ref_clamp(f, b)) begin
      failures++; $display("FAIL hi f=%0d c2=%0d got %0d exp %0d", f, b, f_hi, ref_clamp(f, b));
    end
    if (f + a < 0) n_clamp_lo++;
    if (f + b > M) n_clamp_hi++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f <= M; f++) begin
      check(f, 0, 0);
      check(f, -256, 255);
      check(f, -20, 20);
      check(f, -1, 1);
    end
    for (int k = 0; k < 2000; k++) begin
      int a, b, t;
      a = int'($urandom_range(0, 511)) - 256;
      b = int'($urandom_range(0, 511)) - 256;
      if (a > b) begin t = a; a = b; b = t; end
      check(int'($urandom_range(0, M)), a, b);
    end
    if (n_clamp_lo == 0 || n_clamp_hi == 0) begin
      failures++; $display("FAIL clamping not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
