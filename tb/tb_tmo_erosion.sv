// tb_tmo_erosion - checks the erosion: 1 where g >= f_W-(w_i).
// Loads a random bound pattern, then streams element indices with in_valid
// (with random gaps), supplies g one clock later as the image buffer would,
// and checks each result bit and its two-clock latency against a model.
// Pixels equal to the bound are forced often to test the boundary.
module tb_tmo_erosion;
  localparam int unsigned PIX_W = 8;
  localparam int unsigned N_WIN = 40;
  localparam int unsigned IDX_W = 6;

  logic clk = 0, rst_n = 0;
  logic pat_we = 0;
  logic [IDX_W-1:0] pat_addr = '0, in_idx = '0;
  logic [PIX_W-1:0] pat_data = '0, g_pix = '0;
  logic in_valid = 0, out_valid, out_bit;
  logic [PIX_W-1:0] pat [N_WIN];
  int checks = 0, failures = 0, n_eq = 0, n_one = 0, n_zero = 0;
  int exp_q[$];   // expected bit for each element in flight
  int lat_q[$];   // issue clock
  int cyc = 0;

  tmo_erosion #(.PIX_W(PIX_W), .N_WIN(N_WIN), .IDX_W(IDX_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result checker
  always @(posedge clk) begin
    #2;
    if (rst_n && out_valid) begin
      int e, t;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected out_valid");
      end else begin
        e = exp_q.pop_front(); t = lat_q.pop_front();
        if (int'(out_bit) != e) begin
          failures++; $display("FAIL bit got %0d exp %0d", out_bit, e);
        end
        checks++;
        if (cyc - t != 2) begin
          failures++; $display("FAIL latency %0d", cyc - t);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N_WIN; i++) begin
      @(negedge clk);
      pat_we = 1; pat_addr = IDX_W'(i); pat_data = PIX_W'($urandom); pat[i] = pat_data;
    end
    @(negedge clk) pat_we = 0;
    for (int k = 0; k < 4000; k++) begin
      int i, gv;
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      i = int'($urandom_range(0, N_WIN - 1));
      in_idx = IDX_W'(i);
      case ($urandom_range(0, 3))
        0: gv = int'(pat[i]);
        1: gv = (pat[i] > 0)   ? int'(pat[i]) - 1 : 0;
        2: gv = (pat[i] < 255) ? int'(pat[i]) + 1 : 255;
        default: gv = int'($urandom_range(0, 255));
      endcase
      if (in_valid) begin
        exp_q.push_back((gv >= int'(pat[i])) ? 1 : 0);
        lat_q.push_back(cyc);
        if (gv == int'(pat[i])) n_eq++;
        if (gv >= int'(pat[i])) n_one++; else n_zero++;
      end
      // g arrives one clock after the index
      fork
        begin
          automatic int gg = gv;
          @(negedge clk) g_pix = PIX_W'(gg);
        end
      join_none
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_eq == 0 || n_one == 0 || n_zero == 0) begin
      failures++; $display("FAIL leftover %0d or cases missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
