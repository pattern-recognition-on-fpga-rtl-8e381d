// tb_tmo_buffer - checks the pixel buffer: random writes, synchronous reads
// one clock later against a shadow array, read data held while rd_en is low,
// read-before-write on a same-address collision, and ignored out-of-range
// writes.
module tb_tmo_buffer;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 100;
  localparam int unsigned ADDR_W = 7;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [ADDR_W-1:0] wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0]  wr_data = '0, rd_data;
  logic [WIDTH-1:0]  shadow [DEPTH];
  int checks = 0, failures = 0;

  tmo_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH), .ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_data(logic [WIDTH-1:0] exp, string what);
    checks++;
    if (rd_data !== exp) begin
      failures++; $display("FAIL %s: got %0h exp %0h", what, rd_data, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 expect_data('0, "reset value");
    rst_n = 1;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = ADDR_W'(a); wr_data = WIDTH'($urandom); shadow[a] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    // out-of-range writes are dropped
    for (int a = DEPTH; a < 128; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = ADDR_W'(a); wr_data = 8'hA5;
    end
    @(negedge clk) wr_en = 0;
    // random reads and writes
    for (int k = 0; k < 3000; k++) begin
      int ra = int'($urandom_range(0, DEPTH - 1));
      int wa = int'($urandom_range(0, DEPTH - 1));
      logic [WIDTH-1:0] exp;
      logic do_rd, do_wr;
      @(negedge clk);
      do_rd = ($urandom_range(0, 3) != 0);
      do_wr = ($urandom_range(0, 1) != 0);
      if (k % 50 == 0) wa = ra;   // force collisions
      rd_en = do_rd; rd_addr = ADDR_W'(ra);
      wr_en = do_wr; wr_addr = ADDR_W'(wa); wr_data = WIDTH'($urandom);
      exp = do_rd ? shadow[ra] : rd_data;
      @(posedge clk);
      if (do_wr) shadow[wa] = wr_data;
      #1 expect_data(exp, do_rd ? "read" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
