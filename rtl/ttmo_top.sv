// ttmo_top - thresholded template-matching operator (TTMO) pattern detector.
//
// Finds a trained gray-level pattern f_W (W_ROWS x W_COLS) in an image g
// (IMG_ROWS x IMG_COLS) with morphological operators built from elementary
// comparisons only: no multiplications and no convolution. For every window
// position x it counts
//   phi(x) = #{ i : f_W-(w_i) <= g(x+w_i) <= f_W+(w_i) }
// (erosion AND anti-dilation, summed over the window) and reports the pattern
// present (h = 1, LED on) if some phi(x) reaches the similarity level l.
// The slack offsets c1 <= c2 widen the pixel interval for inexact matching;
// c1 = c2 = 0 gives exact matching.
//
// Blocks: tmo_slack (bounds, on the pattern load path), three tmo_buffer
// stores (image here, fw1 inside tmo_erosion, fw2 inside tmo_antidilation),
// tmo_scan_ctrl (buffer access), tmo_accumulator (phi) and tmo_psi (psi_l and
// the LED). The learning engine that trains f_W is not part of the device:
// the trained pattern is written through the load port.
//
// Interface: while idle, the host writes image pixels (load_sel = LOAD_IMAGE,
// row-major address row*IMG_COLS+col) and pattern pixels (LOAD_PATTERN,
// address wr*W_COLS+wc; the pattern is clamped with the c1/c2 present at that
// write). Writes while busy and out-of-range addresses are ignored. A start
// pulse runs one scan; c1/c2 are only used while loading, level while scanning.
// The phi stream (phi_valid/phi/phi_row/phi_col) and the per-position match
// pulse are brought out for observation.
//
// Timing: one window element per clock plus one closing clock per position,
//   scan_cycles = (IMG_ROWS-W_ROWS+1)*(IMG_COLS-W_COLS+1)*(W_ROWS*W_COLS+1)
// = 9,135,186 clocks at the default size (45.7 ms at 200 MHz). done rises
// scan_cycles + PIPE_LAT (3) clock edges after the edge that sampled start;
// h and led are final from then on. Sizes and the cycle count follow the reference design; the load
// interface, pixel width and status outputs are this design's choices.
module ttmo_top
  import tmo_pkg::*;
#(
  parameter int unsigned IMG_ROWS = DEF_IMG_ROWS,
  parameter int unsigned IMG_COLS = DEF_IMG_COLS,
  parameter int unsigned W_ROWS   = DEF_W_ROWS,
  parameter int unsigned W_COLS   = DEF_W_COLS,
  parameter int unsigned PIX_W    = DEF_PIX_W,
  parameter int unsigned N_WIN    = W_ROWS * W_COLS,
  parameter int unsigned N_IMG    = IMG_ROWS * IMG_COLS,
  parameter int unsigned ADDR_W   = $clog2(N_IMG),
  parameter int unsigned IDX_W    = (N_WIN > 1) ? $clog2(N_WIN) : 1,
  parameter int unsigned PHI_W    = $clog2(N_WIN + 1),
  parameter int unsigned ROW_W    = $clog2(IMG_ROWS + 1),
  parameter int unsigned COL_W    = $clog2(IMG_COLS + 1),
  parameter int unsigned CNT_W    = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration
  input  logic signed [PIX_W:0]   c1,          // slack offset, lower bound
  input  logic signed [PIX_W:0]   c2,          // slack offset, upper bound
  input  logic [PHI_W-1:0]        level,       // similarity level l
  // load port
  input  logic                    load_we,
  input  load_sel_e               load_sel,
  input  logic [ADDR_W-1:0]       load_addr,
  input  logic [PIX_W-1:0]        load_data,
  // control
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  // phi activity stream
  output logic                    phi_valid,
  output logic [PHI_W-1:0]        phi,
  output logic [ROW_W-1:0]        phi_row,
  output logic [COL_W-1:0]        phi_col,
  // detection
  output logic                    match,
  output logic [ROW_W-1:0]        match_row,
  output logic [COL_W-1:0]        match_col,
  output logic                    h,
  output logic                    led,
  output logic [CNT_W-1:0]        match_count,
  output logic [ROW_W-1:0]        first_row,
  output logic [COL_W-1:0]        first_col,
  output logic [PHI_W-1:0]        phi_max
);

  // ---------------------------------------------------------------- control
  logic start_ok;
  assign start_ok = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        busy <= 1'b0;
    else if (start_ok) busy <= 1'b1;
    else if (done)     busy <= 1'b0;
  end

  // ---------------------------------------------------------------- loading
  logic             img_we, pat_we;
  logic [PIX_W-1:0] f_lo, f_hi;

  assign img_we = load_we && !busy && (load_sel == LOAD_IMAGE)
                  && (32'(load_addr) < N_IMG);
  assign pat_we = load_we && !busy && (load_sel == LOAD_PATTERN)
                  && (32'(load_addr) < N_WIN);

  tmo_slack #(.PIX_W(PIX_W)) u_slack (
    .f_w  (load_data),
    .c1   (c1),
    .c2   (c2),
    .f_lo (f_lo),
    .f_hi (f_hi)
  );

  // ---------------------------------------------------------------- scan
  logic              s_valid, s_flush, s_done;
  logic [ADDR_W-1:0] s_addr;
  logic [IDX_W-1:0]  s_idx;
  logic [ROW_W-1:0]  s_row;
  logic [COL_W-1:0]  s_col;
  logic              s_busy;

  tmo_scan_ctrl #(
    .IMG_ROWS (IMG_ROWS), .IMG_COLS (IMG_COLS),
    .W_ROWS   (W_ROWS),   .W_COLS   (W_COLS),
    .ADDR_W   (ADDR_W),   .IDX_W    (IDX_W),
    .ROW_W    (ROW_W),    .COL_W    (COL_W)
  ) u_scan (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start_ok),
    .busy       (s_busy),
    .done       (s_done),
    .step_valid (s_valid),
    .img_addr   (s_addr),
    .win_idx    (s_idx),
    .flush      (s_flush),
    .pos_row    (s_row),
    .pos_col    (s_col)
  );

  // image buffer
  logic [PIX_W-1:0] g_pix;

  tmo_buffer #(.WIDTH(PIX_W), .DEPTH(N_IMG), .ADDR_W(ADDR_W)) u_image (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (img_we),
    .wr_addr (load_addr),
    .wr_data (load_data),
    .rd_en   (s_valid),
    .rd_addr (s_addr),
    .rd_data (g_pix)
  );

  // erosion with fw1 = f_W-, anti-dilation with fw2 = f_W+
  logic e_valid, e_bit, a_valid, a_bit;

  tmo_erosion #(.PIX_W(PIX_W), .N_WIN(N_WIN), .IDX_W(IDX_W)) u_erosion (
    .clk       (clk),
    .rst_n     (rst_n),
    .pat_we    (pat_we),
    .pat_addr  (IDX_W'(load_addr)),
    .pat_data  (f_lo),
    .in_valid  (s_valid),
    .in_idx    (s_idx),
    .g_pix     (g_pix),
    .out_valid (e_valid),
    .out_bit   (e_bit)
  );

  tmo_antidilation #(.PIX_W(PIX_W), .N_WIN(N_WIN), .IDX_W(IDX_W)) u_antidilation (
    .clk       (clk),
    .rst_n     (rst_n),
    .pat_we    (pat_we),
    .pat_addr  (IDX_W'(load_addr)),
    .pat_data  (f_hi),
    .in_valid  (s_valid),
    .in_idx    (s_idx),
    .g_pix     (g_pix),
    .out_valid (a_valid),
    .out_bit   (a_bit)
  );

  // the closing clock and its position travel with the comparator latency
  logic [1:0]       fl_q, last_q;
  logic [ROW_W-1:0] row_q [2];
  logic [COL_W-1:0] col_q [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fl_q   <= '0;
      last_q <= '0;
      row_q  <= '{default: '0};
      col_q  <= '{default: '0};
    end else begin
      fl_q   <= {fl_q[0], s_flush};
      last_q <= {last_q[0], s_done};
      row_q  <= '{s_row, row_q[0]};
      col_q  <= '{s_col, col_q[0]};
    end
  end

  // ---------------------------------------------------------------- phi, psi
  logic phi_last;

  tmo_accumulator #(.N_WIN(N_WIN), .PHI_W(PHI_W), .ROW_W(ROW_W), .COL_W(COL_W)) u_acc (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (e_valid),
    .ero_bit    (e_bit),
    .ad_bit     (a_bit),
    .flush      (fl_q[1]),
    .flush_last (last_q[1]),
    .flush_row  (row_q[1]),
    .flush_col  (col_q[1]),
    .phi_valid  (phi_valid),
    .phi        (phi),
    .phi_last   (phi_last),
    .phi_row    (phi_row),
    .phi_col    (phi_col)
  );

  tmo_psi #(.N_WIN(N_WIN), .PHI_W(PHI_W), .ROW_W(ROW_W), .COL_W(COL_W), .CNT_W(CNT_W)) u_psi (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear       (start_ok),
    .level       (level),
    .phi_valid   (phi_valid),
    .phi         (phi),
    .phi_last    (phi_last),
    .phi_row     (phi_row),
    .phi_col     (phi_col),
    .match       (match),
    .match_row   (match_row),
    .match_col   (match_col),
    .h           (h),
    .led         (led),
    .done        (done),
    .match_count (match_count),
    .first_row   (first_row),
    .first_col   (first_col),
    .phi_max     (phi_max)
  );

  // the scan only runs inside a busy period
  a_scan_in_busy: assert property (@(posedge clk) disable iff (!rst_n) s_busy |-> busy)
    else $error("ttmo_top: scan running while idle");

  // the two comparators run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) e_valid == a_valid)
    else $error("ttmo_top: erosion and anti-dilation out of step");

endmodule
