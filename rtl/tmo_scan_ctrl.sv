// tmo_scan_ctrl - buffer access controller of the detector.
//
// Walks every window position x = (row, col) of the valid region E (the image
// shrunk by the window, IMG_ROWS-W_ROWS+1 by IMG_COLS-W_COLS+1 positions,
// row-major) and, at each position, every window element w_i = (wr, wc),
// i = wr*W_COLS + wc. Each clock it issues one element: the image address
// (row+wr)*IMG_COLS + (col+wc) and the pattern index i. After the last element
// of a position it spends one closing clock (flush) in which the accumulator
// hands over phi(x) and clears. One position therefore costs W_ROWS*W_COLS+1
// clocks, and a scan the cycle count of the reference design,
//   (IMG_ROWS-W_ROWS+1) * (IMG_COLS-W_COLS+1) * (W_ROWS*W_COLS+1).
// The scan order and the use of the extra clock are this design's choice;
// the cycle count is the reference design's.
//
// Timing: start is sampled while idle; the first element is issued on the
// next clock (step_valid high) and the scan ends with the flush of the last
// position, together with a one-clock done pulse. start while busy is ignored.
module tmo_scan_ctrl #(
  parameter int unsigned IMG_ROWS = 116,
  parameter int unsigned IMG_COLS = 131,
  parameter int unsigned W_ROWS   = 48,
  parameter int unsigned W_COLS   = 26,
  parameter int unsigned ADDR_W   = $clog2(IMG_ROWS * IMG_COLS),
  parameter int unsigned IDX_W    = (W_ROWS * W_COLS > 1) ? $clog2(W_ROWS * W_COLS) : 1,
  parameter int unsigned ROW_W    = $clog2(IMG_ROWS + 1),
  parameter int unsigned COL_W    = $clog2(IMG_COLS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,        // pulse with the last flush
  // element step
  output logic              step_valid,  // an element read this clock
  output logic [ADDR_W-1:0] img_addr,    // g(x + w_i)
  output logic [IDX_W-1:0]  win_idx,     // i
  // closing clock of a position
  output logic              flush,
  // current window position x (valid with step_valid or flush)
  output logic [ROW_W-1:0]  pos_row,
  output logic [COL_W-1:0]  pos_col
);

  localparam int unsigned POS_ROWS = IMG_ROWS - W_ROWS + 1;
  localparam int unsigned POS_COLS = IMG_COLS - W_COLS + 1;

  logic [ROW_W-1:0] wr;
  logic [COL_W-1:0] wc;
  logic             in_flush;

  initial begin
    assert (IMG_ROWS >= W_ROWS && IMG_COLS >= W_COLS)
      else $error("tmo_scan_ctrl: window larger than image");
  end

  assign step_valid = busy && !in_flush;
  assign flush      = busy && in_flush;
  assign img_addr   = ADDR_W'((32'(pos_row) + 32'(wr)) * IMG_COLS + 32'(pos_col) + 32'(wc));
  assign done       = flush && (32'(pos_row) == POS_ROWS - 1) && (32'(pos_col) == POS_COLS - 1);
  assign win_idx    = IDX_W'(32'(wr) * W_COLS + 32'(wc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      in_flush <= 1'b0;
      pos_row  <= '0;
      pos_col  <= '0;
      wr       <= '0;
      wc       <= '0;
    end else begin
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          in_flush <= 1'b0;
          pos_row  <= '0;
          pos_col  <= '0;
          wr       <= '0;
          wc       <= '0;
        end
      end else if (in_flush) begin
        // closing clock of this position: move to the next one
        in_flush <= 1'b0;
        if (32'(pos_col) == POS_COLS - 1) begin
          pos_col <= '0;
          if (32'(pos_row) == POS_ROWS - 1) begin
            pos_row <= '0;
            busy    <= 1'b0;
          end else begin
            pos_row <= pos_row + 1'b1;
          end
        end else begin
          pos_col <= pos_col + 1'b1;
        end
      end else begin
        if (32'(wc) == W_COLS - 1) begin
          wc <= '0;
          if (32'(wr) == W_ROWS - 1) begin
            wr       <= '0;
            in_flush <= 1'b1;
          end else begin
            wr <= wr + 1'b1;
          end
        end else begin
          wc <= wc + 1'b1;
        end
      end
    end
  end
endmodule
