// tmo_pkg - shared constants and types of the thresholded template-matching
// operator (TTMO) pattern detector.
//
// The detector slides a W_ROWS x W_COLS window over an IMG_ROWS x IMG_COLS
// gray-level image and counts, at every window position, how many pixels fall
// inside the interval [f_W-(w_i), f_W+(w_i)] of a trained pattern. The default
// sizes are those of the reference Landsat run: a 116 x 131 pixel image searched
// for a 48 x 26 pixel pattern. The 8-bit pixel depth (gray scale K_m with
// m = 255) is this design's choice for ".jpg" satellite imagery.
//
// Timing: one window element is read per clock, plus one closing cycle per
// window position, so a full scan takes
//   (IMG_ROWS-W_ROWS+1)*(IMG_COLS-W_COLS+1)*(W_ROWS*W_COLS+1)
// clocks, followed by PIPE_LAT clocks of pipeline drain.
package tmo_pkg;

  // Defaults of the reference configuration.
  localparam int unsigned DEF_IMG_ROWS = 116;
  localparam int unsigned DEF_IMG_COLS = 131;
  localparam int unsigned DEF_W_ROWS   = 48;
  localparam int unsigned DEF_W_COLS   = 26;
  localparam int unsigned DEF_PIX_W    = 8;

  // Pipeline drain: the done pulse rises at the clock edge that lies
  // scan_cycles() + PIPE_LAT edges after the edge that sampled start. The
  // closing clock of the last position passes two alignment registers (the
  // buffer read and comparator stages of the data path), the accumulator
  // output register and the detection register; the first of these overlaps
  // the last scan clock.
  localparam int unsigned PIPE_LAT = 3;

  // Total scan cycles of equation (cycles = positions * (n + 1)).
  function automatic longint unsigned scan_cycles(int unsigned img_rows, int unsigned img_cols,
                                                  int unsigned w_rows, int unsigned w_cols);
    longint unsigned rows, cols, win;
    rows = longint'(img_rows) - longint'(w_rows) + 1;
    cols = longint'(img_cols) - longint'(w_cols) + 1;
    win  = longint'(w_rows) * longint'(w_cols) + 1;
    return rows * cols * win;
  endfunction

  // Which buffer a host write goes to.
  typedef enum logic [0:0] {
    LOAD_IMAGE   = 1'b0,
    LOAD_PATTERN = 1'b1
  } load_sel_e;

endpackage
