// tmo_accumulator - the phi operator: sup-generating terms and their sum,
// equations (5) and (6).
//
// Each element clock it forms lambda^i = eps^i AND delta^ai (the pixel lies
// inside [f_W-(w_i), f_W+(w_i)]) and adds it to a running count. On the
// closing clock of a window position (flush) the count is handed out as
// phi(x), a value from 0 to N_WIN, and the count restarts from zero. phi(x)
// is thus the number of window pixels that match the pattern within its
// slack, a correlation-like similarity measure computed without products.
//
// Timing: in_valid/ero_bit/ad_bit and flush arrive on the clocks the
// comparators deliver them; phi_valid is registered, one clock after flush,
// and carries the window position and the last-position flag given with the
// flush. flush and in_valid are never high together.
module tmo_accumulator #(
  parameter int unsigned N_WIN = 48 * 26,
  parameter int unsigned PHI_W = $clog2(N_WIN + 1),
  parameter int unsigned ROW_W = 7,
  parameter int unsigned COL_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             ero_bit,    // erosion   eps^i
  input  logic             ad_bit,     // anti-dil. delta^ai
  input  logic             flush,      // closing clock of position x
  input  logic             flush_last, // ... of the last position of the scan
  input  logic [ROW_W-1:0] flush_row,
  input  logic [COL_W-1:0] flush_col,
  output logic             phi_valid,
  output logic [PHI_W-1:0] phi,
  output logic             phi_last,
  output logic [ROW_W-1:0] phi_row,
  output logic [COL_W-1:0] phi_col
);

  logic [PHI_W-1:0] acc;
  logic             lambda;

  assign lambda = ero_bit & ad_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      phi_valid <= 1'b0;
      phi       <= '0;
      phi_last  <= 1'b0;
      phi_row   <= '0;
      phi_col   <= '0;
    end else begin
      phi_valid <= flush;
      phi_last  <= flush && flush_last;
      if (flush) begin
        phi     <= acc;
        phi_row <= flush_row;
        phi_col <= flush_col;
        acc     <= '0;
      end else if (in_valid) begin
        acc <= acc + PHI_W'(lambda);
      end
    end
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(flush && in_valid))
    else $error("tmo_accumulator: flush and element in the same clock");

endmodule
