// tmo_psi - the detection operator psi_l of equation (7) and the detection
// output.
//
// Every phi(x) delivered by the accumulator is compared with the similarity
// level l (the matching condition): match pulses for each position with
// phi(x) >= l (the "pattern detection" signal), and h, the operator's result,
// is 1 if at least one position of the scan matched. h drives the detection
// LED: it is cleared when a scan starts and holds its value after the scan
// until the next one. The module also counts the matching positions and
// keeps the first one found and the highest phi of the scan; these status
// outputs are this design's additions for the host.
//
// Timing: match, match_row/col and done are registered one clock after
// phi_valid; done pulses with the result of the last position, and h/led
// are final from that clock on.
module tmo_psi #(
  parameter int unsigned N_WIN = 48 * 26,
  parameter int unsigned PHI_W = $clog2(N_WIN + 1),
  parameter int unsigned ROW_W = 7,
  parameter int unsigned COL_W = 8,
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,       // start of a scan
  input  logic [PHI_W-1:0] level,       // similarity level l
  input  logic             phi_valid,
  input  logic [PHI_W-1:0] phi,
  input  logic             phi_last,
  input  logic [ROW_W-1:0] phi_row,
  input  logic [COL_W-1:0] phi_col,
  output logic             match,       // phi(x) >= l for this position
  output logic [ROW_W-1:0] match_row,
  output logic [COL_W-1:0] match_col,
  output logic             h,           // psi_l(phi): pattern present
  output logic             led,         // detection LED
  output logic             done,        // scan result final
  output logic [CNT_W-1:0] match_count,
  output logic [ROW_W-1:0] first_row,   // first matching position
  output logic [COL_W-1:0] first_col,
  output logic [PHI_W-1:0] phi_max      // best similarity of the scan
);

  logic hit;
  assign hit = phi_valid && (phi >= level);
  assign led = h;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      match       <= 1'b0;
      match_row   <= '0;
      match_col   <= '0;
      h           <= 1'b0;
      done        <= 1'b0;
      match_count <= '0;
      first_row   <= '0;
      first_col   <= '0;
      phi_max     <= '0;
    end else begin
      match <= hit;
      done  <= phi_valid && phi_last;
      if (phi_valid) begin
        match_row <= phi_row;
        match_col <= phi_col;
      end
      if (clear) begin
        h           <= 1'b0;
        match_count <= '0;
        first_row   <= '0;
        first_col   <= '0;
        phi_max     <= '0;
      end else begin
        if (hit) begin
          h <= 1'b1;
          if (match_count != '1) match_count <= match_count + 1'b1;
          if (!h) begin
            first_row <= phi_row;
            first_col <= phi_col;
          end
        end
        if (phi_valid && phi > phi_max) phi_max <= phi;
      end
    end
  end

endmodule
