// tmo_antidilation - the antidilation operator of equation (4), with its pattern buffer (fw2).
//
// Computes, one window element per clock, the elementary anti-dilation delta^ai_l(g)(x) = 1 if g(x+w_i) <= l, with l = f_W+(w_i).
// The module owns buffer fw2, which holds the upper slack pattern f_W+, one
// word per window element in row-major order; the host fills it through the
// write port (normally from tmo_slack). It also performs the buffer access
// for the scan: the element index w_i arrives with in_valid at clock t, the
// buffer word is read at t+1 and compared with the image pixel g(x+w_i),
// which the image buffer delivers at t+1 as well, and the one-bit result is
// registered and valid at t+2 (out_valid). Splitting the work this way
// (shared scan counters, per-operator pattern buffer and comparator) is this
// design's choice.
module tmo_antidilation #(
  parameter int unsigned PIX_W = 8,
  parameter int unsigned N_WIN = 48 * 26,
  parameter int unsigned IDX_W = (N_WIN > 1) ? $clog2(N_WIN) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // pattern load port
  input  logic             pat_we,
  input  logic [IDX_W-1:0] pat_addr,
  input  logic [PIX_W-1:0] pat_data,
  // scan side
  input  logic             in_valid,   // clock t
  input  logic [IDX_W-1:0] in_idx,     // clock t: window element w_i
  input  logic [PIX_W-1:0] g_pix,      // clock t+1: g(x+w_i)
  output logic             out_valid,  // clock t+2
  output logic             out_bit     // clock t+2
);

  logic [PIX_W-1:0] bound;
  logic             valid_q;

  tmo_buffer #(.WIDTH(PIX_W), .DEPTH(N_WIN), .ADDR_W(IDX_W)) u_fw2 (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (pat_we),
    .wr_addr (pat_addr),
    .wr_data (pat_data),
    .rd_en   (in_valid),
    .rd_addr (in_idx),
    .rd_data (bound)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= 1'b0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      valid_q   <= in_valid;
      out_valid <= valid_q;
      if (valid_q) out_bit <= (g_pix <= bound);
    end
  end

endmodule
