// tmo_buffer - pixel buffer of the detector (the "image", "fw1" and "fw2"
// stores).
//
// A simple dual-port memory of DEPTH words of WIDTH bits: one write port used
// by the host to load an image or a slack pattern, and one read port used by
// the scan. The read is synchronous: rd_data holds mem[rd_addr] one clock after
// rd_en is sampled high, and keeps its value while rd_en is low, which maps the
// array onto FPGA block RAM. The memory itself has no reset; rd_data resets to
// zero. A read and a write of the same word in the same clock return the old
// word. The buffers' organisation (one word per pixel, addressed row-major)
// is this design's choice.
module tmo_buffer #(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned DEPTH  = 116 * 131,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // write port
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WIDTH-1:0]  wr_data,
  // read port
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WIDTH-1:0]  rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < DEPTH)) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      rd_data <= '0;
    else if (rd_en)  rd_data <= (32'(rd_addr) < DEPTH) ? mem[rd_addr] : '0;
  end

endmodule
