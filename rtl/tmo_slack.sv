// tmo_slack - slack pattern generator, equations (1) and (2) of the operator.
//
// For one pattern pixel f_W(w_i) it forms the two bounds of the inexact match
//   f_W-(w_i) = max(0, min(m, f_W(w_i) + c1))
//   f_W+(w_i) = max(0, min(m, f_W(w_i) + c2))
// with m = 2**PIX_W - 1 and signed offsets c1 <= c2. c1 = c2 = 0 gives the
// exact match. The unit is purely combinational; it sits on the pattern load
// path so that the erosion and anti-dilation buffers receive the clamped
// bounds directly. The width of the offsets (PIX_W+1 bits, two's complement)
// is this design's choice.
module tmo_slack #(
  parameter int unsigned PIX_W = 8
) (
  input  logic [PIX_W-1:0]        f_w,     // representative pattern pixel
  input  logic signed [PIX_W:0]   c1,      // lower slack offset
  input  logic signed [PIX_W:0]   c2,      // upper slack offset
  output logic [PIX_W-1:0]        f_lo,    // f_W-  (to fw1)
  output logic [PIX_W-1:0]        f_hi     // f_W+  (to fw2)
);

  localparam int signed M = (1 << PIX_W) - 1;

  function automatic logic [PIX_W-1:0] clamp_add(logic [PIX_W-1:0] f, logic signed [PIX_W:0] c);
    logic signed [PIX_W+2:0] s;
    s = $signed({3'b000, f}) + (PIX_W+3)'(c);
    if (s < 0)                    return '0;
    else if (s > (PIX_W+3)'(M))   return PIX_W'(M);
    else                          return s[PIX_W-1:0];
  endfunction

  always_comb begin
    f_lo = clamp_add(f_w, c1);
    f_hi = clamp_add(f_w, c2);
  end

endmodule
