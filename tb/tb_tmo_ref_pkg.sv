// tb_tmo_ref_pkg - reference model of the template-matching operator for the
// testbenches, written directly from the definitions:
//   f_W-(w) = clamp(f_W(w) + c1), f_W+(w) = clamp(f_W(w) + c2)
//   phi(x)  = #{ i : f_W-(w_i) <= g(x+w_i) <= f_W+(w_i) }
//   h       = 1 if phi(x) >= l for some x
// The image and the pattern are flat row-major int arrays held here.
package tb_tmo_ref_pkg;

  int img[];
  int pat[];

  function automatic int clamp_px(int v, int m);
    return (v < 0) ? 0 : (v > m) ? m : v;
  endfunction

  function automatic int phi_ref(int c1, int c2, int m,
                                 int img_cols, int w_rows, int w_cols, int r, int c);
    int s = 0;
    for (int wr = 0; wr < w_rows; wr++)
      for (int wc = 0; wc < w_cols; wc++) begin
        int g  = img[(r + wr) * img_cols + c + wc];
        int f  = pat[wr * w_cols + wc];
        int lo = clamp_px(f + c1, m);
        int hi = clamp_px(f + c2, m);
        if (g >= lo && g <= hi) s++;
      end
    return s;
  endfunction

endpackage
