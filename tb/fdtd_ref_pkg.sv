// fdtd_ref_pkg: software model of one FDTD iteration for the testbenches.
//
// The grid is an array of cells indexed y*n + x (scan order). One
// iteration first updates Ez everywhere except on the outer edges (Eq. 1),
// then Hx except in the top row (Eq. 2) and Hy except in the right-most
// column (Eq. 3) from the new Ez, evaluating each equation left to right
// with the reference single-precision operations of fp_ref_pkg.
package fdtd_ref_pkg;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;

  function automatic void iterate(ref cell_t g[], input int n, input coef_t c);
    fp32_t ez_new[];
    ez_new = new[n * n];
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++) begin
        int p = y * n + x;
        if (x == 0 || y == 0 || x == n - 1 || y == n - 1)
          ez_new[p] = g[p].ez;
        else
          ez_new[p] = fadd(fsub(g[p].ez, fmul(c.c1, fsub(g[p].hx, g[p-n].hx))),
                           fmul(c.c2, fsub(g[p].hy, g[p-1].hy)));
      end
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++) begin
        int p = y * n + x;
        g[p].ez = ez_new[p];
        if (y != n - 1) g[p].hx = fsub(g[p].hx, fmul(c.c3, fsub(ez_new[p+n], ez_new[p])));
        if (x != n - 1) g[p].hy = fsub(g[p].hy, fmul(c.c4, fsub(ez_new[p+1], ez_new[p])));
      end
  endfunction

  // A random starting field: values of magnitude 2^-4 .. 2^4, both signs,
  // with the Ez edges at zero.
  function automatic void init_grid(ref cell_t g[], input int n);
    g = new[n * n];
    for (int p = 0; p < n * n; p++) begin
      int x = p % n, y = p / n;
      g[p].ez = rand_f(4);
      g[p].hx = rand_f(4);
      g[p].hy = rand_f(4);
      if (x == 0 || y == 0 || x == n - 1 || y == n - 1) g[p].ez = '0;
    end
  endfunction
endpackage
