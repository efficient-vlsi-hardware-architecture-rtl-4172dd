// dbs_ref_pkg - software reference of quick DBS for the testbenches.
//
// Works directly from the cost-change formula with the halftone in gray
// units (a0, a1 = +-255), in 64-bit integers, without the hardware's
// scaling or shift-and-add: the error table is built by direct convolution
// of e = 255*g - f with the 13x13 mask (zero outside the image), pixels are
// visited in raster order, the toggle is tried first and then the eight
// swaps in raster order, and the first strictly smallest negative change is
// applied. Passes repeat until one changes nothing.
package dbs_ref_pkg;
  import dbs_pkg::*;

  class dbs_ref;
    int     w, h;
    bit     g [];
    int     f [];
    longint cep [];
    int     iters, updates, toggles, swaps;

    function new(int w_, int h_);
      w = w_;
      h = h_;
      g = new[w * h];
      f = new[w * h];
      cep = new[w * h];
    endfunction

    function bit inside_img(int y, int x);
      return y >= 0 && y < h && x >= 0 && x < w;
    endfunction

    function longint c(int dm, int dn);
      return longint'(cpp(dm, dn));
    endfunction

    function void build();
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) begin
          longint acc;
          acc = 0;
          for (int i = -6; i <= 6; i++)
            for (int j = -6; j <= 6; j++)
              if (inside_img(y + i, x + j))
                acc += longint'((g[(y+i)*w + x+j] ? 255 : 0) - f[(y+i)*w + x+j]) * c(i, j);
          cep[y*w + x] = acc;
        end
    endfunction

    // Adds a * c_pp[m-y0, n-x0] to the table (a in gray units).
    function void add_mask(int y0, int x0, longint a);
      for (int i = -6; i <= 6; i++)
        for (int j = -6; j <= 6; j++)
          if (inside_img(y0 + i, x0 + j))
            cep[(y0+i)*w + x0+j] += a * c(i, j);
    endfunction

    // One pass over the image; accepted changes are counted in toggles and
    // swaps.
    function void pass();
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) begin
          longint a0, best;
          int bk;
          a0 = g[y*w + x] ? -255 : 255;
          best = (a0 * a0) * c(0, 0) + 2 * a0 * cep[y*w + x];
          bk = 4;
          for (int k = 0; k < 9; k++) begin
            int y1, x1;
            y1 = y + k / 3 - 1;
            x1 = x + k % 3 - 1;
            if (k != 4 && inside_img(y1, x1) && g[y1*w + x1] != g[y*w + x]) begin
              longint a1, d;
              a1 = -a0;
              d = (a0*a0 + a1*a1) * c(0, 0) + 2 * a0 * a1 * c(y1 - y, x1 - x)
                          + 2 * a0 * cep[y*w + x] + 2 * a1 * cep[y1*w + x1];
              if (d < best) begin
                best = d;
                bk = k;
              end
            end
          end
          if (best < 0) begin
            g[y*w + x] = !g[y*w + x];
            add_mask(y, x, a0);
            if (bk != 4) begin
              int y1, x1;
              y1 = y + bk / 3 - 1;
              x1 = x + bk % 3 - 1;
              g[y1*w + x1] = !g[y1*w + x1];
              add_mask(y1, x1, -a0);
              swaps++;
            end else begin
              toggles++;
            end
          end
        end
    endfunction

    function void run(int max_iters);
      int n;
      iters = 0;
      updates = 0;
      toggles = 0;
      swaps = 0;
      build();
      do begin
        n = toggles + swaps;
        pass();
        n = toggles + swaps - n;
        iters++;
        updates += n;
      end while (n != 0 && iters < max_iters);
    endfunction
  endclass

endpackage
