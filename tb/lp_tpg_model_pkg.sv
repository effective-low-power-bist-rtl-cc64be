// Reference model of the low power test pattern generator, for testbenches.
// It reproduces the pattern sequence from the specification alone: code k of
// 2^(XSW+YSW) is the Gray code k ^ (k >> 1); its high XSW bits are repeated
// across X and its low YSW bits across Y; the slices are reloaded one per
// step, Y slices from the least significant up and then X slices, after
// which the next code begins. It also gives the signature of a self-test:
// the sum, modulo 2^32, of the products of every vector.
package lp_tpg_model_pkg;

  class tpg_model;
    int unsigned n, xsw, ysw, nx, ny;
    int unsigned k;         // code index (binary)
    int unsigned s;         // next slice to load
    logic [31:0] x, y;

    function new(int unsigned n, int unsigned xsw, int unsigned ysw);
      this.n   = n;
      this.xsw = xsw;
      this.ysw = ysw;
      nx = (n + xsw - 1) / xsw;
      ny = (n + ysw - 1) / ysw;
      clear();
    endfunction

    function void clear();
      k = 0;
      s = 0;
      x = '0;
      y = '0;
    endfunction

    function int unsigned ne();
      return nx + ny;
    endfunction

    function int unsigned nvec();
      return (1 << (xsw + ysw)) * ne();
    endfunction

    // Load the next slice; returns 1 when this was the final load of a test.
    function bit step();
      int unsigned g;
      bit fin;
      g = k ^ (k >> 1);
      if (s < ny) begin
        for (int unsigned i = s * ysw; i < (s + 1) * ysw && i < n; i++)
          y[i] = g[i % ysw];
      end else begin
        for (int unsigned i = (s - ny) * xsw; i < (s - ny + 1) * xsw && i < n; i++)
          x[i] = g[ysw + i % xsw];
      end
      fin = (s == ne() - 1) && (k == (1 << (xsw + ysw)) - 1);
      if (s == ne() - 1) begin
        s = 0;
        k = (k + 1) % (1 << (xsw + ysw));
      end else begin
        s++;
      end
      return fin;
    endfunction

    // Signature of a complete self-test started from the cleared state.
    function logic [31:0] signature();
      logic [31:0] acc;
      clear();
      acc = '0;
      for (int unsigned v = 0; v < nvec(); v++) begin
        void'(step());
        acc += x * y;
      end
      clear();
      return acc;
    endfunction
  endclass

endpackage
