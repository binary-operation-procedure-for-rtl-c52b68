// thin_ref_pkg - software reference of the parallel thinning procedure,
// used by the testbenches to compute expected images.
//
// It evaluates the deletion rule directly on each 3x3 window, in its
// original single-window form:
//   X1..X8  = differences of consecutive neighbours P1..P8 around the centre
//   X9..X12 = differences of the centre with P1, P3, P5, P7
//   Fa  = OR over i of Xi.X(i+1) (X9 wraps to X1)     -- consecutive discontinuities
//   Fb  = (X9^X11) | (X10^X12)
//   Fc1 = X10 | X11 | X9.X12,   Fc2 = X9 | X12 | X10.X11
//   delete P if P & ~Fa & Fb & Fc (Fc1 in the first, Fc2 in the second
//   sub-iteration), all pixels decided from the same old image.
// Outside the image everything is background. P1 is north, P3 east, P5
// south and P7 west of the centre; P2, P4, P6, P8 are the corners between.
// The circuit uses the reformulated condition ~Fd.~Fe.Fb, which is
// equivalent to ~Fa.Fb, so this model is independent of that decomposition.
package thin_ref_pkg;

  localparam int MAXN = 258;
  typedef bit img_t [MAXN][MAXN];

  typedef struct {
    int deleted;      // pixels reset in this sub-iteration
    int kept_fc;      // edge pixels (~Fa & Fb) kept only because Fc = 0
    int kept_fa;      // 1-pixels kept as skeleton (Fa = 1, Fb = 1)
    int kept_inner;   // 1-pixels with Fb = 0 (inside a region or isolated)
  } stats_t;

  function automatic bit px(const ref img_t im, input int rows, input int cols,
                            input int r, input int c);
    if (r < 0 || c < 0 || r >= rows || c >= cols) return 1'b0;
    return im[r][c];
  endfunction

  // One sub-iteration in place; second = 0 uses Fc1, 1 uses Fc2.
  function automatic void sub_iter(ref img_t im, input int rows, input int cols,
                                   input bit second, inout stats_t st);
    img_t nxt;
    bit p;
    bit nb [1:8];
    bit x [1:12];
    bit fa, fb, fc;
    nxt = im;
    for (int r = 0; r < rows; r++) begin
      for (int c = 0; c < cols; c++) begin
        p     = px(im, rows, cols, r, c);
        nb[1] = px(im, rows, cols, r - 1, c);
        nb[2] = px(im, rows, cols, r - 1, c + 1);
        nb[3] = px(im, rows, cols, r,     c + 1);
        nb[4] = px(im, rows, cols, r + 1, c + 1);
        nb[5] = px(im, rows, cols, r + 1, c);
        nb[6] = px(im, rows, cols, r + 1, c - 1);
        nb[7] = px(im, rows, cols, r,     c - 1);
        nb[8] = px(im, rows, cols, r - 1, c - 1);
        for (int i = 1; i <= 8; i++) x[i] = nb[i] ^ nb[(i % 8) + 1];
        x[9]  = p ^ nb[1];
        x[10] = p ^ nb[3];
        x[11] = p ^ nb[5];
        x[12] = p ^ nb[7];
        fa = 1'b0;
        for (int i = 1; i <= 8; i++) fa |= x[i] & x[(i % 8) + 1];
        fb = (x[9] ^ x[11]) | (x[10] ^ x[12]);
        fc = second ? (x[9] | x[12] | (x[10] & x[11]))
                    : (x[10] | x[11] | (x[9] & x[12]));
        if (p) begin
          if (!fb)             st.kept_inner++;
          else if (fa)         st.kept_fa++;
          else if (!fc)        st.kept_fc++;
          else begin
            st.deleted++;
            nxt[r][c] = 1'b0;
          end
        end
      end
    end
    im = nxt;
  endfunction

endpackage
