// Reference model for the testbenches: 4x4 Hadamard transform computed by
// plain matrix products, independent of the butterfly structure of the RTL.
// The +/-1 Sylvester matrix is built by the recursion
//   S_0 = [1],  S_m = [S_{m-1} S_{m-1}; S_{m-1} -S_{m-1}],
// and the result is Y = floor((S*X*S) / 4), X and Y in row-major order.
package tb_had_ref_pkg;

  typedef int blk_t [16];

  function automatic void sylvester(output int s [4][4]);
    s[0][0] = 1;
    for (int n = 1; n < 4; n = n * 2)
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          s[i][j+n]   =  s[i][j];
          s[i+n][j]   =  s[i][j];
          s[i+n][j+n] = -s[i][j];
        end
  endfunction

  function automatic blk_t hadamard_ref(input blk_t x);
    int   s [4][4];
    int   t [4][4];
    blk_t y;
    int   acc;
    sylvester(s);
    for (int i = 0; i < 4; i++)
      for (int c = 0; c < 4; c++) begin
        t[i][c] = 0;
        for (int j = 0; j < 4; j++) t[i][c] += x[4*i+j] * s[j][c];
      end
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        acc = 0;
        for (int i = 0; i < 4; i++) acc += s[r][i] * t[i][c];
        y[4*r+c] = acc >>> 2;
      end
    return y;
  endfunction

  // A random sample of `w` bits, two's complement; every fourth block uses
  // the extreme values to exercise the widest sums.
  function automatic int rand_sample(input int w, input int blk);
    int lo, hi;
    lo = -(1 << (w - 1));
    hi = (1 << (w - 1)) - 1;
    case (blk % 4)
      1:       return (($urandom % 2) != 0) ? hi : lo;
      2:       return lo;
      default: return lo + int'($urandom % (1 << w));
    endcase
  endfunction

endpackage
