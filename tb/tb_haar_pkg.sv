// tb_haar_pkg - reference model shared by the DWT testbenches.
//
// haar_ref transforms an N x N grey image in place, LEVELS levels, with
// the unnormalised Haar pair (low = (a+b)/2, high = a-b) on the rows and
// then the columns of the current low-low square. Values are kept as
// integers scaled by 2^(2*LEVELS), which is the fixed-point format of the
// hardware, so the expected words are exact. band_addr gives the address
// of the j-th word of the output stream (subband order LL, HL, LH, HH of
// the coarsest level, then HL, LH, HH of each finer level).
package tb_haar_pkg;

  function automatic void haar_ref(input int unsigned n, input int unsigned levels,
                                   input int pix[], output int coef[]);
    int tmp[];
    int s;
    coef = new[n * n];
    tmp  = new[n];
    foreach (pix[i]) coef[i] = pix[i] * (1 << (2 * levels));
    s = n;
    for (int l = 0; l < levels; l++) begin
      for (int r = 0; r < s; r++) begin
        for (int j = 0; j < s / 2; j++) begin
          tmp[j]       = (coef[r*n + 2*j] + coef[r*n + 2*j + 1]) / 2;
          tmp[s/2 + j] =  coef[r*n + 2*j] - coef[r*n + 2*j + 1];
        end
        for (int j = 0; j < s; j++) coef[r*n + j] = tmp[j];
      end
      for (int c = 0; c < s; c++) begin
        for (int j = 0; j < s / 2; j++) begin
          tmp[j]       = (coef[(2*j)*n + c] + coef[(2*j+1)*n + c]) / 2;
          tmp[s/2 + j] =  coef[(2*j)*n + c] - coef[(2*j+1)*n + c];
        end
        for (int j = 0; j < s; j++) coef[j*n + c] = tmp[j];
      end
      s = s / 2;
    end
  endfunction

  // address, subband (0 LL, 1 HL, 2 LH, 3 HH) and 0-based level of word j
  function automatic void band_addr(input int unsigned n, input int unsigned levels,
                                    input int unsigned j, output int unsigned addr,
                                    output int unsigned sb, output int unsigned lvl);
    int unsigned base = 0;
    int unsigned sz;
    int unsigned r0, c0, off;
    // coarsest LL
    sz = n >> levels;
    if (j < sz * sz) begin
      sb = 0; lvl = levels - 1;
      addr = (j / sz) * n + (j % sz);
      return;
    end
    base = sz * sz;
    for (int l = levels - 1; l >= 0; l--) begin
      sz = n >> (l + 1);
      for (int b = 1; b <= 3; b++) begin
        if (j < base + sz * sz) begin
          off = j - base;
          r0  = (b >= 2) ? sz : 0;
          c0  = (b != 2) ? sz : 0;
          sb = b; lvl = l;
          addr = (r0 + off / sz) * n + c0 + off % sz;
          return;
        end
        base += sz * sz;
      end
    end
    addr = 0; sb = 0; lvl = 0;
  endfunction

endpackage
