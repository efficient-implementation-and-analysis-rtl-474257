// tb_s2_model_pkg - reference model of Stage 2 for the testbenches:
// quantisation, thresholding and zero run-length tokens, written from the
// rules in the headers of quantizer, zero_threshold and rle_zero.
package tb_s2_model_pkg;

  function automatic int quant(input int c, input int sb, input int lvl, input int mode, input int frac);
    int sh, mag;
    sh = frac;
    if (sb != 0 && mode != 0) sh += mode * (1 + (lvl == 0 ? 1 : 0) + (sb == 3 ? 1 : 0));
    mag = (c < 0) ? -c : c;
    mag = mag / (1 << sh);
    return (c < 0) ? -mag : mag;
  endfunction

  function automatic int thresh(input int q, input int sb, input int mode);
    int t, mag;
    t = (sb == 0) ? 0 : (sb == 3 ? 2 * mode : mode);
    mag = (q < 0) ? -q : q;
    return (mag < t) ? 0 : q;
  endfunction

  // token packed as {eob, has_value, run[15:0], value[15:0]} in a longint
  function automatic longint tok(input bit eob, input bit hv, input int run, input int val);
    return (longint'(eob) << 33) | (longint'(hv) << 32) | (longint'(run & 16'hffff) << 16) |
           longint'(val & 16'hffff);
  endfunction

  function automatic void rle(input int v[], input int run_max, output longint toks[$]);
    int run = 0;
    toks.delete();
    foreach (v[i]) begin
      bit lst = (i == v.size() - 1);
      if (v[i] != 0) begin
        toks.push_back(tok(lst, 1, run, v[i]));
        run = 0;
      end else if (lst || run + 1 == run_max) begin
        toks.push_back(tok(lst, 0, run + 1, 0));
        run = 0;
      end else run++;
    end
  endfunction

endpackage
