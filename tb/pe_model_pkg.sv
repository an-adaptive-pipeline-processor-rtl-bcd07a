// pe_model_pkg: reference model of one processor element, used by the PE and
// pipeline testbenches.  It works on whole pixel streams with plain integer
// arithmetic: the 3x3 neighbourhood of stream index j is j + (row-1)*L +
// (col-1) (lines wrap into each other as in the hardware; pixels before the
// start of the stream read as 0), each mask is applied, the two sums are
// combined, divided, limited to 0..255, thresholded and inverted.
package pe_model_pkg;
  import pe_pkg::*;

  typedef byte unsigned stream_t[];

  function automatic longint at(const ref stream_t s, input longint idx);
    if (idx < 0 || idx >= longint'(s.size())) return 0;
    return longint'(s[idx]);
  endfunction

  function automatic longint isqrt_ref(input longint x);
    longint r;
    r = longint'($floor($sqrt(real'(x))));
    while (r * r > x) r--;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  // Value of the operator stage (before scaling) for centre index j.
  // In hexagonal mode (c.hex) the masks' rows 0 and 2 act one column
  // further right on odd lines; FR is the frame length, L the line length.
  function automatic longint op_ref(input pe_cfg_t c, const ref stream_t s,
                                    input longint j, input int L, input int FR = 0);
    longint a, b, p, r;
    int sh;
    a = 0; b = 0;
    sh = (c.hex && FR > 0 && ((j % FR) / L) % 2 == 1) ? 1 : 0;
    for (int k = 0; k < 9; k++) begin
      if (sh == 1 && k / 3 != 1 && k % 3 == 2) continue;   // moved out of the window
      p = at(s, j + longint'(k / 3 - 1) * L + longint'(k % 3 - 1)
                  + ((k / 3 != 1) ? longint'(sh) : 0));
      a += p * longint'(c.mask_a[k]);
      b += p * longint'(c.mask_b[k]);
    end
    case (c.op)
      OP_PASS_A: r = a;
      OP_PASS_B: r = b;
      OP_ADD:    r = a + b;
      OP_SUB:    r = a - b;
      OP_MAG:    r = isqrt_ref(a * a + b * b);
      OP_MIN:    r = (a < b) ? a : b;
      OP_MAX:    r = (a > b) ? a : b;
      default:   r = (a < 0) ? -a : a;
    endcase
    return r;
  endfunction

  function automatic byte unsigned pe_ref(input pe_cfg_t c, const ref stream_t s,
                                          input longint j, input int L, input int FR = 0);
    longint r, d;
    r = op_ref(c, s, j, L, FR);
    d = (c.divisor == 0) ? 1 : longint'(c.divisor);
    if (r < 0) r = 0;
    r = r / d;
    if (r > 255) r = 255;
    if (c.thr_en) r = (r >= longint'(c.threshold)) ? 255 : 0;
    if (c.inv_en) r = 255 - r;
    return byte'(r);
  endfunction

  // Whole stream through one PE.
  function automatic stream_t pe_stream(input pe_cfg_t c, const ref stream_t s, input int L,
                                        input int FR = 0);
    stream_t o;
    o = new[s.size()];
    for (longint j = 0; j < s.size(); j++) o[j] = pe_ref(c, s, j, L, FR);
    return o;
  endfunction

  // Configuration helpers.
  function automatic pe_cfg_t cfg_gauss();
    pe_cfg_t c;
    int m[9] = '{1, 2, 1, 2, 4, 2, 1, 2, 1};
    c = null_cfg();
    for (int k = 0; k < 9; k++) c.mask_a[k] = coef_t'(m[k]);
    c.divisor = 8'd16;
    return c;
  endfunction

  function automatic pe_cfg_t cfg_sobel(input int div, input int thr, input bit thr_en, input bit inv);
    pe_cfg_t c;
    int h[9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
    int v[9] = '{-1, -2, -1, 0, 0, 0, 1, 2, 1};
    c = null_cfg();
    for (int k = 0; k < 9; k++) begin
      c.mask_a[k] = coef_t'(h[k]);
      c.mask_b[k] = coef_t'(v[k]);
    end
    c.op        = OP_MAG;
    c.divisor   = 8'(div);
    c.threshold = 8'(thr);
    c.thr_en    = thr_en;
    c.inv_en    = inv;
    return c;
  endfunction

  // Ridge test: min(centre - one neighbour, centre - the opposite neighbour).
  // vertical = 0 compares with left/right, 1 with above/below.
  function automatic pe_cfg_t cfg_thin(input bit vertical, input int thr);
    pe_cfg_t c;
    c = '0;
    c.mask_a[4] = 8'sd1;
    c.mask_b[4] = 8'sd1;
    c.mask_a[vertical ? 1 : 3] = -8'sd1;
    c.mask_b[vertical ? 7 : 5] = -8'sd1;
    c.op        = OP_MIN;
    c.divisor   = 8'd1;
    c.threshold = 8'(thr);
    c.thr_en    = 1'b1;
    return c;
  endfunction
endpackage
