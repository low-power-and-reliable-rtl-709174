// tb_sub_model_pkg: reference models for the subtractor testbenches.
//
// Bit-level models written from the truth tables of the cells, not from the
// RTL: a 1-bit cell model, a ripple-borrow subtractor model with a number
// of approximate low bits, and a model of the non-restoring array divider
// that repeats its arithmetic row by row with integer operations where the
// row is exact. Integer kinds: 0 exact, 1 Proposed-1, 2 Proposed-2.
// Pattern codes: 0 vertical, 1 horizontal, 2 square, 3 triangular.
package tb_sub_model_pkg;

  // {bout, d} for input combination {x, y, bin}; tables list rows 111..000
  function automatic logic [1:0] cell_model(int kind, logic x, logic y, logic b);
    logic [7:0] tb_bout, tb_d;
    logic [2:0] idx;
    case (kind)
      1:       begin tb_bout = 8'b1000_1111; tb_d = 8'b1100_1111; end
      2:       begin tb_bout = 8'b1000_1111; tb_d = 8'b1010_1111; end
      default: begin tb_bout = 8'b1000_1110; tb_d = 8'b1001_0110; end
    endcase
    idx = {x, y, b};
    return {tb_bout[idx], tb_d[idx]};
  endfunction

  // n-bit a - b - bin; the depth lowest cells are of kind `kind`.
  // Returns {bout, diff} in the low n+1 bits.
  function automatic longint unsigned ripple(int n, int depth, int kind,
                                             longint unsigned a, longint unsigned b,
                                             logic bin);
    longint unsigned res = 0;
    logic br = bin;
    for (int i = 0; i < n; i++) begin
      logic [1:0] o;
      o = cell_model((i < depth) ? kind : 0, a[i], b[i], br);
      res[i] = o[0];
      br = o[1];
    end
    res[n] = br;
    return res;
  endfunction

  // approximate cells in row r of an n-row divider whose rows are w wide
  function automatic int depth_of_row(int pattern, int depth, int r, int n, int w);
    int k = n - 1 - r;  // rows below this one
    int d;
    if (pattern == 0)      d = depth;
    else if (pattern == 1) d = (k < depth) ? w : 0;
    else if (pattern == 2) d = (k < depth) ? depth : 0;
    else                   d = (depth - k > 0) ? depth - k : 0;
    return (d > w) ? w : d;
  endfunction

  // non-restoring division model: returns {remainder, quotient}, n bits each
  function automatic longint unsigned divide(int n, int pattern, int depth, int kind,
                                             longint unsigned dividend,
                                             longint unsigned divisor);
    int w = n + 1;
    longint unsigned mask_w = (64'd1 << w) - 1;
    longint unsigned mask_n = (64'd1 << n) - 1;
    longint unsigned p = dividend >> n;
    longint unsigned q = 0;
    longint unsigned rem;
    for (int r = 0; r < n; r++) begin
      logic neg = p[w-1];
      longint unsigned s = ((p << 1) | ((dividend >> (n - 1 - r)) & 1)) & mask_w;
      longint unsigned y = neg ? (~divisor & mask_w) : divisor;
      p = ripple(w, depth_of_row(pattern, depth, r, n, w), kind, s, y, neg) & mask_w;
      q[n-1-r] = ~p[w-1];
    end
    rem = p[w-1] ? ((p + divisor) & mask_n) : (p & mask_n);
    return (rem << n) | q;
  endfunction

  // exact non-restoring division: bit r of the result is 1 when the
  // partial remainder after row r is negative (bit n-1: the remainder needs
  // the final correction). Used to count add-back rows and corrections.
  function automatic longint unsigned negative_rows(int n, longint unsigned dividend,
                                                    longint unsigned divisor);
    longint signed p = longint'(dividend >> n);
    longint unsigned neg = 0;
    for (int r = 0; r < n; r++) begin
      p = 2 * p + longint'((dividend >> (n - 1 - r)) & 1);
      p = (r == 0 || !neg[r-1]) ? p - longint'(divisor) : p + longint'(divisor);
      neg[r] = (p < 0);
    end
    return neg;
  endfunction

endpackage
