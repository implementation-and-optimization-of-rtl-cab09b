// intra_ref_pkg: reference model used by the testbenches.
//
// Straightforward integer formulas for the four intra prediction modes of an
// n x n block (n = 16 luma, n = 8 chroma), written directly from the
// prediction equations with ordinary multiplications, so that they share no
// structure with the shift-and-add / incremental hardware. Mode numbers:
// 0 vertical, 1 horizontal, 2 DC, 3 plane. Neighbour arrays hold T0..T15
// and L0..L15 (only the first n entries are used).
package intra_ref_pkg;

  typedef int nb_t [16];
  typedef int blk_t [256];

  function automatic int clip8(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  function automatic bit ref_ok(input int mode, input bit at, input bit al, input bit am);
    case (mode)
      0:       return at;
      1:       return al;
      2:       return 1'b1;
      default: return at && al && am;
    endcase
  endfunction

  function automatic int ref_pred(input int n, input int mode, input nb_t top,
                                  input nb_t left, input int lt, input bit at,
                                  input bit al, input int x, input int y);
    int k, st, sl, h, v, b, c, a, lg, tl, ll;
    k  = n / 2 - 1;
    lg = (n == 16) ? 4 : 3;
    case (mode)
      0: return top[x];
      1: return left[y];
      2: begin
        st = 0;
        sl = 0;
        for (int i = 0; i < n; i++) begin
          st += top[i];
          sl += left[i];
        end
        if (at && al) return (st + sl + n) / (2 * n);
        if (at)       return (st + n / 2) / n;
        if (al)       return (sl + n / 2) / n;
        return 128;
      end
      default: begin
        h = 0;
        v = 0;
        for (int i = 1; i <= n / 2; i++) begin
          tl = (k - i < 0) ? lt : top[k - i];
          ll = (k - i < 0) ? lt : left[k - i];
          h += i * (top[k + i] - tl);
          v += i * (left[k + i] - ll);
        end
        if (n == 16) begin
          b = (5 * h + 32) >>> 6;
          c = (5 * v + 32) >>> 6;
        end else begin
          b = (17 * h + 16) >>> 5;
          c = (17 * v + 16) >>> 5;
        end
        a = 16 * (top[n - 1] + left[n - 1]);
        return clip8((a + 16 + b * (x - k) + c * (y - k)) >>> 5);
      end
    endcase
    return lg; // not reached
  endfunction

  function automatic int ref_sad(input int n, input int mode, input blk_t orig,
                                 input nb_t top, input nb_t left, input int lt,
                                 input bit at, input bit al);
    int s, d;
    s = 0;
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++) begin
        d = orig[y * n + x] - ref_pred(n, mode, top, left, lt, at, al, x, y);
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  // minimum-SAD available mode, lower mode number on a tie
  function automatic void ref_choose(input int n, input blk_t orig, input nb_t top,
                                     input nb_t left, input int lt, input bit at,
                                     input bit al, input bit am,
                                     output int best, output int min_sad);
    int s;
    best    = -1;
    min_sad = 0;
    for (int m = 0; m < 4; m++) begin
      if (ref_ok(m, at, al, am)) begin
        s = ref_sad(n, m, orig, top, left, lt, at, al);
        if (best < 0 || s < min_sad) begin
          best    = m;
          min_sad = s;
        end
      end
    end
  endfunction

endpackage
