// tb_ref_pkg: reference models for the multiplier testbenches, written
// independently of the RTL.
//
// ring_mul computes e = h*r + m in Z_q[x]/(x^n - x - 1) by schoolbook
// multiplication into a 2n-1 coefficient product, then folds the top
// coefficients down with x^k = x^(k-n+1) + x^(k-n) from the highest one. The
// cycle-count models count how many control codes the TPM-III and TPM-IV
// recodings of r produce, following the code tables of those multipliers.
package tb_ref_pkg;
  import ntru_pkg::*;

  function automatic int tval(trit_t t);
    case (t)
      TRIT_POS: return 1;
      TRIT_NEG: return -1;
      default:  return 0;
    endcase
  endfunction

  function automatic trit_t rand_trit(int pct_nonzero);
    if (int'($urandom_range(99)) >= pct_nonzero) return TRIT_ZERO;
    return ($urandom_range(1) == 1) ? TRIT_POS : TRIT_NEG;
  endfunction

  // e[k] = (h*r + m) mod (q, x^n - x - 1); all arrays have n entries
  function automatic void ring_mul(input int n, input int q, input int h[], input int r[],
                                   input int m[], output int e[]);
    longint p[];
    p = new[2 * n - 1];
    foreach (p[k]) p[k] = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        p[i + j] += longint'(h[i]) * r[j];
    for (int k = 2 * n - 2; k >= n; k--) begin
      p[k - n + 1] += p[k];
      p[k - n]     += p[k];
      p[k] = 0;
    end
    e = new[n];
    for (int k = 0; k < n; k++) begin
      longint v = (p[k] + longint'(m[k])) % longint'(q);
      if (v < 0) v += longint'(q);
      e[k] = int'(v);
    end
  endfunction

  // number of TPM-III codes: three zeros in a row -> one code, else one per coefficient
  function automatic int cycles3(input int r[], output int n_zero3);
    int i = 0, u = 0, n = r.size();
    n_zero3 = 0;
    while (i < n) begin
      if (i + 3 <= n && r[i] == 0 && r[i+1] == 0 && r[i+2] == 0) begin
        i += 3; n_zero3++;
      end else i += 1;
      u++;
    end
    return u;
  endfunction

  // number of TPM-IV codes; hist counts each code 0..7, tail = trailing 1 or 2 zeros left
  function automatic int cycles4(input int r[], ref int hist[8], output int tail);
    int i = 0, u = 0, n = r.size();
    tail = 0;
    while (i < n) begin
      int left = n - i;
      if (r[i] != 0) begin
        hist[r[i] > 0 ? 6 : 7]++; i += 1;
      end else if (left == 1) begin
        tail = 1; break;
      end else if (r[i+1] != 0) begin
        hist[r[i+1] > 0 ? 4 : 5]++; i += 2;
      end else if (left == 2) begin
        tail = 2; break;
      end else if (r[i+2] != 0) begin
        hist[r[i+2] > 0 ? 2 : 3]++; i += 3;
      end else if (left == 3 || r[i+3] != 0) begin
        hist[1]++; i += 3;
      end else begin
        hist[0]++; i += 4;
      end
      u++;
    end
    return u;
  endfunction
endpackage
