// pm_tb_pkg: reference model and error bookkeeping for the multiplier tests.
//
// pm_ref() computes the probabilistic product straight from its definition,
// independently of the RTL structure: the exact product of the operand high
// halves plus the compensation bit, placed above column N, and the low N
// columns filled with ORs of low-half operand bits:
//   column i >= N/2 : A[i-N/2] | B[i-N/2]
//   column N/2-1    : A[0] | B[0]
//   column i < N/2-1: A[N/2-2-i] | B[N/2-2-i]
// err_stats_t accumulates the error measures used to judge an approximate
// multiplier: error e = exact - approximate, its mean, the mean of |e|, the
// largest |e| and the mean relative error in percent.
package pm_tb_pkg;

  function automatic longint unsigned pm_ref(int n, longint unsigned a, longint unsigned b);
    int h;
    longint unsigned ah, bh, hi, lo;
    h  = n / 2;
    ah = a >> h;
    bh = b >> h;
    hi = ah * bh + ((a >> (h - 1)) & (b >> (h - 1)) & 1);
    lo = 0;
    for (int i = 0; i < n; i++) begin
      int src;
      if (i >= h) src = i - h;
      else if (i == h - 1) src = 0;
      else src = h - 2 - i;
      lo |= (((a >> src) | (b >> src)) & 1) << i;
    end
    return (hi << n) | lo;
  endfunction

  typedef struct {
    longint count;
    real    sum_e;
    real    sum_abs;
    real    max_abs;
    real    sum_pct;
    longint count_pct;
  } err_stats_t;

  function automatic void stats_clear(ref err_stats_t s);
    s.count = 0; s.sum_e = 0.0; s.sum_abs = 0.0; s.max_abs = 0.0;
    s.sum_pct = 0.0; s.count_pct = 0;
  endfunction

  function automatic void stats_add(ref err_stats_t s, input longint unsigned exact,
                                    input longint unsigned approx);
    real e, ae;
    e  = real'(exact) - real'(approx);
    ae = (e < 0.0) ? -e : e;
    s.count++;
    s.sum_e   += e;
    s.sum_abs += ae;
    if (ae > s.max_abs) s.max_abs = ae;
    if (exact != 0) begin
      s.sum_pct += 100.0 * ae / real'(exact);
      s.count_pct++;
    end
  endfunction

  function automatic void stats_print(string tag, err_stats_t s);
    $display("%s: samples=%0d mean_error=%0.2f mean_abs_error=%0.2f max_abs_error=%0.0f mean_rel_error=%0.2f%%",
             tag, s.count, s.sum_e / real'(s.count), s.sum_abs / real'(s.count), s.max_abs,
             (s.count_pct != 0) ? s.sum_pct / real'(s.count_pct) : 0.0);
  endfunction

endpackage
