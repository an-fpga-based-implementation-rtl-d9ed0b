// tb_ref_pkg: reference model of the B-ACOSD detector for the testbenches.
//
// Written independently of the RTL: logarithms come from the real-valued
// $ln, thresholds from real arithmetic rounded down, sorting from an
// insertion sort. It follows the algorithm as specified: censor X(N-k)
// while it exceeds (1-alpha_k) log X(1) + alpha_k log X(p), k < N-p; then
// target when log X0 > (1-beta_k) log X(1) + beta_k log X(N-k).
package tb_ref_pkg;

  localparam int N = 16;
  localparam int P = 12;
  localparam int LOGF = 256;     // 2^fraction bits of a log
  localparam int DEPTH = 2000;   // log table entries

  // coefficients as published, scaled by 2^12 and rounded
  function automatic int alpha_q(int k);
    real a [4] = '{2.596, 2.038, 1.709, 1.443};
    return $rtoi(a[k] * 4096.0 + 0.5);
  endfunction
  function automatic int beta_q(int k);
    real b [5] = '{1.635, 1.889, 2.12, 2.37, 2.64};
    return $rtoi(b[k] * 4096.0 + 0.5);
  endfunction

  // floor(log2(x) * 256) of the sample code, clamped to 1 .. DEPTH-1
  function automatic int ref_log(int x);
    if (x < 1) x = 1;
    if (x > DEPTH - 1) x = DEPTH - 1;
    return $rtoi($floor($ln(real'(x)) / $ln(2.0) * LOGF + 1e-7));
  endfunction

  // l1 + floor((lx - l1) * c / 4096)
  function automatic int ref_thr(int l1, int lx, int c);
    return l1 + $rtoi($floor(real'(lx - l1) * real'(c) / 4096.0));
  endfunction

  typedef int vec_t [N];

  function automatic vec_t ref_sort(vec_t v);
    vec_t s = v;
    for (int i = 1; i < N; i++) begin
      int t = s[i];
      int j = i - 1;
      while (j >= 0 && s[j] > t) begin
        s[j+1] = s[j];
        j--;
      end
      s[j+1] = t;
    end
    return s;
  endfunction

  // number of censored interferers for a sorted vector
  function automatic int ref_k(vec_t s);
    int l1 = ref_log(s[0]);
    int lp = ref_log(s[P-1]);
    int k = 0;
    while (k < N - P && ref_log(s[N-1-k]) > ref_thr(l1, lp, alpha_q(k))) k++;
    return k;
  endfunction

  // full decision for one cell: unsorted reference cells and X0
  function automatic bit ref_target(vec_t refc, int x0, output int k);
    vec_t s = ref_sort(refc);
    k = ref_k(s);
    return ref_log(x0) > ref_thr(ref_log(s[0]), ref_log(s[N-1-k]), beta_q(k));
  endfunction

endpackage
