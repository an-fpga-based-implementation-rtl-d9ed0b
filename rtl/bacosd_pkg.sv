// bacosd_pkg: sizes, number formats and threshold coefficients shared by the
// B-ACOSD CFAR detector.
//
// The detector works on 16-bit samples, N = 16 reference cells, p = 12 and
// one guard cell on each side of the cell under test, the configuration the
// design is built around. Logarithms are base 2, unsigned fixed point with
// LOG_FRAC fraction bits. Because every threshold is a weighted mean of two
// logs whose weights sum to one, the base of the logarithm and the scale of
// a sample (one code step of the input) cancel out of every comparison, so
// log2 of the integer sample code is used throughout.
//
// The censoring coefficients alpha_k and the detection coefficients beta_k
// are the published values for (N,p) = (16,12), Pfa = 0.001, Pfc = 0.01,
// stored as round(c * 2^COEF_FRAC):
//   alpha = 2.596 2.038 1.709 1.443           (tests k = 0..3)
//   beta  = 1.635 1.889 2.12  2.37  2.64      (k = 0..4 interferers found)
// The table column "k = 1" holds the coefficient of the first test, k = 0.
package bacosd_pkg;

  parameter int unsigned DATA_W    = 16;  // sample width
  parameter int unsigned N_REF     = 16;  // reference cells
  parameter int unsigned P_RANK    = 12;  // rank p of X(p)
  parameter int unsigned N_GUARD   = 2;   // guard cells, half on each side
  parameter int unsigned N_CELLS   = 256; // samples per run

  parameter int unsigned LUT_DEPTH = 2000; // log table entries
  parameter int unsigned LUT_AW    = 11;   // log table address width
  parameter int unsigned LOG_FRAC  = 8;    // fraction bits of a log
  parameter int unsigned LOG_W     = 12;   // unsigned log width (4.8)
  parameter int unsigned THR_W     = LOG_W + 4; // signed threshold width

  parameter int unsigned COEF_W    = 16;   // unsigned coefficient width
  parameter int unsigned COEF_FRAC = 12;   // coefficient fraction bits

  parameter int unsigned N_CENS    = N_REF - P_RANK; // censoring tests

  typedef logic [DATA_W-1:0]  sample_t;
  typedef logic [LOG_W-1:0]   log_t;
  typedef logic signed [THR_W-1:0] thr_t;
  typedef logic [COEF_W-1:0]  coef_t;

  parameter coef_t ALPHA [N_CENS]   = '{16'd10633, 16'd8348, 16'd7000, 16'd5911};
  parameter coef_t BETA  [N_CENS+1] = '{16'd6697, 16'd7737, 16'd8684, 16'd9708, 16'd10813};

  // floor(log2(x) * 2^LOG_FRAC) for x >= 1, by normalising x to [1,2) and
  // squaring the mantissa once per fraction bit. x = 0 is treated as 1.
  function automatic log_t log2_fix(input int unsigned x);
    int unsigned e;
    longint unsigned m;
    log_t r;
    if (x == 0) x = 1;
    e = 0;
    for (int i = 0; i < 32; i++) if (x >> i != 0) e = i;
    m = longint'(x) << (30 - e);          // mantissa, 1.30 fixed point
    r = log_t'(e << LOG_FRAC);
    for (int b = LOG_FRAC - 1; b >= 0; b--) begin
      m = (m * m) >> 30;
      if (m >= (64'd2 << 30)) begin
        m = m >> 1;
        r[b] = 1'b1;
      end
    end
    return r;
  endfunction

endpackage
