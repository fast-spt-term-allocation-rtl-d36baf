// spt_pkg: coefficient format and SPT-term allocation for the SPT FIR filter.
//
// A coefficient is an unsigned 16-bit fraction h = sum_{i=1..16} s_i * 2^-i
// (bit 15 weighs 2^-1, bit 0 weighs 2^-16). Its "SPT number" is the count of
// '1' digits, which is also the number of shifted copies of the input that a
// shift-and-add multiplier needs for it.
//
// The functions below turn a conventionally designed ("standard") filter into
// one whose coefficients use a fixed total budget of SPT terms. They are
// constant functions, evaluated while the filter is elaborated, so a filter
// instance is configured only by its standard coefficients and its budget:
//   STEP 1  spt_count    SPT number of any 16-bit value.
//   STEP 2  spt_best     closest value to a coefficient that uses at most k
//                        SPT terms, for error F = |h - h*|.
//   STEP 3  spt_allocate split of a budget among the coefficients that
//                        minimises F_total = sum_n |h(n) - h*(n)|.
// For a linear-phase filter only the first half of the taps is allocated and
// the other half mirrors it, so a total budget B over all taps is a budget of
// B/2 per half.
//
// Departures and choices of this implementation:
//  * STEP 2 does not scan all 2^16 numbers. The nearest value with at most k
//    ones is either the value truncated to its k leading ones or that value
//    plus its lowest kept one (the next larger value with at most k ones),
//    so only those two are compared. A tie keeps the smaller value.
//  * STEP 3 finds the same minimum as trying every split, but by dynamic
//    programming over (coefficient, terms used), which needs far fewer steps.
//    A split may use fewer terms than the budget when more cannot lower F.
//  * The standard coefficients are those of the 8-tap linear-phase filter
//    with a null at fs/4, written as 16-bit fractions. The centre pair
//    (0x3FEC) is the value that places that null exactly.
package spt_pkg;

  localparam int unsigned COEF_W    = 16;             // bits per coefficient
  localparam int unsigned NUM_TAPS  = 8;              // filter length m
  localparam int unsigned HALF_TAPS = NUM_TAPS / 2;   // allocated coefficients
  localparam int unsigned MAX_HALF_BUDGET = HALF_TAPS * COEF_W;

  typedef logic [COEF_W-1:0] coef_t;
  // Half of a symmetric impulse response, index 0 = outer tap h(1).
  typedef logic [HALF_TAPS-1:0][COEF_W-1:0] coef_half_t;

  // Standard filter h(1)..h(4) = 0.0003, 0.0733, 0.1767, 0.2497.
  localparam coef_half_t STD_HALF = {16'h3FEC, 16'h2D38, 16'h12C6, 16'h0012};

  // STEP 1: number of SPT terms ('1' digits) of a value.
  function automatic int unsigned spt_count(coef_t x);
    int unsigned n;
    n = 0;
    for (int i = 0; i < COEF_W; i++) n += int'(x[i]);
    return n;
  endfunction

  // Keep the k most significant '1' digits of x.
  function automatic coef_t spt_truncate(coef_t x, int unsigned k);
    coef_t       r;
    int unsigned n;
    r = '0;
    n = 0;
    for (int i = COEF_W - 1; i >= 0; i--) begin
      if (x[i] && n < k) begin
        r[i] = 1'b1;
        n++;
      end
    end
    return r;
  endfunction

  function automatic int unsigned abs_diff(int unsigned a, int unsigned b);
    return (a > b) ? a - b : b - a;
  endfunction

  // STEP 2: value with at most k SPT terms that is closest to x.
  function automatic coef_t spt_best(coef_t x, int unsigned k);
    coef_t           lo;
    coef_t           lsb;
    logic [COEF_W:0] hi;
    if (spt_count(x) <= k) return x;
    if (k == 0) return '0;
    lo  = spt_truncate(x, k);
    lsb = lo & (~lo + coef_t'(1));
    hi  = {1'b0, lo} + {1'b0, lsb};
    if (hi[COEF_W]) return lo;  // rounding up would leave the range
    if (abs_diff(int'(hi), int'(x)) < abs_diff(int'(x), int'(lo)))
      return hi[COEF_W-1:0];
    return lo;
  endfunction

  // Evaluation function (5) for a set of allocated coefficients.
  function automatic int unsigned spt_error(coef_half_t h_std, coef_half_t h_spt);
    int unsigned f;
    f = 0;
    for (int n = 0; n < HALF_TAPS; n++) f += abs_diff(int'(h_std[n]), int'(h_spt[n]));
    return f;
  endfunction

  // SPT terms used by a set of coefficients, counted over one half.
  function automatic int unsigned spt_total(coef_half_t h);
    int unsigned t;
    t = 0;
    for (int n = 0; n < HALF_TAPS; n++) t += spt_count(h[n]);
    return t;
  endfunction

  // STEP 3: best coefficients for a budget of `budget` SPT terms per half.
  // Tables are kept one-dimensional (row-major) so that every tool can
  // evaluate the function as a constant.
  localparam int unsigned KS = COEF_W + 1;            // k = 0..COEF_W
  localparam int unsigned BS = MAX_HALF_BUDGET + 1;   // s = 0..MAX_HALF_BUDGET

  function automatic coef_half_t spt_allocate(coef_half_t h_std, int unsigned budget);
    int unsigned err    [HALF_TAPS*KS];       // [n][k]
    coef_t       approx [HALF_TAPS*KS];       // [n][k]
    // cost[n][s]: least error of coefficients 0..n-1 using at most s terms
    int unsigned cost   [(HALF_TAPS+1)*BS];
    int unsigned choice [(HALF_TAPS+1)*BS];
    int unsigned b, s, c, k_sel;
    coef_half_t  h;
    b = (budget > MAX_HALF_BUDGET) ? MAX_HALF_BUDGET : budget;
    for (int n = 0; n < HALF_TAPS; n++) begin
      for (int k = 0; k <= COEF_W; k++) begin
        approx[n*KS+k] = spt_best(h_std[n], k);
        err[n*KS+k]    = abs_diff(int'(h_std[n]), int'(approx[n*KS+k]));
      end
    end
    for (int t = 0; t < BS; t++) begin
      cost[t]   = 0;
      choice[t] = 0;
    end
    for (int n = 0; n < HALF_TAPS; n++) begin
      for (int t = 0; t < BS; t++) begin
        cost[(n+1)*BS+t]   = cost[n*BS+t] + err[n*KS];
        choice[(n+1)*BS+t] = 0;
        for (int k = 1; k <= COEF_W && k <= t; k++) begin
          c = cost[n*BS+t-k] + err[n*KS+k];
          if (c < cost[(n+1)*BS+t]) begin
            cost[(n+1)*BS+t]   = c;
            choice[(n+1)*BS+t] = k;
          end
        end
      end
    end
    s = b;
    h = '0;
    for (int n = HALF_TAPS - 1; n >= 0; n--) begin
      k_sel = choice[(n+1)*BS+s];
      h     = h | (coef_half_t'(approx[n*KS+k_sel]) << (n * COEF_W));
      s     = s - k_sel;
    end
    return h;
  endfunction

  // Coefficient of tap t (0..NUM_TAPS-1) of the symmetric filter.
  function automatic coef_t tap_coef(coef_half_t h, int unsigned t);
    return (t < HALF_TAPS) ? h[t] : h[NUM_TAPS-1-t];
  endfunction

endpackage
