// spt_ref_pkg: brute-force reference for the SPT allocation, used only by
// the testbenches.
//
// It follows the allocation literally and shares no code with the design:
// the closest value with at most k '1' digits is found by scanning all 2^16
// numbers (ties keep the smaller value), and the best split of a budget over
// the four independent coefficients of a symmetric 8-tap filter is found by
// trying every combination of per-coefficient term counts.
package spt_ref_pkg;

  typedef logic [15:0] c16_t;
  typedef c16_t        best_tab_t [17];
  typedef c16_t        half_t     [4];

  function automatic int unsigned absdist(int unsigned a, int unsigned b);
    return (a > b) ? a - b : b - a;
  endfunction

  // Closest value with at most k ones, for every k = 0..16.
  function automatic void ref_best_table(input c16_t x, output best_tab_t t);
    int unsigned bd [17];
    int unsigned c, d;
    for (int k = 0; k <= 16; k++) begin
      bd[k] = 32'hFFFF_FFFF;
      t[k]  = '0;
    end
    for (int v = 0; v < 65536; v++) begin
      c = $countones(v[15:0]);
      d = absdist(v, int'(x));
      for (int k = c; k <= 16; k++) begin
        if (d < bd[k]) begin
          bd[k] = d;
          t[k]  = c16_t'(v);
        end
      end
    end
  endfunction

  // Exhaustive split of `budget` terms over four coefficients.
  function automatic void ref_allocate(input half_t h, input int unsigned budget,
                                       output half_t r, output int unsigned f);
    best_tab_t   tab [4];
    int unsigned e;
    for (int n = 0; n < 4; n++) ref_best_table(h[n], tab[n]);
    f = 32'hFFFF_FFFF;
    for (int n = 0; n < 4; n++) r[n] = '0;
    for (int a = 0; a <= 16; a++)
      for (int b = 0; b <= 16; b++)
        for (int c = 0; c <= 16; c++)
          for (int d = 0; d <= 16; d++) begin
            if (a + b + c + d <= budget) begin
              e = absdist(int'(tab[0][a]), int'(h[0])) + absdist(int'(tab[1][b]), int'(h[1])) +
                  absdist(int'(tab[2][c]), int'(h[2])) + absdist(int'(tab[3][d]), int'(h[3]));
              if (e < f) begin
                f    = e;
                r[0] = tab[0][a];
                r[1] = tab[1][b];
                r[2] = tab[2][c];
                r[3] = tab[3][d];
              end
            end
          end
  endfunction

endpackage
