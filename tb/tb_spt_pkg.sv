// tb_spt_pkg: self-checking test of the SPT allocation functions.
//
// STEP 1 is compared with $countones for every 16-bit value. STEP 2 is
// compared, for every k, with a scan of all 2^16 values, for the standard
// coefficients and for random ones, and with the worked examples of the
// design (h(1) = 0x0012 and h(2) = 0x12C6 at several term counts, and
// 0x2819 cut to two terms). STEP 3 is compared with an exhaustive search of
// every split: the error must be the same minimum and the term count within
// the budget; for total budgets of 6, 14 and 20 terms the coefficients
// themselves are checked, the 20-term set against its published values.
module tb_spt_pkg;
  import spt_pkg::*;
  import spt_ref_pkg::*;

  int checks   = 0;
  int failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic coef_half_t pack_half(half_t h);
    return {h[3], h[2], h[1], h[0]};
  endfunction

  half_t       std_h, ref_h, rnd_h;
  best_tab_t   tab;
  coef_half_t  got;
  int unsigned ref_f;
  c16_t        x;

  initial begin
    // STEP 1
    for (int v = 0; v < 65536; v++)
      check(spt_count(coef_t'(v)) == $countones(v[15:0]), $sformatf("count %h", v));

    // STEP 2 worked examples
    check(spt_best(16'h0012, 0) == 16'h0000, "h1 SPT=0");
    check(spt_best(16'h0012, 1) == 16'h0010, "h1 SPT=1");
    check(spt_best(16'h0012, 2) == 16'h0012, "h1 SPT=2");
    check(spt_best(16'h12C6, 0) == 16'h0000, "h2 SPT=0");
    check(spt_best(16'h12C6, 1) == 16'h1000, "h2 SPT=1");
    check(spt_best(16'h12C6, 2) == 16'h1200, "h2 SPT=2");
    check(spt_best(16'h12C6, 3) == 16'h1300, "h2 SPT=3");
    check(spt_best(16'h12C6, 6) == 16'h12C6, "h2 SPT=6");
    check(spt_count(16'h2819) == 5, "0x2819 has 5 terms");
    check(spt_best(16'h2819, 2) == 16'h2800, "0x2819 cut to 2 terms");

    // STEP 2 against the full scan
    std_h = '{16'h0012, 16'h12C6, 16'h2D38, 16'h3FEC};
    for (int i = 0; i < 40; i++) begin
      x = (i < 4) ? std_h[i] : ((i == 4) ? 16'hFFFF : c16_t'($urandom));
      ref_best_table(x, tab);
      for (int k = 0; k <= 16; k++)
        check(spt_best(x, k) == tab[k], $sformatf("best %h k=%0d: %h vs %h", x, k, spt_best(x, k), tab[k]));
    end

    // STEP 3 against the exhaustive search
    check(STD_HALF == pack_half(std_h), "standard coefficients");
    for (int b = 0; b <= 34; b++) begin
      ref_allocate(std_h, b, ref_h, ref_f);
      got = spt_allocate(STD_HALF, b);
      check(spt_error(STD_HALF, got) == ref_f, $sformatf("F at budget %0d", b));
      check(spt_total(got) <= b, $sformatf("terms at budget %0d", b));
      if (b == 3 || b == 7 || b == 10)
        check(got == pack_half(ref_h), $sformatf("coefficients at budget %0d", b));
    end
    check(spt_allocate(STD_HALF, 10) == {16'h4000, 16'h2D40, 16'h12C0, 16'h0000},
          "SPT=20 coefficients");
    for (int r = 0; r < 4; r++) begin
      for (int n = 0; n < 4; n++) rnd_h[n] = c16_t'($urandom_range(0, 32'h7FFF));
      for (int b = 2; b <= 20; b += 6) begin
        ref_allocate(rnd_h, b, ref_h, ref_f);
        got = spt_allocate(pack_half(rnd_h), b);
        check(spt_error(pack_half(rnd_h), got) == ref_f, $sformatf("random F budget %0d", b));
        check(spt_total(got) <= b, $sformatf("random terms budget %0d", b));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
