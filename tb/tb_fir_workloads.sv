// tb_fir_workloads: the three SPT budgets of the filter side by side.
//
// Three filters with 6, 14 and 20 SPT terms in total see the same stimulus.
// For each, the testbench derives the coefficient set by exhaustive search
// (spt_ref_pkg), checks that it uses the stated number of terms, and lets a
// scoreboard check every output and the latency. It then compares the three
// responses at fs/4, where the standard filter has its null. A tone
// A, 0, -A, 0, ... gives the output +-A * (h1 - h2 - h3 + h4): zero for the
// 20-term filter, A * 0x100 for the 14-term one (about -45 dB) and
// A * 0x1000 for the 6-term one (about -21 dB). At DC the
// 20-term filter keeps exact unity gain; the DC output of the others is the
// sum of their coefficients, and at fs/2 all three give zero, as any
// even-length symmetric filter does.
module tb_fir_workloads;
  import spt_ref_pkg::*;

  localparam int IN_W  = 8;
  localparam int OUT_W = 27;
  localparam int NCFG  = 3;
  localparam int SPT [NCFG] = '{6, 14, 20};

  logic                    clk = 1'b0;
  logic                    rst_n;
  logic                    in_valid;
  logic signed [IN_W-1:0]  x_in;
  logic                    out_valid [NCFG];
  logic signed [OUT_W-1:0] y_out     [NCFG];

  longint coef     [NCFG][8];
  int     mchecks  [NCFG];
  int     mfail    [NCFG];
  int     checks   = 0;
  int     failures = 0;

  always #5 clk = ~clk;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    fir_spt #(.IN_W(IN_W), .SPT_TOTAL(SPT[c])) dut (
      .clk, .rst_n, .in_valid, .x_in, .out_valid(out_valid[c]), .y_out(y_out[c])
    );
    fir_ref_monitor #(.IN_W(IN_W), .OUT_W(OUT_W), .LATENCY(2), .NAME($sformatf("spt%0d", SPT[c]))) mon (
      .clk, .rst_n, .in_valid, .x_in, .out_valid(out_valid[c]), .y_out(y_out[c]),
      .coef(coef[c]), .checks(mchecks[c]), .failures(mfail[c])
    );
  end

  function automatic int total_checks();
    int s = checks;
    for (int c = 0; c < NCFG; c++) s += mchecks[c];
    return s;
  endfunction

  function automatic int total_failures();
    int s = failures;
    for (int c = 0; c < NCFG; c++) s += mfail[c];
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(input logic signed [IN_W-1:0] v);
    @(negedge clk);
    in_valid = 1'b1;
    x_in     = v;
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  longint outs [NCFG][$];
  always @(posedge clk)
    for (int c = 0; c < NCFG; c++)
      if (rst_n && out_valid[c]) outs[c].push_back(longint'(y_out[c]));

  half_t       std_h, spt_h;
  int unsigned f;
  int          terms;
  longint      tone_amp [NCFG];

  initial begin
    std_h = '{16'h0012, 16'h12C6, 16'h2D38, 16'h3FEC};
    for (int c = 0; c < NCFG; c++) begin
      ref_allocate(std_h, SPT[c] / 2, spt_h, f);
      terms = 0;
      for (int n = 0; n < 4; n++) terms += 2 * $countones(spt_h[n]);
      check(terms == SPT[c], $sformatf("set for %0d terms uses %0d", SPT[c], terms));
      for (int t = 0; t < 8; t++) coef[c][t] = longint'(spt_h[(t < 4) ? t : 7 - t]);
      $display("SPT=%0d: h = %h %h %h %h, F = %0d", SPT[c], spt_h[0], spt_h[1], spt_h[2], spt_h[3], f);
    end

    rst_n    = 1'b0;
    in_valid = 1'b0;
    x_in     = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // impulse
    for (int c = 0; c < NCFG; c++) outs[c].delete();
    send(8'sd1);
    for (int i = 0; i < 7; i++) send(8'sd0);
    idle(4);
    for (int c = 0; c < NCFG; c++)
      for (int t = 0; t < 8; t++) check(outs[c][t] == coef[c][t], $sformatf("impulse %0d tap %0d", SPT[c], t));

    // DC
    for (int c = 0; c < NCFG; c++) outs[c].delete();
    for (int i = 0; i < 16; i++) send(8'sd64);
    idle(4);
    for (int c = 0; c < NCFG; c++) begin
      automatic longint hsum = 0;
      for (int t = 0; t < 8; t++) hsum += coef[c][t];
      check(outs[c][15] == 64 * hsum, $sformatf("DC gain %0d", SPT[c]));
    end
    check(outs[2][15] == 64 * 65536, "SPT=20 unity DC gain");

    // fs/4 tone 64, 0, -64, 0, ...: steady output = 64 * (h1 - h2 - h3 + h4) * (+-1)
    for (int c = 0; c < NCFG; c++) outs[c].delete();
    for (int i = 0; i < 24; i++) send((i % 4 == 0) ? 8'sd64 : ((i % 4 == 2) ? -8'sd64 : 8'sd0));
    idle(4);
    for (int c = 0; c < NCFG; c++) begin
      tone_amp[c] = 0;
      for (int i = 8; i < 24; i++) if (((outs[c][i] < 0) ? -outs[c][i] : outs[c][i]) > tone_amp[c])
        tone_amp[c] = (outs[c][i] < 0) ? -outs[c][i] : outs[c][i];
      $display("SPT=%0d: peak output for a 64-amplitude fs/4 tone = %0d", SPT[c], tone_amp[c]);
    end
    check(tone_amp[2] == 0,           "SPT=20 keeps the fs/4 null");
    check(tone_amp[1] == 64 * 256,    "SPT=14 fs/4 residue");
    check(tone_amp[0] == 64 * 4096,   "SPT=6 fs/4 residue");

    // fs/2 tone 64, -64, ...: an even-length symmetric filter has a zero there
    for (int c = 0; c < NCFG; c++) outs[c].delete();
    for (int i = 0; i < 16; i++) send((i % 2 == 0) ? 8'sd64 : -8'sd64);
    idle(4);
    for (int c = 0; c < NCFG; c++)
      for (int i = 8; i < 16; i++) check(outs[c][i] == 0, $sformatf("fs/2 zero %0d", SPT[c]));

    // random stream
    for (int i = 0; i < 300; i++) send(IN_W'($urandom));
    idle(4);

    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end

endmodule
