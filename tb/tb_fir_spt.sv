// tb_fir_spt: end-to-end test of the SPT FIR filter at its default size
// (8 taps, 16-bit coefficients, 20 SPT terms, 8-bit samples).
//
// The expected coefficients come from an exhaustive allocation in the
// testbench (spt_ref_pkg) and are also compared with the published 20-term
// set. A scoreboard (fir_ref_monitor) checks every output value and the
// two-cycle latency. The stimulus runs through the behaviours of the filter
// and counts each one: an impulse (the output is the coefficient sequence),
// a DC input (unity gain, y = x * 65536), a tone at fs/4 (exact null, y = 0
// once the delay line is full), full-scale inputs of both signs, random
// samples with gaps in in_valid (the delay line holds) and a reset in the
// middle of a stream. A behaviour that never happened counts as a failure.
module tb_fir_spt;
  import spt_ref_pkg::*;

  localparam int IN_W  = 8;
  localparam int OUT_W = 27;

  logic                    clk = 1'b0;
  logic                    rst_n;
  logic                    in_valid;
  logic signed [IN_W-1:0]  x_in;
  logic                    out_valid;
  logic signed [OUT_W-1:0] y_out;

  longint coef [8];
  int     mon_checks, mon_failures;
  int     checks   = 0;
  int     failures = 0;

  // behaviour counters
  int n_impulse = 0, n_dc = 0, n_null = 0, n_full = 0, n_gap = 0, n_reset = 0;

  always #5 clk = ~clk;

  fir_spt dut (
    .clk, .rst_n, .in_valid, .x_in, .out_valid, .y_out
  );

  fir_ref_monitor #(.IN_W(IN_W), .OUT_W(OUT_W), .LATENCY(2), .NAME("spt20")) mon (
    .clk, .rst_n, .in_valid, .x_in, .out_valid, .y_out,
    .coef, .checks(mon_checks), .failures(mon_failures)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + mon_checks, failures + mon_failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Apply one sample on the falling edge; optionally leave a gap first.
  task automatic send(input logic signed [IN_W-1:0] v, input int gap = 0);
    repeat (gap) begin
      @(negedge clk);
      in_valid = 1'b0;
      x_in     = IN_W'($urandom);
    end
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

  // Collect the next n outputs.
  longint outs [$];
  always @(posedge clk) if (rst_n && out_valid) outs.push_back(longint'(y_out));

  half_t       std_h, spt_h;
  int unsigned f;

  initial begin
    std_h = '{16'h0012, 16'h12C6, 16'h2D38, 16'h3FEC};
    ref_allocate(std_h, 10, spt_h, f);
    check(spt_h[0] == 16'h0000 && spt_h[1] == 16'h12C0 &&
          spt_h[2] == 16'h2D40 && spt_h[3] == 16'h4000, "reference 20-term set");
    for (int t = 0; t < 8; t++) coef[t] = longint'(spt_h[(t < 4) ? t : 7 - t]);

    rst_n    = 1'b0;
    in_valid = 1'b0;
    x_in     = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // impulse
    outs.delete();
    send(8'sd1);
    for (int i = 0; i < 9; i++) send(8'sd0);
    idle(4);
    check(outs.size() == 10, "impulse output count");
    for (int t = 0; t < 8; t++) check(outs[t] == coef[t], $sformatf("impulse tap %0d", t));
    n_impulse++;

    // DC: unity gain once the delay line is full
    outs.delete();
    for (int i = 0; i < 16; i++) send(8'sd100);
    idle(4);
    for (int i = 8; i < 16; i++) check(outs[i] == 100 * 65536, "DC gain");
    n_dc++;

    // fs/4 tone: 100, 0, -100, 0, ...
    outs.delete();
    for (int i = 0; i < 24; i++) send((i % 4 == 0) ? 8'sd100 : ((i % 4 == 2) ? -8'sd100 : 8'sd0));
    idle(4);
    for (int i = 8; i < 24; i++) begin
      check(outs[i] == 0, $sformatf("fs/4 null sample %0d = %0d", i, outs[i]));
      if (outs[i] == 0) n_null++;
    end

    // full scale, both signs
    outs.delete();
    for (int i = 0; i < 10; i++) send(-8'sd128);
    for (int i = 0; i < 10; i++) send(8'sd127);
    idle(4);
    check(outs[9] == -128 * 65536, "full-scale negative");
    check(outs[19] == 127 * 65536, "full-scale positive");
    n_full++;

    // random samples with gaps
    for (int i = 0; i < 400; i++) begin
      int g;
      g = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 3) : 0;
      if (g > 0) n_gap++;
      send(IN_W'($urandom), g);
    end

    // reset in the middle of a stream, then an impulse again
    @(negedge clk);
    rst_n    = 1'b0;
    in_valid = 1'b0;
    @(negedge clk);
    check(out_valid == 1'b0 && y_out == '0, "reset clears output");
    rst_n = 1'b1;
    outs.delete();
    send(8'sd3);
    for (int i = 0; i < 8; i++) send(8'sd0);
    idle(4);
    for (int t = 0; t < 8; t++) check(outs[t] == 3 * coef[t], $sformatf("impulse after reset %0d", t));
    n_reset++;

    idle(4);
    check(n_impulse > 0, "impulse exercised");
    check(n_dc > 0, "DC exercised");
    check(n_null > 0, "fs/4 null exercised");
    check(n_full > 0, "full scale exercised");
    check(n_gap > 0, "input gaps exercised");
    check(n_reset > 0, "reset exercised");
    $display("behaviours: impulse=%0d dc=%0d null=%0d full=%0d gaps=%0d reset=%0d",
             n_impulse, n_dc, n_null, n_full, n_gap, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks + mon_checks, failures + mon_failures);
    $finish;
  end

endmodule
