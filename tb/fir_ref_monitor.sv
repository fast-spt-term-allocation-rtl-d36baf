// fir_ref_monitor: scoreboard for an 8-tap FIR filter with a valid handshake.
//
// It watches the filter's ports at every rising edge. Each accepted input
// sample (in_valid high) is shifted into a model delay line and the expected
// output sum_n coef[n] * x[k-n] is queued together with the edge count. Each
// out_valid pops the queue and compares y_out with the expected value, and
// the number of edges between the two with LATENCY. A low rst_n clears the
// model and the queue. Counts of checks and failures are outputs.
module fir_ref_monitor #(
  parameter int unsigned IN_W    = 8,
  parameter int unsigned OUT_W   = 27,
  parameter int unsigned LATENCY = 2,
  parameter string       NAME    = "fir"
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x_in,
  input  logic                    out_valid,
  input  logic signed [OUT_W-1:0] y_out,
  input  longint                  coef [8],
  output int                      checks,
  output int                      failures
);

  longint hist [8];
  longint exp_q [$];
  longint cyc_q [$];
  longint cyc;
  longint e, c;

  initial begin
    checks   = 0;
    failures = 0;
    cyc      = 0;
    for (int i = 0; i < 8; i++) hist[i] = 0;
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) hist[i] = 0;
      exp_q.delete();
      cyc_q.delete();
    end else begin
      if (out_valid) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("%s: out_valid with no sample pending", NAME);
        end else begin
          e = exp_q.pop_front();
          c = cyc_q.pop_front();
          if (longint'(y_out) != e) begin
            failures++;
            $display("%s: y_out=%0d expected %0d", NAME, y_out, e);
          end
          checks++;
          if (cyc - c != longint'(LATENCY)) begin
            failures++;
            $display("%s: latency %0d expected %0d", NAME, cyc - c, LATENCY);
          end
        end
      end
      if (in_valid) begin
        for (int i = 7; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = longint'(x_in);
        e = 0;
        for (int i = 0; i < 8; i++) e += coef[i] * hist[i];
        exp_q.push_back(e);
        cyc_q.push_back(cyc);
      end
    end
  end

endmodule
