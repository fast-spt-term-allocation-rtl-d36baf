// fir_spt: 8-tap linear-phase FIR filter with SPT coefficients.
//
// The filter starts from a standard 8-tap linear-phase low-pass (null at
// fs/4, unity gain at DC) and, while it is elaborated, re-quantises its
// coefficients so that all eight together use at most SPT_TOTAL '1' digits
// (SPT terms), choosing the split that keeps them closest to the standard
// ones (see spt_pkg). Each tap then multiplies by its constant with a
// shift-and-add network (spt_mult), so the number of adders, and the area,
// is set by SPT_TOTAL. SPT_TOTAL = 20 gives the coefficients
//   h(1..4) = 0, 0.0001001011 (0.0732), 0.0010110101 (0.1768), 0.01 (0.25)
// mirrored for h(5..8); 6 and 14 give the cheaper variants.
//
// Structure: a direct-form delay line of NUM_TAPS samples, one spt_mult per
// tap, a sum of the eight products and an output register. The two taps of a
// symmetric pair are multiplied separately, so the count of shifted terms is
// the SPT total itself.
//
// Interface and timing: x_in is a signed sample taken when in_valid is high
// (one sample per clock at most; gaps freeze the delay line). y_out is
//   y[k] = sum_{n=0..7} h(n+1) * x[k-n]
// in units of 2^-16 (so y_out = x * 65536 for a DC input at unity gain),
// full precision, OUT_W bits. The edge that takes x[k] updates the delay
// line and the next edge registers y[k] with out_valid, so out_valid follows
// in_valid by two cycles and the filter accepts a new sample every cycle.
// rst_n is an active-low synchronous reset that clears the delay line and
// the output.
//
// The standard coefficients, the SPT allocation and the shift-and-add
// products follow the filter design this block implements; the direct form,
// the valid handshake, the register placement, the 8-bit default sample
// width and the output precision are choices of this implementation.
module fir_spt
  import spt_pkg::*;
#(
  parameter int unsigned IN_W      = 8,
  parameter int unsigned SPT_TOTAL = 20,
  parameter coef_half_t  STD_COEF  = STD_HALF,
  localparam int unsigned PROD_W   = IN_W + COEF_W,
  localparam int unsigned OUT_W    = PROD_W + $clog2(NUM_TAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x_in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y_out
);

  // Allocated half impulse response, h(1) at index 0.
  localparam coef_half_t SPT_COEF = spt_allocate(STD_COEF, SPT_TOTAL / 2);

  logic signed [IN_W-1:0]   taps [NUM_TAPS];   // taps[0] = newest sample
  logic signed [PROD_W-1:0] prod [NUM_TAPS];
  logic signed [OUT_W-1:0]  sum;
  logic                     taps_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int t = 0; t < NUM_TAPS; t++) taps[t] <= '0;
      taps_valid <= 1'b0;
    end else begin
      taps_valid <= in_valid;
      if (in_valid) begin
        taps[0] <= x_in;
        for (int t = 1; t < NUM_TAPS; t++) taps[t] <= taps[t-1];
      end
    end
  end

  for (genvar t = 0; t < NUM_TAPS; t++) begin : g_tap
    spt_mult #(
      .IN_W   (IN_W),
      .COEF_W (COEF_W),
      .COEF   (tap_coef(SPT_COEF, t))
    ) u_mult (
      .x (taps[t]),
      .p (prod[t])
    );
  end

  always_comb begin
    sum = '0;
    for (int t = 0; t < NUM_TAPS; t++) sum = sum + OUT_W'(prod[t]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= taps_valid;
      if (taps_valid) y_out <= sum;
    end
  end

endmodule
