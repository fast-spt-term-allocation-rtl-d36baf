// spt_mult: multiplication of a sample by a constant SPT coefficient.
//
// The coefficient COEF is a fixed unsigned fraction whose '1' digits are its
// SPT terms. Each '1' at bit i contributes the input shifted left by i, and
// the contributions are summed, so the product costs one adder per SPT term
// beyond the first and no multiplier at all. Zero digits cost nothing, which
// is why the area follows the number of '1' digits and not the coefficient
// width.
//
// Interface: x is a signed two's-complement sample; p = x * COEF exactly, as
// an integer (the product in coefficient units of 2^-COEF_W). The block is
// purely combinational; the filter that uses it places the registers.
//
// The shift-and-add structure follows the SPT multiplication described for
// the filter. The signed input, the full-precision output and the 8-bit
// default input width are choices of this implementation. The default
// coefficient is the 16-bit example 0100 1001 1000 0100 (five SPT terms).
module spt_mult #(
  parameter int unsigned           IN_W   = 8,
  parameter int unsigned           COEF_W = 16,
  parameter logic [COEF_W-1:0]     COEF   = 16'h4984,
  localparam int unsigned          OUT_W  = IN_W + COEF_W
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] p
);

  logic signed [OUT_W-1:0] x_ext;

  assign x_ext = OUT_W'(x);

  // One shifted copy of x per '1' digit of the constant.
  always_comb begin
    p = '0;
    for (int i = 0; i < COEF_W; i++) begin
      if (COEF[i]) p = p + (x_ext <<< i);
    end
  end

endmodule
