// tb_spt_mult: exhaustive test of the shift-and-add constant multiplier.
//
// Four multipliers use the example coefficients 0101 1011 and 0101 1111
// (8 bits) and 0000 0000 0101 1011 and 0100 1001 1000 0100 (16 bits); a fifth
// uses the single-term 0x4000. Every signed 8-bit input is applied and each
// product is compared with the integer product x * COEF.
module tb_spt_mult;

  int checks   = 0;
  int failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [7:0]  x;
  logic signed [15:0] p8a, p8b;
  logic signed [23:0] p16a, p16b, p16c;

  spt_mult #(.IN_W(8), .COEF_W(8),  .COEF(8'h5B))    u8a  (.x(x), .p(p8a));
  spt_mult #(.IN_W(8), .COEF_W(8),  .COEF(8'h5F))    u8b  (.x(x), .p(p8b));
  spt_mult #(.IN_W(8), .COEF_W(16), .COEF(16'h005B)) u16a (.x(x), .p(p16a));
  spt_mult                                           u16b (.x(x), .p(p16b));
  spt_mult #(.IN_W(8), .COEF_W(16), .COEF(16'h4000)) u16c (.x(x), .p(p16c));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: x=%0d got %0d expected %0d", what, x, got, exp);
    end
  endtask

  initial begin
    for (int v = -128; v < 128; v++) begin
      @(negedge clk);
      x = 8'(v);
      #1;
      check(longint'(p8a),  longint'(v) * 91,     "0x5B");
      check(longint'(p8b),  longint'(v) * 95,     "0x5F");
      check(longint'(p16a), longint'(v) * 91,     "0x005B");
      check(longint'(p16b), longint'(v) * 18820,  "0x4984");
      check(longint'(p16c), longint'(v) * 16384,  "0x4000");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
