// tb_recip_lut: checks the interpolated reciprocal table.
//
// Random and corner-case divisors (powers of two, all-ones, 1, 0) are applied one per
// cycle; two clock edges after it is applied, r * 2^-(e + 11) must match 1/d to within 0.2 % (10-bit
// mantissa with interpolation) and the exponent must be the leading-one position.
module tb_recip_lut;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge applies the asynchronous reset
  logic [31:0] d;
  logic [11:0] r;
  logic [4:0]  e;
  int checks = 0, failures = 0;
  logic [31:0] hist [3];
  real worst = 0.0;

  recip_lut dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int msb(logic [31:0] v);
    int p;
    p = 0;
    for (int i = 0; i < 32; i++) if (v[i]) p = i;
    return p;
  endfunction

  initial begin
    d = 32'd1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] nd;
      case (n % 8)
        0: nd = 32'd1 << $urandom_range(0, 31);
        1: nd = ~32'd0 >> $urandom_range(0, 31);
        2: nd = $urandom_range(1, 100);
        default: nd = $urandom >> $urandom_range(0, 31);
      endcase
      if (nd == 0) nd = 1;
      d <= nd;
      @(posedge clk);
      hist[2] = hist[1];
      hist[1] = hist[0];
      hist[0] = nd;
      #1;
      if (n >= 2) begin
        real got, exp, rel;
        got = real'(r) / (2.0 ** (real'(e) + 11.0));
        exp = 1.0 / real'(hist[1]);
        rel = (got - exp) / exp;
        if (rel < 0) rel = -rel;
        if (rel > worst) worst = rel;
        checks++;
        if (rel > 0.002 || int'(e) != msb(hist[1])) begin
          failures++;
          if (failures < 10) $display("d=%0d r=%0d e=%0d rel=%f", hist[1], r, e, rel);
        end
      end
    end
    $display("worst relative error %f", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
