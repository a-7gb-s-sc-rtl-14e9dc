// tb_cmult_tw: checks the twiddle multiplier.
//
// Random 11-bit operands are multiplied by every 512-point twiddle from eq_pkg (forward
// and inverse); each product must equal the rounded exact product of the same
// fixed-point numbers (round half up, TW_FRAC fraction bits) within one LSB, and
// products beyond the word range must saturate.  Combinational, so each case is
// checked after a short delay.
module tb_cmult_tw;
  import eq_pkg::*;
  logic signed [10:0] xr, xi, yr, yi;
  logic signed [TW_W-1:0] wr, wi;
  int checks = 0, failures = 0;

  cmult_tw #(.W(11)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat11(real v);
    int r;
    r = int'($floor(v + 0.5));
    return r > 1023 ? 1023 : (r < -1024 ? -1024 : r);
  endfunction

  initial begin
    for (int k = 0; k < 512; k++) begin
      for (int rep = 0; rep < 4; rep++) begin
        real er, ei;
        xr = 11'($urandom_range(0, 2047));
        xi = 11'($urandom_range(0, 2047));
        wr = tw_re(k, 512);
        wi = tw_im(k, 512, rep[0]);
        #1;
        er = (real'(xr) * real'(wr) - real'(xi) * real'(wi)) / 1024.0;
        ei = (real'(xr) * real'(wi) + real'(xi) * real'(wr)) / 1024.0;
        checks++;
        if (int'(yr) - sat11(er) > 1 || sat11(er) - int'(yr) > 1 ||
            int'(yi) - sat11(ei) > 1 || sat11(ei) - int'(yi) > 1) begin
          failures++;
          if (failures < 10) $display("k=%0d x=%0d,%0d y=%0d,%0d exp %0f,%0f", k, xr, xi, yr, yi, er, ei);
        end
      end
    end
    // saturation: (-1024 - 1024j) * (1 + 0j) stays, * j overflows the real part
    xr = -11'sd1024;
    xi = -11'sd1024;
    wr = 12'sd0;
    wi = 12'sd1024;
    #1;
    checks++;
    if (yr != 11'sd1023 || yi != -11'sd1024) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
