// tb_golay_corr4: checks the 4-parallel Golay correlator.
//
// The testbench builds the Golay pair from the generator recursion on its own,
// transmits A*Ca, a gap, then A*Cb (complex, with a different imaginary amplitude), with
// random bubbles in the valid stream, and compares every output with the exact
// correlation sum divided by 256.  It also checks the property the estimator relies on:
// ra for Ca plus rb for Cb is 2A at zero lag and (nearly) zero elsewhere.  Output must lag
// input by 8 valid cycles.
module tb_golay_corr4;
  import eq_pkg::*;
  localparam int L = 256, AR = 48, AI = -24, GAP = 256;
  localparam int NS = 2 * L + GAP + 64;        // samples streamed
  localparam int DL [8] = '{1, 2, 4, 8, 16, 32, 64, 128};

  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0;
  initial #1 rst_n = 1'b0;   // a falling edge applies the asynchronous reset
  logic signed [6:0] in_re [LANES], in_im [LANES];
  logic signed [6:0] ra_re [LANES], ra_im [LANES], rb_re [LANES], rb_im [LANES];
  int checks = 0, failures = 0;
  int a [L], b [L], ca [L], cb [L];
  int xr [NS], xi [NS];
  int gra [NS], gia [NS], grb [NS], gib [NS];  // captured outputs, by sample index
  int vcnt = 0;

  golay_corr4 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Capture: output at valid cycle t belongs to samples 4(t-8)+j.
  always @(posedge clk) begin
    if (in_valid) begin
      if (vcnt >= 8)
        for (int j = 0; j < LANES; j++) begin
          int s;
          s = 4 * (vcnt - 8) + j;
          if (s < NS) begin
            gra[s] = ra_re[j];
            gia[s] = ra_im[j];
            grb[s] = rb_re[j];
            gib[s] = rb_im[j];
          end
        end
      vcnt++;
    end
  end

  function automatic void chk(string what, int s, int got, real exp, int tol);
    int d;
    d = got - $rtoi($floor(exp + 0.5));
    checks++;
    if (d > tol || d < -tol) begin
      failures++;
      if (failures < 10) $display("%s sample %0d: got %0d expected %f", what, s, got, exp);
    end
  endfunction

  initial begin
    int ta [L], tb2 [L];
    // Generator recursion.
    for (int i = 0; i < L; i++) begin
      a[i] = (i == 0);
      b[i] = (i == 0);
    end
    for (int k = 0; k < 8; k++) begin
      for (int i = 0; i < L; i++) begin
        int bd;
        bd = (i >= DL[k]) ? b[i - DL[k]] : 0;
        ta[i] = a[i] + bd;
        tb2[i] = a[i] - bd;
      end
      a = ta;
      b = tb2;
    end
    for (int i = 0; i < L; i++) begin
      ca[i] = a[L - 1 - i];
      cb[i] = b[L - 1 - i];
      if (ca[i] != 1 && ca[i] != -1) failures++;
    end
    // Stimulus: Ca at 0, Cb at L + GAP.
    for (int s = 0; s < NS; s++) begin
      xr[s] = 0;
      xi[s] = 0;
    end
    for (int i = 0; i < L; i++) begin
      xr[i] = AR * ca[i];
      xi[i] = AI * ca[i];
      xr[L + GAP + i] = AR * cb[i];
      xi[L + GAP + i] = AI * cb[i];
    end
    for (int j = 0; j < LANES; j++) begin
      in_re[j] = '0;
      in_im[j] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < NS / 4 + 8; n++) begin
      in_valid <= 1'b1;
      for (int j = 0; j < LANES; j++) begin
        in_re[j] <= (4 * n + j < NS) ? 7'(xr[4 * n + j]) : 7'd0;
        in_im[j] <= (4 * n + j < NS) ? 7'(xi[4 * n + j]) : 7'd0;
      end
      @(posedge clk);
      if ($urandom_range(0, 9) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    @(posedge clk);
    // Exact correlations.
    for (int s = 0; s < NS; s++) begin
      real era, eia, erb, eib;
      era = 0.0; eia = 0.0; erb = 0.0; eib = 0.0;
      for (int i = 0; i < L; i++)
        if (s - i >= 0) begin
          era += real'(a[i] * xr[s - i]);
          eia += real'(a[i] * xi[s - i]);
          erb += real'(b[i] * xr[s - i]);
          eib += real'(b[i] * xi[s - i]);
        end
      chk("ra.re", s, gra[s], era / 256.0, 1);
      chk("ra.im", s, gia[s], eia / 256.0, 1);
      chk("rb.re", s, grb[s], erb / 256.0, 1);
      chk("rb.im", s, gib[s], eib / 256.0, 1);
    end
    // Complementary property around the two peaks.
    for (int lag = -64; lag < 64; lag++) begin
      chk("sum.re", lag, gra[L - 1 + lag] + grb[2 * L + GAP - 1 + lag],
          (lag == 0) ? real'(2 * AR) : 0.0, 2);
      chk("sum.im", lag, gia[L - 1 + lag] + gib[2 * L + GAP - 1 + lag],
          (lag == 0) ? real'(2 * AI) : 0.0, 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
