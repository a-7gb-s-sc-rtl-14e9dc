// tb_mmse_eq: checks the MMSE equalizer against a floating-point model.
//
// Random received bins Y, channel bins H and noise powers N are applied on four lanes
// with a random valid pattern.  Four cycles later each output must equal
// 256 * Y * conj(H) / (|H|^2 + N) (saturated to 11 bits) within 0.5 % plus 1 LSB, and
// out_valid must follow in_valid by exactly four cycles.  A small-|H| case checks that
// the regulariser bounds the gain at a channel null.
module tb_mmse_eq;
  import eq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0, out_valid;
  initial #1 rst_n = 1'b0;   // a falling edge applies the asynchronous reset
  logic signed [10:0] y_re [LANES], y_im [LANES], h_re [LANES], h_im [LANES];
  logic signed [10:0] z_re [LANES], z_im [LANES];
  logic [23:0] noise;
  int checks = 0, failures = 0;
  int qyr [$], qyi [$], qhr [$], qhi [$], qn [$];
  logic vhist [5];

  mmse_eq dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk1(real e, int g);
    real tol;
    if (e > 1023.0) e = 1023.0;
    if (e < -1024.0) e = -1024.0;
    tol = 1.0 + 0.005 * (e < 0 ? -e : e);
    checks++;
    if (real'(g) - e > tol || e - real'(g) > tol) begin
      failures++;
      if (failures < 10) $display("got %0d expected %f", g, e);
    end
  endfunction

  always @(posedge clk) begin
    for (int i = 4; i > 0; i--) vhist[i] <= vhist[i-1];
    vhist[0] <= in_valid;
    if (rst_n) begin
      checks++;
      if (out_valid != vhist[3]) failures++;
      if (out_valid) begin
        for (int l = 0; l < LANES; l++) begin
          real yr, yi, hr, hi, den;
          yr = qyr.pop_front(); yi = qyi.pop_front();
          hr = qhr.pop_front(); hi = qhi.pop_front();
          den = hr * hr + hi * hi + real'(qn[0]);
          chk1(256.0 * (yr * hr + yi * hi) / den, z_re[l]);
          chk1(256.0 * (yi * hr - yr * hi) / den, z_im[l]);
        end
        void'(qn.pop_front());
      end
    end
  end

  initial begin
    for (int i = 0; i < 5; i++) vhist[i] = 1'b0;
    noise = '0;
    for (int l = 0; l < LANES; l++) begin
      y_re[l] = '0; y_im[l] = '0; h_re[l] = 11'd1; h_im[l] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 1500; n++) begin
      logic v;
      int nn;
      v = ($urandom_range(0, 3) != 0);
      nn = (n % 3 == 0) ? 0 : int'($urandom_range(0, 1 << $urandom_range(0, 18)));
      in_valid <= v;
      noise <= 24'(nn);
      if (v) qn.push_back(nn);
      for (int l = 0; l < LANES; l++) begin
        int yr, yi, hr, hi, hs;
        hs = (n % 7 == 0) ? 8 : ((n % 2 == 0) ? 1000 : 60);
        yr = int'($urandom_range(0, 200)) - 100;
        yi = int'($urandom_range(0, 200)) - 100;
        hr = int'($urandom_range(0, 2 * hs)) - hs;
        hi = int'($urandom_range(0, 2 * hs)) - hs;
        y_re[l] <= 11'(yr); y_im[l] <= 11'(yi);
        h_re[l] <= 11'(hr); h_im[l] <= 11'(hi);
        if (v) begin
          qyr.push_back(yr); qyi.push_back(yi); qhr.push_back(hr); qhi.push_back(hi);
        end
      end
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (8) @(posedge clk);
    checks++;
    if (qn.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
