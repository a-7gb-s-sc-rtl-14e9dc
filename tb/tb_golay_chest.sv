// tb_golay_chest: checks the estimator back end (CFR averaging, powers, inverse SNR).
//
// A CES_A frame of random spectra FC_ra and a CES_B frame FC_rb = FC_ra + random error
// are streamed in, each as 128 positions of four bins (with a bubble in the valid
// stream).  Every CFR word written must be (FC_ra + FC_rb)/2 at the right address;
// sig_pow, noise_pow and snr_inv must match equations (1)-(3) computed here, and
// est_done must rise.  A second estimate run checks that est_done drops and the
// accumulators restart.
module tb_golay_chest;
  import eq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, fc_valid = 1'b0;
  initial #1 rst_n = 1'b0;   // a falling edge applies the asynchronous reset
  frame_tag_e fc_tag = TAG_NONE;
  logic [6:0] fc_pos = '0;
  logic signed [10:0] fc_re [LANES], fc_im [LANES];
  logic cfr_we, est_done;
  logic [6:0] cfr_addr;
  logic [87:0] cfr_wdata;
  logic [23:0] sig_pow, noise_pow;
  logic [15:0] snr_inv;
  int checks = 0, failures = 0;
  int ar [512], ai [512], br [512], bi [512];
  int nwr = 0;

  golay_chest dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd2(int v);   // round-half-up of v/2
    return (v + 1) >>> 1;
  endfunction

  always @(posedge clk) begin
    if (cfr_we) begin
      nwr++;
      for (int m = 0; m < LANES; m++) begin
        int k;
        logic signed [10:0] hr, hi;
        k = int'(cfr_addr) + 128 * m;
        {hr, hi} = cfr_wdata[m*22 +: 22];
        checks++;
        if (int'(hr) != rnd2(ar[k] + br[k]) || int'(hi) != rnd2(ai[k] + bi[k])) begin
          failures++;
          if (failures < 10) $display("H[%0d] = %0d,%0d", k, hr, hi);
        end
      end
    end
  end

  task automatic send(frame_tag_e t, bit b);
    for (int p = 0; p < 128; p++) begin
      fc_valid <= 1'b1;
      fc_tag   <= t;
      fc_pos   <= 7'(p);
      for (int m = 0; m < LANES; m++) begin
        fc_re[m] <= 11'(b ? br[p + 128 * m] : ar[p + 128 * m]);
        fc_im[m] <= 11'(b ? bi[p + 128 * m] : ai[p + 128 * m]);
      end
      @(posedge clk);
      if (p == 40) begin
        fc_valid <= 1'b0;
        repeat (2) @(posedge clk);
      end
    end
    fc_valid <= 1'b0;
    fc_tag   <= TAG_NONE;
  endtask

  task automatic run(int amp, int err);
    real s, n, si;
    s = 0.0;
    n = 0.0;
    for (int k = 0; k < 512; k++) begin
      ar[k] = int'($urandom_range(0, 2 * amp)) - amp;
      ai[k] = int'($urandom_range(0, 2 * amp)) - amp;
      br[k] = ar[k] + int'($urandom_range(0, 2 * err)) - err;
      bi[k] = ai[k] + int'($urandom_range(0, 2 * err)) - err;
    end
    for (int k = 0; k < 512; k++) begin
      int hr, hi;
      hr = rnd2(ar[k] + br[k]);
      hi = rnd2(ai[k] + bi[k]);
      s += real'(hr * hr + hi * hi);
      n += real'((hr - ar[k]) ** 2 + (hi - ai[k]) ** 2 + (hr - br[k]) ** 2 + (hi - bi[k]) ** 2);
    end
    s = s / 512.0;
    n = n / 1024.0;
    si = n / s * 4096.0;
    nwr = 0;
    send(TAG_CES_A, 1'b0);
    checks++;
    if (est_done) failures++;           // cleared by the new CES_A frame
    send(TAG_CES_B, 1'b1);
    repeat (8) @(posedge clk);
    checks += 5;
    if (nwr != 128) failures++;
    if (!est_done) failures++;
    if (int'(sig_pow) != $rtoi(s)) begin
      failures++;
      $display("S = %0d expected %f", sig_pow, s);
    end
    if (int'(noise_pow) != $rtoi(n)) begin
      failures++;
      $display("N = %0d expected %f", noise_pow, n);
    end
    if ((real'(snr_inv) - si) > 0.003 * si + 1.0 || (si - real'(snr_inv)) > 0.003 * si + 1.0) begin
      failures++;
      $display("1/SNR = %0d expected %f", snr_inv, si);
    end
  endtask

  initial begin
    for (int m = 0; m < LANES; m++) begin
      fc_re[m] = '0;
      fc_im[m] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run(900, 40);
    run(200, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
