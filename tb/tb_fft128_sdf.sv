// tb_fft128_sdf: checks the 128-point SDF FFT / IFFT lane engine.
//
// Two instances see the same random input stream with enable gaps:
//   u_dif  forward DIF (default SCALE_MASK, three halving stages): output index q of a
//          frame must be X(bitrev7(q)) / 8 of that frame's DFT;
//   u_dit  inverse DIT: reading the input as bit-reversed spectrum, output n must be
//          sum_q x(q) W_128^(-n*bitrev7(q)) / 8.
// A third frame is sent with in_noscale to u_dif and must give the exact DFT (small
// inputs, no saturation) with out_noscale set.  Tolerance 3 LSB for scaled frames;
// 8 LSB for the unscaled frame, whose twiddle rounding errors grow with the data.
// Expected values are computed from the samples the DUT actually took (recorded at
// each enabled edge).  The first output of a frame must appear exactly 134 enabled cycles after
// its first input, with out_first on index 0.  A clear in the middle of a frame must
// drop it: no output until a full new frame has gone through.
module tb_fft128_sdf;
  import eq_pkg::*;
  localparam int NF = 4;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, clear = 1'b0, in_noscale = 1'b0;
  logic signed [10:0] in_re = '0, in_im = '0;
  logic signed [10:0] a_re, a_im, b_re, b_im;
  logic a_valid, a_first, a_nosc, b_valid, b_first, b_nosc;
  logic [6:0] a_idx, b_idx;
  int checks = 0, failures = 0;
  int xr [NF][128], xi [NF][128];
  int nin = 0, nout = 0, first_lat = -1;

  fft128_sdf #(.DIT(1'b0)) u_dif (
    .clk(clk), .rst_n(rst_n), .en(en), .clear(clear), .in_noscale(in_noscale),
    .in_re(in_re), .in_im(in_im), .out_re(a_re), .out_im(a_im), .out_valid(a_valid),
    .out_first(a_first), .out_noscale(a_nosc), .out_idx(a_idx));
  fft128_sdf #(.DIT(1'b1), .INVERSE(1'b1), .SCALE_MASK(7'b1110000)) u_dit (
    .clk(clk), .rst_n(rst_n), .en(en), .clear(clear), .in_noscale(1'b0),
    .in_re(in_re), .in_im(in_im), .out_re(b_re), .out_im(b_im), .out_valid(b_valid),
    .out_first(b_first), .out_noscale(b_nosc), .out_idx(b_idx));

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int br7(int v);
    return int'(bitrev7(7'(v)));
  endfunction

  function automatic void cmp(string nm, int f, int q, int gr, int gi, bit inv, real div);
    real er, ei, tol;
    int k;
    er = 0.0;
    ei = 0.0;
    for (int n = 0; n < 128; n++) begin
      real a;
      if (!inv) begin
        k = br7(q);
        a = -2.0 * 3.14159265358979 * real'((n * k) % 128) / 128.0;
      end else
        a = 2.0 * 3.14159265358979 * real'((q * br7(n)) % 128) / 128.0;
      er += sr_[f][n] * $cos(a) - si_[f][n] * $sin(a);
      ei += sr_[f][n] * $sin(a) + si_[f][n] * $cos(a);
    end
    er /= div;
    ei /= div;
    tol = (div == 1.0) ? 8.0 : 3.0;
    checks++;
    if (real'(gr) - er > tol || er - real'(gr) > tol || real'(gi) - ei > tol || ei - real'(gi) > tol) begin
      failures++;
      if (failures < 10) $display("%s frame %0d idx %0d: %0d,%0d vs %0f,%0f", nm, f, q, gr, gi, er, ei);
    end
  endfunction

  // record what the DUT actually sampled
  int rin = 0, nv = 0;
  int sr_ [NF + 2][128], si_ [NF + 2][128];
  always @(posedge clk) if (en) begin
    if (a_first && first_lat < 0) first_lat = rin;
    if (a_valid) nv++;
    if (rin / 128 < NF + 2) begin
      sr_[rin / 128][rin % 128] = int'(in_re);
      si_[rin / 128][rin % 128] = int'(in_im);
    end
    rin++;
  end

  // output checking; frame number from output count
  always @(posedge clk) begin
    if (a_valid) begin
      int f;
      f = nout / 128;
      checks++;
      if (a_first != (a_idx == 0) || int'(a_idx) != nout % 128 || b_valid != 1'b1) failures++;
      if (f < NF - 1) begin
        cmp("dif", f, int'(a_idx), int'(a_re), int'(a_im), 1'b0, (f == 2) ? 1.0 : 8.0);
        checks++;
        if (a_nosc != (f == 2)) failures++;
        if (f != 2) cmp("dit", f, int'(b_idx), int'(b_re), int'(b_im), 1'b1, 8.0);
      end
      nout++;
    end
  end

  task automatic send(int f, bit nosc, int stop_at);
    for (int n = 0; n < 128 && n < stop_at; n++) begin
      while ($urandom_range(0, 4) == 0) begin
        en <= 1'b0;
        @(posedge clk);
      end
      en         <= 1'b1;
      in_re      <= 11'(xr[f][n]);
      in_im      <= 11'(xi[f][n]);
      in_noscale <= nosc;
      @(posedge clk);
      nin++;
    end
    en <= 1'b0;
  endtask

  initial begin
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < 128; n++) begin
        int amp;
        amp = (f == 2) ? 7 : 60;   // 7-bit input range, as in the 512-point FFT
        xr[f][n] = int'($urandom_range(0, 2 * amp)) - amp;
        xi[f][n] = int'($urandom_range(0, 2 * amp)) - amp;
      end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < NF; f++) send(f, f == 2, 128);
    repeat (2) @(posedge clk);
    checks++;
    if (first_lat != 134) begin
      failures++;
      $display("latency %0d", first_lat);
    end
    checks++;
    if (nv != rin - 134) begin
      failures++;
      $display("outputs %0d %0d rin %0d", nout, nv, rin);
    end
    // clear: a partial frame is dropped, then one full frame gives no output yet
    send(0, 1'b0, 50);
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    nout = 0;
    send(1, 1'b0, 128);
    repeat (2) @(posedge clk);
    checks++;
    if (nout != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
