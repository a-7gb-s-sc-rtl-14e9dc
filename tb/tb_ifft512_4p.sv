// tb_ifft512_4p: checks the 4-parallel 512-point IFFT against a floating-point IDFT.
//
// Random spectra Z(k) are fed in the order the FFT produces them (input position p,
// lane m carries Z(bitrev7(p) + 128m)); a last frame of zeros flushes the pipeline.
// Output lane j of output cycle n must equal 8 * (1/512) * sum_k Z(k) W_512^{-(4n+j)k}
// within a rounding tolerance, in natural time order, and the first output must
// appear 136 valid cycles after the first input.
module tb_ifft512_4p;
  import eq_pkg::*;
  localparam int NFR = 2;
  localparam int TOL = 3;

  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0, clear = 1'b0;
  initial #1 rst_n = 1'b0;   // a falling edge applies the asynchronous reset
  logic signed [10:0] in_re [LANES], in_im [LANES];
  logic               out_valid, out_first;
  logic [6:0]         out_n;
  logic signed [7:0]  out_re [LANES], out_im [LANES];
  int checks = 0, failures = 0;
  int zr [NFR][NFFT], zi [NFR][NFFT];
  int cyc = 0, first_in_cyc = -1, first_out_cyc = -1, ofr = 0, maxerr = 0;

  ifft512_4p dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (in_valid && first_in_cyc < 0) first_in_cyc = cyc;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void idft(int f, int n, output real re, output real im);
    re = 0.0;
    im = 0.0;
    for (int k = 0; k < NFFT; k++) begin
      real a;
      a = 2.0 * 3.14159265358979 * real'(n * k % NFFT) / real'(NFFT);
      re += real'(zr[f][k]) * $cos(a) - real'(zi[f][k]) * $sin(a);
      im += real'(zr[f][k]) * $sin(a) + real'(zi[f][k]) * $cos(a);
    end
    re = re / 64.0;
    im = im / 64.0;
  endfunction

  always @(posedge clk) begin
    if (out_valid && ofr < NFR) begin
      if (out_first && first_out_cyc < 0) begin
        first_out_cyc = cyc;
        checks++;
        if (first_out_cyc != first_in_cyc + 136) begin
          failures++;
          $display("latency: first output at %0d, expected %0d", cyc, first_in_cyc + 136);
        end
      end
      for (int j = 0; j < LANES; j++) begin
        real er, ei;
        int dr, di;
        idft(ofr, 4 * int'(out_n) + j, er, ei);
        dr = int'(out_re[j]) - $rtoi($floor(er + 0.5));
        di = int'(out_im[j]) - $rtoi($floor(ei + 0.5));
        if (dr < 0) dr = -dr;
        if (di < 0) di = -di;
        if (dr > maxerr) maxerr = dr;
        if (di > maxerr) maxerr = di;
        checks++;
        if (dr > TOL || di > TOL) begin
          failures++;
          if (failures < 10)
            $display("frame %0d n %0d: got %0d,%0d expected %f,%f", ofr, 4 * out_n + j,
                     out_re[j], out_im[j], er, ei);
        end
      end
      if (out_n == 7'd127) ofr++;
    end
  end

  initial begin
    for (int f = 0; f < NFR; f++)
      for (int k = 0; k < NFFT; k++) begin
        zr[f][k] = (f == 0) ? ((k == 3) ? 700 : 0) : int'($urandom_range(0, 240)) - 120;
        zi[f][k] = (f == 0) ? ((k == 3) ? 0 : 0)   : int'($urandom_range(0, 240)) - 120;
      end
    for (int m = 0; m < LANES; m++) begin
      in_re[m] = '0;
      in_im[m] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    for (int f = 0; f <= NFR; f++)
      for (int p = 0; p < 128; p++) begin
        in_valid <= 1'b1;
        for (int m = 0; m < LANES; m++) begin
          in_re[m] <= (f < NFR) ? 11'(zr[f][int'(bitrev7(7'(p))) + 128 * m]) : 11'd0;
          in_im[m] <= (f < NFR) ? 11'(zi[f][int'(bitrev7(7'(p))) + 128 * m]) : 11'd0;
        end
        @(posedge clk);
        if (p == 60 && f == 1) begin   // a bubble in the valid stream
          in_valid <= 1'b0;
          repeat (3) @(posedge clk);
        end
      end
    for (int n = 0; n < 20; n++) begin
      in_valid <= 1'b1;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (ofr != NFR) begin
      failures++;
      $display("only %0d frames came out", ofr);
    end
    $display("max abs error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
