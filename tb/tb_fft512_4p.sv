// tb_fft512_4p: checks the 4-parallel 512-point FFT against a floating-point DFT.
//
// Four frames of 7-bit complex samples are streamed four samples per cycle: an impulse
// (exactly known spectrum), two random frames, and a sparse frame flagged in_noscale
// (as the channel-estimation frames are), followed by a frame of zeros that pushes the
// last one out.  Every output bin is compared with DFT/32, or with the exact DFT for
// the flagged frame; the tolerance covers the rounding of nine fixed-point stages.  The first output must
// appear exactly 136 valid cycles after the first input.
module tb_fft512_4p;
  import eq_pkg::*;
  localparam int NFR = 4;
  localparam int TOL = 4;

  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0;
  initial #1 rst_n = 1'b0;   // a falling edge applies the asynchronous reset
  logic signed [6:0]  in_re [LANES], in_im [LANES];
  logic               out_valid, out_first;
  logic [6:0]         out_pos, out_k;
  logic signed [10:0] out_re [LANES], out_im [LANES];
  int checks = 0, failures = 0;
  int xr [NFR][NFFT], xi [NFR][NFFT];
  int cyc = 0, first_in_cyc = -1, first_out_cyc = -1, ofr = 0, maxerr = 0;

  logic in_noscale = 1'b0, clear = 1'b0;
  fft512_4p dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void dft(int f, int k, output real re, output real im);
    re = 0.0;
    im = 0.0;
    for (int n = 0; n < NFFT; n++) begin
      real a;
      a = -2.0 * 3.14159265358979 * real'(n * k % NFFT) / real'(NFFT);
      re += real'(xr[f][n]) * $cos(a) - real'(xi[f][n]) * $sin(a);
      im += real'(xr[f][n]) * $sin(a) + real'(xi[f][n]) * $cos(a);
    end
  endfunction

  always @(posedge clk) if (in_valid && first_in_cyc < 0) first_in_cyc = cyc;

  // Output checker.
  always @(posedge clk) begin
    if (out_valid && ofr < NFR) begin
      if (out_first && first_out_cyc < 0) begin
        first_out_cyc = cyc;
        checks++;
        if (first_out_cyc != first_in_cyc + 136) begin
          failures++;
          $display("latency: first output at cycle %0d, expected %0d", first_out_cyc,
                   first_in_cyc + 136);
        end
      end
      checks++;
      if (out_k != bitrev7(out_pos)) failures++;
      for (int m = 0; m < LANES; m++) begin
        real er, ei;
        int dr, di;
        dft(ofr, int'(out_k) + 128 * m, er, ei);
        if (ofr != NFR - 1) begin
          er = er / 32.0;
          ei = ei / 32.0;
        end
        dr = int'(out_re[m]) - $rtoi($floor(er + 0.5));
        di = int'(out_im[m]) - $rtoi($floor(ei + 0.5));
        if (dr < 0) dr = -dr;
        if (di < 0) di = -di;
        if (dr > maxerr) maxerr = dr;
        if (di > maxerr) maxerr = di;
        checks++;
        // Without halving, the rounding of every stage is amplified by the later
        // ones, so the unscaled frame gets a wider absolute tolerance.
        if (dr > ((ofr == NFR - 1) ? 3 * TOL : TOL) || di > ((ofr == NFR - 1) ? 3 * TOL : TOL)) begin
          failures++;
          if (failures < 10)
            $display("frame %0d bin %0d: got %0d,%0d expected %f,%f", ofr,
                     out_k + 128 * m, out_re[m], out_im[m], er, ei);
        end
      end
      if (out_pos == 7'd127) ofr++;
    end
  end

  initial begin
    for (int f = 0; f < NFR; f++)
      for (int n = 0; n < NFFT; n++) begin
        xr[f][n] = (f == 0) ? ((n == 5) ? 63 : 0) : int'($urandom_range(0, 120)) - 60;
        xi[f][n] = (f == 0) ? ((n == 5) ? -40 : 0) : int'($urandom_range(0, 120)) - 60;
        if (f == NFR - 1) begin
          xr[f][n] = (n < 128 && n % 13 == 0) ? int'($urandom_range(0, 80)) - 40 : 0;
          xi[f][n] = (n < 128 && n % 11 == 0) ? int'($urandom_range(0, 80)) - 40 : 0;
        end
      end
    for (int j = 0; j < LANES; j++) begin
      in_re[j] = '0;
      in_im[j] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (cyc < 10) @(posedge clk);
    for (int f = 0; f <= NFR; f++)
      for (int n = 0; n < 128; n++) begin
        in_valid <= 1'b1;
        in_noscale <= (f == NFR - 1);
        for (int j = 0; j < LANES; j++) begin
          in_re[j] <= (f < NFR) ? 7'(xr[f][4*n+j]) : 7'd0;
          in_im[j] <= (f < NFR) ? 7'(xi[f][4*n+j]) : 7'd0;
        end
        @(posedge clk);
      end
    // A few idle cycles then enough valid cycles to flush the last frame.
    in_valid <= 1'b0;
    in_noscale <= 1'b0;
    repeat (5) @(posedge clk);
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
