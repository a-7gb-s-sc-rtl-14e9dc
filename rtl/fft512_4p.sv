// fft512_4p: 4-parallel 512-point FFT.
//
// Lane j of each input cycle n carries x(4n+j).  Each lane runs its own 128-point
// decimation-in-frequency SDF FFT, giving Y_j(k) = sum_n x(4n+j) W_128^{nk}.  Lanes 1..3
// are then multiplied by W_512^{jk} (three complex multipliers fed by a twiddle table)
// and a radix-4 butterfly across the lanes forms
//     X(k + 128m) = sum_j W_4^{jm} W_512^{jk} Y_j(k),   m = 0..3,
// delivered on output lane m.  This is the structure of the source (4 interleaved
// 128-point FFTs, 3 CMs with twiddle LUTs, one radix-4 unit).
//
// Word lengths follow the source: IN_W = 7 in, OUT_W = 11 out.  The internal word is
// IW bits; the first four 128-point stages grow, the last three halve, and the radix-4
// unit divides by 4, so the output is the exact DFT divided by 32 (design choice).
// A frame flagged with in_noscale at its first sample (the channel-estimation frames,
// whose content is a short, sparse impulse response) skips every halving and comes
// out as the exact DFT, saturated to OUT_W bits.
//
// Timing: advances on in_valid only.  Output bins come in bit-reversed k order: output
// position p (out_pos, 0..127, also the natural SRAM address of the bin group) holds
// k = bitrev7(p) (out_k).  Latency is LAT = 136 valid cycles from a frame's first input
// to its first output, so a frame is flushed out by the next one.  Frames are
// back-to-back 128-cycle groups of valid cycles counted from reset or from the last
// clear, which also drops every frame still in flight (used at the start of a packet).
module fft512_4p
  import eq_pkg::*;
#(
  parameter int       IN_W       = 7,
  parameter int       OUT_W      = 11,
  parameter int       IW         = 11,
  parameter bit [6:0] SCALE_MASK = 7'b1110000,
  parameter int       R4_SHIFT   = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    clear,       // synchronous restart, drops frames in flight
  input  logic                    in_noscale,
  input  logic signed [IN_W-1:0]  in_re [LANES],
  input  logic signed [IN_W-1:0]  in_im [LANES],
  output logic                    out_valid,
  output logic                    out_first,
  output logic [6:0]              out_pos,
  output logic [6:0]              out_k,
  output logic signed [OUT_W-1:0] out_re [LANES],
  output logic signed [OUT_W-1:0] out_im [LANES]
);
  localparam int NTW = 3 * 127 + 1;
  typedef logic signed [TW_W-1:0] twt_t [NTW];
  function automatic twt_t mk(bit im);
    twt_t t;
    for (int e = 0; e < NTW; e++) t[e] = im ? tw_im(e, NFFT, 1'b0) : tw_re(e, NFFT);
    return t;
  endfunction
  localparam twt_t TWR = mk(1'b0);
  localparam twt_t TWI = mk(1'b1);

  function automatic logic signed [OUT_W-1:0] sat_out(logic signed [IW+1:0] v);
    if (v > (IW + 2)'((2 ** (OUT_W - 1)) - 1)) return OUT_W'((2 ** (OUT_W - 1)) - 1);
    if (v < -(IW + 2)'(2 ** (OUT_W - 1)))      return OUT_W'(-(2 ** (OUT_W - 1)));
    return v[OUT_W-1:0];
  endfunction

  logic signed [IW-1:0] y_re [LANES], y_im [LANES];
  logic                 l_valid [LANES], l_first [LANES], l_nosc [LANES];
  logic [6:0]           l_idx [LANES];

  for (genvar j = 0; j < LANES; j++) begin : g_lane
    fft128_sdf #(.DIT(1'b0), .INVERSE(1'b0), .W(IW), .SCALE_MASK(SCALE_MASK)) u_fft (
      .clk(clk), .rst_n(rst_n), .en(in_valid), .clear(clear), .in_noscale(in_noscale),
      .in_re(IW'(in_re[j])), .in_im(IW'(in_im[j])),
      .out_re(y_re[j]), .out_im(y_im[j]),
      .out_valid(l_valid[j]), .out_first(l_first[j]), .out_noscale(l_nosc[j]),
      .out_idx(l_idx[j])
    );
  end

  // Stage A: twiddle multiplication W_512^{jk} on lanes 1..3.
  logic [6:0]           k_a;
  logic signed [IW-1:0] t_re [LANES], t_im [LANES];
  logic signed [IW-1:0] a_re [LANES], a_im [LANES];
  logic                 a_valid, a_first, a_nosc;
  logic [6:0]           a_pos, a_k;

  assign k_a = bitrev7(l_idx[0]);
  assign t_re[0] = y_re[0];
  assign t_im[0] = y_im[0];
  for (genvar j = 1; j < LANES; j++) begin : g_cm
    int unsigned e;
    assign e = j * int'(k_a);
    cmult_tw #(.W(IW)) u_cm (
      .xr(y_re[j]), .xi(y_im[j]), .wr(TWR[e]), .wi(TWI[e]), .yr(t_re[j]), .yi(t_im[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0;
      a_first <= 1'b0;
      a_nosc  <= 1'b0;
      a_pos   <= '0;
      a_k     <= '0;
      for (int j = 0; j < LANES; j++) begin
        a_re[j] <= '0;
        a_im[j] <= '0;
      end
    end else if (clear) begin
      a_valid <= 1'b0;
      a_first <= 1'b0;
    end else if (in_valid) begin
      a_valid <= l_valid[0];
      a_first <= l_first[0];
      a_nosc  <= l_nosc[0];
      a_pos   <= l_idx[0];
      a_k     <= k_a;
      a_re    <= t_re;
      a_im    <= t_im;
    end
  end

  // Stage B: radix-4 butterfly across the lanes, X_m = sum_j (-j)^{jm} A_j.
  logic signed [IW+1:0] s_re [LANES], s_im [LANES];
  always_comb begin
    logic signed [IW+1:0] ar [LANES], ai [LANES];
    for (int j = 0; j < LANES; j++) begin
      ar[j] = (IW + 2)'(a_re[j]);
      ai[j] = (IW + 2)'(a_im[j]);
    end
    s_re[0] = ar[0] + ar[1] + ar[2] + ar[3];
    s_im[0] = ai[0] + ai[1] + ai[2] + ai[3];
    s_re[1] = ar[0] + ai[1] - ar[2] - ai[3];     // a - jb - c + jd
    s_im[1] = ai[0] - ar[1] - ai[2] + ar[3];
    s_re[2] = ar[0] - ar[1] + ar[2] - ar[3];
    s_im[2] = ai[0] - ai[1] + ai[2] - ai[3];
    s_re[3] = ar[0] - ai[1] - ar[2] + ai[3];     // a + jb - c - jd
    s_im[3] = ai[0] + ar[1] - ai[2] - ar[3];
    for (int m = 0; m < LANES; m++) begin
      if (R4_SHIFT > 0 && !a_nosc) begin
        s_re[m] = (s_re[m] + (IW + 2)'(1 << (R4_SHIFT - 1))) >>> R4_SHIFT;
        s_im[m] = (s_im[m] + (IW + 2)'(1 << (R4_SHIFT - 1))) >>> R4_SHIFT;
      end
    end
  end

  logic b_valid, b_first;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid   <= 1'b0;
      b_first   <= 1'b0;
      out_pos   <= '0;
      out_k     <= '0;
      for (int m = 0; m < LANES; m++) begin
        out_re[m] <= '0;
        out_im[m] <= '0;
      end
    end else if (clear) begin
      b_valid   <= 1'b0;
      b_first   <= 1'b0;
    end else if (in_valid) begin
      b_valid   <= a_valid;
      b_first   <= a_first;
      out_pos   <= a_pos;
      out_k     <= a_k;
      for (int m = 0; m < LANES; m++) begin
        out_re[m] <= sat_out(s_re[m]);
        out_im[m] <= sat_out(s_im[m]);
      end
    end
  end
  assign out_valid = b_valid && in_valid;
  assign out_first = b_first && in_valid;
endmodule
