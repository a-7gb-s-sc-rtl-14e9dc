// ifft512_4p: 4-parallel 512-point IFFT, the mirror image of fft512_4p.
//
// It consumes the FFT's output order directly: input lane m of input position p holds
// Z(k + 128m) with k = bitrev7(p).  Since
//     x(4n+j) = sum_k W_128^{-nk} W_512^{-jk} sum_m W_4^{-jm} Z(k+128m),
// the processor first applies an inverse radix-4 butterfly across the lanes, then
// multiplies lanes 1..3 by W_512^{-jk}, and finally runs four 128-point
// decimation-in-time SDF IFFTs that take bit-reversed input and return natural order.
// Output lane j of output cycle n is x(4n+j), in time order, so no reorder memory is
// needed between the equalizer and the symbol demapper.
//
// Word lengths: IN_W = 11 in and OUT_W = 8 out as in the source.  The internal word is
// IW = 14 bits (design choice).  The radix-4 unit divides by 4 and the last four
// 128-point stages halve, so the output is 8 times the exact inverse DFT
// (x = (1/512) sum Z W^-nk), saturated to 8 bits.
//
// Timing: advances on in_valid only; latency 136 valid cycles from a frame's first
// input to its first output; frames are back-to-back groups of 128 valid cycles,
// counted from reset or from the last clear, which drops every frame in flight.
module ifft512_4p
  import eq_pkg::*;
#(
  parameter int       IN_W       = 11,
  parameter int       OUT_W      = 8,
  parameter int       IW         = 14,
  parameter bit [6:0] SCALE_MASK = 7'b1111000,
  parameter int       R4_SHIFT   = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    clear,       // synchronous restart, drops frames in flight
  input  logic signed [IN_W-1:0]  in_re [LANES],
  input  logic signed [IN_W-1:0]  in_im [LANES],
  output logic                    out_valid,
  output logic                    out_first,
  output logic [6:0]              out_n,
  output logic signed [OUT_W-1:0] out_re [LANES],
  output logic signed [OUT_W-1:0] out_im [LANES]
);
  localparam int NTW = 3 * 127 + 1;
  typedef logic signed [TW_W-1:0] twt_t [NTW];
  function automatic twt_t mk(bit im);
    twt_t t;
    for (int e = 0; e < NTW; e++) t[e] = im ? tw_im(e, NFFT, 1'b1) : tw_re(e, NFFT);
    return t;
  endfunction
  localparam twt_t TWR = mk(1'b0);
  localparam twt_t TWI = mk(1'b1);

  function automatic logic signed [OUT_W-1:0] sat_out(logic signed [IW-1:0] v);
    if (v > IW'((2 ** (OUT_W - 1)) - 1)) return OUT_W'((2 ** (OUT_W - 1)) - 1);
    if (v < -IW'(2 ** (OUT_W - 1)))      return OUT_W'(-(2 ** (OUT_W - 1)));
    return v[OUT_W-1:0];
  endfunction

  // Input position counter (bit-reversed bin order).
  logic [6:0] pos;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pos <= '0;
    else if (clear)    pos <= '0;
    else if (in_valid) pos <= pos + 7'd1;
  end

  // Stage A: inverse radix-4 across lanes, U_j = sum_m (+j)^{jm} Z_m.
  logic signed [IW+1:0] s_re [LANES], s_im [LANES];
  always_comb begin
    logic signed [IW+1:0] zr [LANES], zi [LANES];
    for (int m = 0; m < LANES; m++) begin
      zr[m] = (IW + 2)'(in_re[m]);
      zi[m] = (IW + 2)'(in_im[m]);
    end
    s_re[0] = zr[0] + zr[1] + zr[2] + zr[3];
    s_im[0] = zi[0] + zi[1] + zi[2] + zi[3];
    s_re[1] = zr[0] - zi[1] - zr[2] + zi[3];     // a + jb - c - jd
    s_im[1] = zi[0] + zr[1] - zi[2] - zr[3];
    s_re[2] = zr[0] - zr[1] + zr[2] - zr[3];
    s_im[2] = zi[0] - zi[1] + zi[2] - zi[3];
    s_re[3] = zr[0] + zi[1] - zr[2] - zi[3];     // a - jb - c + jd
    s_im[3] = zi[0] - zr[1] - zi[2] + zr[3];
    for (int j = 0; j < LANES; j++) begin
      if (R4_SHIFT > 0) begin
        s_re[j] = (s_re[j] + (IW + 2)'(1 << (R4_SHIFT - 1))) >>> R4_SHIFT;
        s_im[j] = (s_im[j] + (IW + 2)'(1 << (R4_SHIFT - 1))) >>> R4_SHIFT;
      end
    end
  end

  logic signed [IW-1:0] a_re [LANES], a_im [LANES];
  logic [6:0]           a_k;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_k <= '0;
      for (int j = 0; j < LANES; j++) begin
        a_re[j] <= '0;
        a_im[j] <= '0;
      end
    end else if (in_valid) begin
      a_k <= bitrev7(pos);
      for (int j = 0; j < LANES; j++) begin
        a_re[j] <= IW'(s_re[j]);
        a_im[j] <= IW'(s_im[j]);
      end
    end
  end

  // Stage B: W_512^{-jk} on lanes 1..3.
  logic signed [IW-1:0] t_re [LANES], t_im [LANES];
  logic signed [IW-1:0] b_re [LANES], b_im [LANES];
  assign t_re[0] = a_re[0];
  assign t_im[0] = a_im[0];
  for (genvar j = 1; j < LANES; j++) begin : g_cm
    int unsigned e;
    assign e = j * int'(a_k);
    cmult_tw #(.W(IW)) u_cm (
      .xr(a_re[j]), .xi(a_im[j]), .wr(TWR[e]), .wi(TWI[e]), .yr(t_re[j]), .yi(t_im[j])
    );
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < LANES; j++) begin
        b_re[j] <= '0;
        b_im[j] <= '0;
      end
    end else if (in_valid) begin
      b_re <= t_re;
      b_im <= t_im;
    end
  end

  // Stage C: four 128-point DIT IFFTs.  They see two pipeline cycles of prologue, so
  // their own frame counters start two valid cycles late.
  logic [1:0] pro;
  logic       l_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          pro <= '0;
    else if (clear)                      pro <= '0;
    else if (in_valid && pro != 2'd2)    pro <= pro + 2'd1;
  end
  assign l_en = in_valid && (pro == 2'd2);

  logic signed [IW-1:0] y_re [LANES], y_im [LANES];
  logic                 l_valid [LANES], l_first [LANES], l_nosc [LANES];
  logic [6:0]           l_idx [LANES];
  for (genvar j = 0; j < LANES; j++) begin : g_lane
    fft128_sdf #(.DIT(1'b1), .INVERSE(1'b1), .W(IW), .SCALE_MASK(SCALE_MASK)) u_ifft (
      .clk(clk), .rst_n(rst_n), .en(l_en), .clear(clear), .in_noscale(1'b0),
      .in_re(b_re[j]), .in_im(b_im[j]),
      .out_re(y_re[j]), .out_im(y_im[j]),
      .out_valid(l_valid[j]), .out_first(l_first[j]), .out_noscale(l_nosc[j]),
      .out_idx(l_idx[j])
    );
    assign out_re[j] = sat_out(y_re[j]);
    assign out_im[j] = sat_out(y_im[j]);
  end
  assign out_valid = l_valid[0];
  assign out_first = l_first[0];
  assign out_n     = l_idx[0];
endmodule
