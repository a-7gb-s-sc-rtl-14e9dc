// sdf_stage: one radix-2 single-path delay feedback (SDF) butterfly stage.
//
// A block of 2*D samples streams through the stage.  The first D samples are parked in
// a D-word feedback FIFO built from registers (the source builds all FFT FIFOs from
// standard-cell registers for floorplan freedom).  While the second D samples arrive,
// each is combined with the FIFO word of the same index: the sum leaves at once and the
// difference goes back into the FIFO, to leave while the next block's first half comes
// in.  Two flavours share the structure:
//   DIT = 0  decimation in frequency: natural-order input; the difference is multiplied
//            by W_{2D}^n as it leaves the FIFO.  A chain with D = 64..1 is a 128-point
//            FFT with bit-reversed output.
//   DIT = 1  decimation in time: the second-half input is multiplied by W_{2D}^k before
//            the butterfly.  A chain with D = 1..64 takes bit-reversed input and gives
//            natural-order output.
// INVERSE conjugates the twiddles.  scale (a per-frame input) halves the butterfly
// outputs with rounding; otherwise they saturate to W bits.
//
// Timing: the stage advances only on cycles with en = 1, so a frame's tail leaves the
// stage while the next frame enters.  cnt is the position of the current input within
// its 2*D block, supplied by the parent; output lags input by D + 1 enabled cycles.
module sdf_stage
  import eq_pkg::*;
#(
  parameter int D       = 64,
  parameter bit DIT     = 1'b0,
  parameter bit INVERSE = 1'b0,
  parameter int W       = 11,
  localparam int CW     = $clog2(2 * D)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [CW-1:0]       cnt,
  input  logic                scale,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  // Twiddle table W_{2D}^n, n = 0..D-1.
  typedef logic signed [TW_W-1:0] tw_t [D];
  function automatic tw_t mk_re();
    tw_t t;
    for (int n = 0; n < D; n++) t[n] = tw_re(n, 2 * D);
    return t;
  endfunction
  function automatic tw_t mk_im();
    tw_t t;
    for (int n = 0; n < D; n++) t[n] = tw_im(n, 2 * D, INVERSE);
    return t;
  endfunction
  localparam tw_t TWR = mk_re();
  localparam tw_t TWI = mk_im();

  function automatic logic signed [W-1:0] fold(logic signed [W:0] v, logic sc);
    logic signed [W:0] r;
    if (sc) begin
      r = (v + (W + 1)'(1)) >>> 1;
      return r[W-1:0];
    end
    if (v > (W + 1)'((2 ** (W - 1)) - 1)) return W'((2 ** (W - 1)) - 1);
    if (v < -(W + 1)'(2 ** (W - 1)))      return W'(-(2 ** (W - 1)));
    return v[W-1:0];
  endfunction

  logic signed [W-1:0] fifo_re [D];
  logic signed [W-1:0] fifo_im [D];
  logic signed [W-1:0] fo_re, fo_im;       // oldest FIFO word
  logic signed [W-1:0] fi_re, fi_im;       // word entering the FIFO
  logic signed [W-1:0] o_re, o_im;         // stage output before the register
  logic signed [W-1:0] m_re, m_im;         // twiddle multiplier input
  logic signed [W-1:0] p_re, p_im;         // twiddle multiplier output
  logic signed [TW_W-1:0] w_re, w_im;
  logic                second;
  int unsigned         idx;

  assign fo_re  = fifo_re[D-1];
  assign fo_im  = fifo_im[D-1];
  assign second = cnt[CW-1];
  assign idx    = int'(cnt) % D;

  always_comb begin
    w_re = TWR[idx];
    w_im = TWI[idx];
    if (DIT) begin
      m_re = in_re;
      m_im = in_im;
    end else begin
      m_re = fo_re;
      m_im = fo_im;
    end
  end

  cmult_tw #(.W(W)) u_tw (
    .xr(m_re), .xi(m_im), .wr(w_re), .wi(w_im), .yr(p_re), .yi(p_im)
  );

  always_comb begin
    logic signed [W-1:0] b_re, b_im;
    b_re = DIT ? p_re : in_re;
    b_im = DIT ? p_im : in_im;
    if (!second) begin
      fi_re = in_re;
      fi_im = in_im;
      o_re  = DIT ? fo_re : p_re;
      o_im  = DIT ? fo_im : p_im;
    end else begin
      o_re  = fold((W + 1)'(fo_re) + (W + 1)'(b_re), scale);
      o_im  = fold((W + 1)'(fo_im) + (W + 1)'(b_im), scale);
      fi_re = fold((W + 1)'(fo_re) - (W + 1)'(b_re), scale);
      fi_im = fold((W + 1)'(fo_im) - (W + 1)'(b_im), scale);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_re <= '0;
      out_im <= '0;
      for (int i = 0; i < D; i++) begin
        fifo_re[i] <= '0;
        fifo_im[i] <= '0;
      end
    end else if (en) begin
      out_re     <= o_re;
      out_im     <= o_im;
      fifo_re[0] <= fi_re;
      fifo_im[0] <= fi_im;
      for (int i = 1; i < D; i++) begin
        fifo_re[i] <= fifo_re[i-1];
        fifo_im[i] <= fifo_im[i-1];
      end
    end
  end
endmodule
