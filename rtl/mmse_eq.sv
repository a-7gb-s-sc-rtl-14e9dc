// mmse_eq: frequency-domain MMSE one-tap equalizer, four bins per cycle.
//
// Each received bin Y is corrected with the noise-regularised inverse of the channel
// frequency response H:
//     Z = 2^OUT_FRAC * Y * conj(H) / (|H|^2 + N)
// where N is the noise power estimated by the channel estimator in the same units as
// |H|^2.  With N = 0 this is the zero-forcing inverse; a positive N limits the gain at
// channel nulls, which is where MMSE beats ZF.  The source writes the regulariser as
// the inverse SNR added to a power-normalised |H|^2; multiplying both by the signal
// power S gives the form used here, so the per-bin division needs no extra multiply.
// The division is a reciprocal look-up (recip_lut, 2 cycles) followed by a multiplier,
// as in the source.
//
// Word lengths: Y and H are the FFT's 11-bit words; Z is 11 bits, Z = 256 * Y/H without
// noise, saturated.  OUT_FRAC = 8 compensates the FFT's divide-by-32 of payload frames
// against the unscaled CES frames that give H (design choices).
//
// Timing: free-running 4-stage pipeline (product and denominator, 2 reciprocal stages,
// scaling); in_valid travels with the data, out_valid is in_valid 4 cycles later.
module mmse_eq
  import eq_pkg::*;
#(
  parameter int D_W      = 11,
  parameter int NP_W     = 24,
  parameter int OUT_FRAC = 8,
  parameter int RB       = 11
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [D_W-1:0] y_re [LANES],
  input  logic signed [D_W-1:0] y_im [LANES],
  input  logic signed [D_W-1:0] h_re [LANES],
  input  logic signed [D_W-1:0] h_im [LANES],
  input  logic [NP_W-1:0]       noise,
  output logic                  out_valid,
  output logic signed [D_W-1:0] z_re [LANES],
  output logic signed [D_W-1:0] z_im [LANES]
);
  localparam int PW  = 2 * D_W + 1;      // Y * conj(H) component
  localparam int DW  = NP_W + 1;         // denominator
  localparam int EW  = $clog2(DW);
  localparam int QW  = PW + RB + 1;      // product with the reciprocal

  logic [3:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[2:0], in_valid};
  end
  assign out_valid = vpipe[3];

  function automatic logic signed [D_W-1:0] sat(logic signed [QW-1:0] v);
    if (v > QW'((2 ** (D_W - 1)) - 1)) return D_W'((2 ** (D_W - 1)) - 1);
    if (v < -QW'(2 ** (D_W - 1)))      return D_W'(-(2 ** (D_W - 1)));
    return v[D_W-1:0];
  endfunction

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic signed [PW-1:0] p_re1, p_im1, p_re2, p_im2, p_re3, p_im3;
    logic [DW-1:0]        den1;
    logic [RB:0]          rcp;
    logic [EW-1:0]        ex;

    // Stage 1: Y * conj(H) and |H|^2 + N.
    logic [2*D_W:0] mag;
    logic [DW:0]    dsum;
    always_comb begin
      mag  = (2 * D_W + 1)'(PW'(h_re[l]) * PW'(h_re[l]) + PW'(h_im[l]) * PW'(h_im[l]));
      dsum = (DW + 1)'(mag) + (DW + 1)'(noise);
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        p_re1 <= '0;
        p_im1 <= '0;
        den1  <= '0;
      end else begin
        p_re1 <= PW'(y_re[l]) * PW'(h_re[l]) + PW'(y_im[l]) * PW'(h_im[l]);
        p_im1 <= PW'(y_im[l]) * PW'(h_re[l]) - PW'(y_re[l]) * PW'(h_im[l]);
        den1  <= dsum[DW] ? '1 : dsum[DW-1:0];
      end
    end

    // Stages 2-3: reciprocal of the denominator; the numerator waits alongside.
    recip_lut #(.DIN_W(DW), .RB(RB)) u_rcp (
      .clk(clk), .rst_n(rst_n), .d(den1), .r(rcp), .e(ex)
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        p_re2 <= '0;
        p_im2 <= '0;
        p_re3 <= '0;
        p_im3 <= '0;
      end else begin
        p_re2 <= p_re1;
        p_im2 <= p_im1;
        p_re3 <= p_re2;
        p_im3 <= p_im2;
      end
    end

    // Stage 4: Z = round(P * r / 2^(e + RB - OUT_FRAC)).
    logic signed [QW-1:0] qr, qi;
    int                   sh;
    always_comb begin
        qr = QW'(p_re3) * QW'({1'b0, rcp});
        qi = QW'(p_im3) * QW'({1'b0, rcp});
        sh = int'(ex) + RB - OUT_FRAC;
        if (sh > 0) begin
          qr = (qr + (QW'(1) <<< (sh - 1))) >>> sh;
          qi = (qi + (QW'(1) <<< (sh - 1))) >>> sh;
        end else begin
          qr = qr <<< (-sh);
          qi = qi <<< (-sh);
        end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        z_re[l] <= '0;
        z_im[l] <= '0;
      end else begin
        z_re[l] <= sat(qr);
        z_im[l] <= sat(qi);
      end
    end
  end
endmodule
