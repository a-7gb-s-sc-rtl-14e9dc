// golay_corr4: 4-parallel, 8-stage Golay correlator (matched filter for a Golay pair).
//
// A serial Golay correlator for a length L = 2^N pair is a cascade of N stages; stage k
// takes a pair of streams (u, v) and forms
//     u_k(n) = (u_{k-1}(n) + w_k v_{k-1}(n - D_k)) / 2
//     v_k(n) = (u_{k-1}(n) - w_k v_{k-1}(n - D_k)) / 2
// with u_0 = v_0 = r, the received samples.  Only the v path is delayed, so the whole
// correlator holds sum(D_k) = L - 1 delay words, one delay element, one inverter and two
// adders per stage.  The halving at every stage (a one-bit shift) keeps the word length
// constant, as the source describes.  u_N is the correlation with the sequence Ca
// (C'_ra), v_N the correlation with its complement Cb (C'_rb), both scaled by 1/L.
//
// The 4-parallel version runs the same recursion on four samples per cycle: a delay of
// D samples becomes, for output lane j, input lane (j - D) mod 4 taken
// ceil((D - j)/4) cycles back.  The number of delay words stays L - 1; only the adders
// are replicated per lane.  Each stage output is registered (8-cycle latency), which
// is this design's choice.
//
// The transmitted CES sequences are the time-reversed impulse responses of the u and v
// paths: Ca(i) = a_N(L-1-i), where a_k = a_{k-1} + w_k z^-D_k b_{k-1},
// b_k = a_{k-1} - w_k z^-D_k b_{k-1}, a_0 = b_0 = delta.  The source does not give the
// delays D_k or the weights w_k; DLY and WNEG are parameters (defaults: D_k = 2^(k-1),
// all w_k = +1).
//
// Interface: lanes of IN_W-bit complex samples with in_valid; the pipeline advances on
// in_valid only and out_ra/out_rb at any valid cycle are the correlations ending with
// the sample that entered 8 valid cycles earlier.
module golay_corr4
  import eq_pkg::*;
#(
  parameter int       IN_W  = 7,
  parameter int       OUT_W = 7,
  parameter int       GB    = 4,
  parameter int       NST   = 8,
  parameter int       DLY [NST] = '{1, 2, 4, 8, 16, 32, 64, 128},
  parameter bit [NST-1:0] WNEG = '0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re [LANES],
  input  logic signed [IN_W-1:0]  in_im [LANES],
  output logic signed [OUT_W-1:0] ra_re [LANES],
  output logic signed [OUT_W-1:0] ra_im [LANES],
  output logic signed [OUT_W-1:0] rb_re [LANES],
  output logic signed [OUT_W-1:0] rb_im [LANES]
);
  localparam int CW = IN_W + GB;

  // u[k][c][lane], v[k][c][lane]: stream pair entering stage k, c = 0 real, 1 imag.
  logic signed [CW-1:0] u [NST+1][2][LANES];
  logic signed [CW-1:0] v [NST+1][2][LANES];

  for (genvar l = 0; l < LANES; l++) begin : g_in
    assign u[0][0][l] = CW'(in_re[l]) <<< GB;
    assign u[0][1][l] = CW'(in_im[l]) <<< GB;
    assign v[0][0][l] = CW'(in_re[l]) <<< GB;
    assign v[0][1][l] = CW'(in_im[l]) <<< GB;
  end

  for (genvar k = 0; k < NST; k++) begin : g_stage
    localparam int DK = DLY[k];
    localparam int HD = (DK + LANES - 1) / LANES;   // cycles of history needed
    for (genvar c = 0; c < 2; c++) begin : g_c
      logic signed [CW-1:0] hist [LANES][HD];       // hist[l][i]: lane l, i+1 cycles ago
      logic signed [CW-1:0] vd [LANES];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int l = 0; l < LANES; l++)
            for (int i = 0; i < HD; i++) hist[l][i] <= '0;
        end else if (in_valid) begin
          for (int l = 0; l < LANES; l++) begin
            hist[l][0] <= v[k][c][l];
            for (int i = 1; i < HD; i++) hist[l][i] <= hist[l][i-1];
          end
        end
      end
      for (genvar j = 0; j < LANES; j++) begin : g_lane
        localparam int SL = ((j - DK) % LANES + LANES) % LANES;   // source lane
        localparam int CB = (DK - j + SL) / LANES;                // cycles back
        logic signed [CW:0] sp, sm;
        if (CB == 0) begin : g_now
          assign vd[j] = v[k][c][SL];
        end else begin : g_old
          assign vd[j] = hist[SL][CB-1];
        end
        assign sp = WNEG[k] ? (CW + 1)'(u[k][c][j]) - (CW + 1)'(vd[j])
                            : (CW + 1)'(u[k][c][j]) + (CW + 1)'(vd[j]);
        assign sm = WNEG[k] ? (CW + 1)'(u[k][c][j]) + (CW + 1)'(vd[j])
                            : (CW + 1)'(u[k][c][j]) - (CW + 1)'(vd[j]);
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) begin
            u[k+1][c][j] <= '0;
            v[k+1][c][j] <= '0;
          end else if (in_valid) begin
            u[k+1][c][j] <= sp[CW:1];
            v[k+1][c][j] <= sm[CW:1];
          end
        end
      end
    end
  end

  function automatic logic signed [OUT_W-1:0] to_out(logic signed [CW-1:0] x);
    logic signed [CW:0] r;
    r = ((CW + 1)'(x) + (CW + 1)'(1 << (GB - 1))) >>> GB;
    if (r > (CW + 1)'((2 ** (OUT_W - 1)) - 1)) return OUT_W'((2 ** (OUT_W - 1)) - 1);
    if (r < -(CW + 1)'(2 ** (OUT_W - 1)))      return OUT_W'(-(2 ** (OUT_W - 1)));
    return r[OUT_W-1:0];
  endfunction

  for (genvar l = 0; l < LANES; l++) begin : g_out
    assign ra_re[l] = to_out(u[NST][0][l]);
    assign ra_im[l] = to_out(u[NST][1][l]);
    assign rb_re[l] = to_out(v[NST][0][l]);
    assign rb_im[l] = to_out(v[NST][1][l]);
  end
endmodule
