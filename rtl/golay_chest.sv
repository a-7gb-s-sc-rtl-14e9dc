// golay_chest: back end of the Golay channel estimator.
//
// The FFT turns the two correlator windows into the cross-correlation spectra FC_ra
// (frame tagged CES_A) and FC_rb (frame tagged CES_B), four bins per cycle.  This block
//   * stores FC_ra in an SRAM (cfr_sram) while FC_rb is being computed,
//   * reads FC_ra back bin by bin as FC_rb arrives and forms the CFR
//       H = (FC_ra + FC_rb) / 2                                   (source eq. 1)
//     which it writes to the CFR memory through the cfr_* port,
//   * accumulates the signal power S = (1/512) sum |H|^2            (eq. 2)
//     and the noise power N = (1/1024) sum_x sum |H - FC_rx|^2     (eq. 3)
//     with squaring circuits, adders and accumulators,
//   * computes the inverse SNR N/S with the reciprocal table and one multiplier.
// Memory words and the CFR port hold the four complex bins of one FFT output position,
// lane m in bits [22m+21:22m] as {re, im}; the address is the output position.
//
// Timing: FC_ra bins are written as they arrive.  Each FC_rb bin is registered while
// its FC_ra partner is read (1 cycle), and H is written one cycle later.  sig_pow and
// noise_pow are valid two cycles after the last FC_rb bin, snr_inv two cycles after
// that, when est_done rises (it stays high until the next CES_A frame begins).
// snr_inv has SNR_FRAC fraction bits and saturates at 16 bits.  NP_W = 24 leaves
// headroom above the largest S and N that 11-bit bins can produce, so synthesis finds a
// few top bits of the power outputs constant; the width is kept as one common power
// format shared with the equalizer's noise input.
module golay_chest
  import eq_pkg::*;
#(
  parameter int D_W      = 11,
  parameter int NP_W     = 24,
  parameter int SNR_FRAC = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  fc_valid,
  input  frame_tag_e            fc_tag,
  input  logic [6:0]            fc_pos,
  input  logic signed [D_W-1:0] fc_re [LANES],
  input  logic signed [D_W-1:0] fc_im [LANES],
  output logic                  cfr_we,
  output logic [6:0]            cfr_addr,
  output logic [LANES*2*D_W-1:0] cfr_wdata,
  output logic [NP_W-1:0]       sig_pow,
  output logic [NP_W-1:0]       noise_pow,
  output logic [15:0]           snr_inv,
  output logic                  est_done
);
  localparam int WW = LANES * 2 * D_W;
  localparam int RB = 11;

  // FC_ra buffer.
  logic [WW-1:0] fc_word, fa_word;
  logic          fa_we;
  always_comb begin
    for (int m = 0; m < LANES; m++) begin
      fc_word[m*2*D_W +: 2*D_W] = {fc_re[m], fc_im[m]};
    end
  end
  assign fa_we = fc_valid && (fc_tag == TAG_CES_A);

  cfr_sram #(.DEPTH(128), .DW(WW)) u_fca (
    .clk(clk), .we(fa_we), .waddr(fc_pos), .wdata(fc_word),
    .raddr(fc_pos), .rdata(fa_word)
  );

  // Stage 1: hold the FC_rb bin while its FC_ra partner is read.
  logic          b1_valid;
  logic [6:0]    b1_pos;
  logic [WW-1:0] b1_word;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b1_valid <= 1'b0;
      b1_pos   <= '0;
      b1_word  <= '0;
    end else begin
      b1_valid <= fc_valid && (fc_tag == TAG_CES_B);
      b1_pos   <= fc_pos;
      b1_word  <= fc_word;
    end
  end

  function automatic logic [31:0] sq(logic signed [31:0] v);
    return 32'(v * v);
  endfunction

  // Stage 2: average, powers, accumulate.
  logic [WW-1:0] h_word;
  logic [31:0]   s_term, n_term;
  always_comb begin
    s_term = '0;
    n_term = '0;
    for (int m = 0; m < LANES; m++) begin
      logic signed [D_W-1:0] ar, ai, br, bi, hr, hi;
      logic signed [D_W:0]   sr, si, dar, dai, dbr, dbi;
      {ar, ai} = fa_word[m*2*D_W +: 2*D_W];
      {br, bi} = b1_word[m*2*D_W +: 2*D_W];
      sr = ((D_W + 1)'(ar) + (D_W + 1)'(br) + (D_W + 1)'(1)) >>> 1;
      si = ((D_W + 1)'(ai) + (D_W + 1)'(bi) + (D_W + 1)'(1)) >>> 1;
      hr = sr[D_W-1:0];
      hi = si[D_W-1:0];
      h_word[m*2*D_W +: 2*D_W] = {hr, hi};
      dar = (D_W + 1)'(hr) - (D_W + 1)'(ar);
      dai = (D_W + 1)'(hi) - (D_W + 1)'(ai);
      dbr = (D_W + 1)'(hr) - (D_W + 1)'(br);
      dbi = (D_W + 1)'(hi) - (D_W + 1)'(bi);
      s_term += sq(32'(hr)) + sq(32'(hi));
      n_term += sq(32'(dar)) + sq(32'(dai)) + sq(32'(dbr)) + sq(32'(dbi));
    end
  end

  logic [31:0] s_acc, n_acc, s_new, n_new;
  logic        fin1;
  assign s_new = (b1_pos == 7'd0) ? s_term : s_acc + s_term;
  assign n_new = (b1_pos == 7'd0) ? n_term : n_acc + n_term;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfr_we    <= 1'b0;
      cfr_addr  <= '0;
      cfr_wdata <= '0;
      s_acc     <= '0;
      n_acc     <= '0;
      sig_pow   <= '0;
      noise_pow <= '0;
      fin1      <= 1'b0;
    end else begin
      cfr_we    <= b1_valid;
      cfr_addr  <= b1_pos;
      cfr_wdata <= h_word;
      fin1      <= 1'b0;
      if (b1_valid) begin
        s_acc <= s_new;
        n_acc <= n_new;
        if (b1_pos == 7'd127) begin
          sig_pow   <= NP_W'(s_new >> 9);
          noise_pow <= NP_W'(n_new >> 10);
          fin1      <= 1'b1;
        end
      end
    end
  end

  // Inverse SNR: N * (1/S).
  logic [RB:0] rcp;
  logic [4:0]  rex;
  logic [1:0]  fin_d;
  logic [NP_W+RB+SNR_FRAC:0] q;
  always_comb begin
    q = (NP_W + RB + SNR_FRAC + 1)'(noise_pow) * (NP_W + RB + SNR_FRAC + 1)'(rcp);
    q = (q << SNR_FRAC) >> (int'(rex) + RB);
  end
  recip_lut #(.DIN_W(NP_W), .RB(RB)) u_rcp (
    .clk(clk), .rst_n(rst_n), .d(sig_pow), .r(rcp), .e(rex)
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fin_d    <= '0;
      snr_inv  <= '0;
      est_done <= 1'b0;
    end else begin
      fin_d <= {fin_d[0], fin1};
      if (fc_valid && fc_tag == TAG_CES_A && fc_pos == 7'd0) est_done <= 1'b0;
      if (fin_d[1]) begin
        snr_inv  <= (q > 65535) ? 16'hFFFF : q[15:0];
        est_done <= 1'b1;
      end
    end
  end
endmodule
