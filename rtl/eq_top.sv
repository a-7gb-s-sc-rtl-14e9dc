// eq_top: 4-parallel SC-FDE / OFDM MMSE equalizer for 60 GHz receivers.
//
// Four received samples per core clock (lane j = sample 4n+j) enter rx_*.  A packet
// starts with two Golay channel-estimation sequences CES a and CES b of 256 samples,
// each followed by a 128-sample postfix, during which ces_on is high; then come
// 512-sample payload blocks, each preceded by a cyclic prefix of 64 or 128 samples.
//
// Channel estimation (ces_on): the 4-parallel Golay correlator produces C'_ra and
// C'_rb.  A 128-sample window of C'_ra starting at the CES a correlation peak, padded
// with zeros to 512, is one FFT frame (tag CES_A); the same window of C'_rb for CES b
// is the next frame (tag CES_B).  CES b's window arrives 96 cycles after CES a's, while
// a frame lasts 128 cycles, so it waits 32 cycles in a register delay line.  The
// estimator back end averages the two spectra into the CFR H, stores it, and computes
// the signal power, the noise power N and the inverse SNR.
//
// The CES frames pass the FFT without its internal down-scaling, so H is the exact DFT
// of the windowed correlator output.
//
// Payload: the cyclic prefix is dropped and each 512-sample block goes through the
// same FFT (tag DATA), which divides by 32.  Each bin is equalized with
// Z = 256*Y*conj(H)/(|H|^2 + N'), N' =
// N >> shift (shift set by the configuration, 7 meaning zero-forcing).  In SC-FDE mode
// the 512-point IFFT returns Z to the time domain and the symbols are demapped; in OFDM
// mode the IFFT is idle and the bins are demapped directly.  Demapped bits feed a PRBS
// checker and the output multiplexer that drives the two LVDS lanes.
//
// Clocks: clk_in is the high-speed input clock; the core runs on clk_core = clk_in / 8
// (brought out so the sample source can be clocked by it); the output multiplexer runs
// on clk_in; the 3-wire interface on sclk.
//
// Timing rules of this implementation (design choices):
//   * rx_valid is high on every cycle of the CES part (ces_on); payload samples may
//     have bubbles.
//   * The FFT is needed for 256 cycles after CES a starts plus 72 cycles of correlator
//     and window latency; ces_busy is high meanwhile and payload must wait for it.
//   * The correlator keeps running while the estimator is busy, so the last lags of
//     the CES b window are complete even if rx_valid stops after the CES.
//   * The first CES sample of a packet restarts the FFT and IFFT frame counters and
//     the frame-tag queue, dropping anything a previous packet left in the pipelines.
//   * FFT and IFFT are data-driven pipelines (latency 136 core cycles each): a frame
//     leaves while later ones enter, so the bits of the last payload block of a burst
//     leave only after 2 further blocks (OFDM) or 3 further blocks (SC-FDE) have been
//     fed in.  A burst is flushed by such trailing blocks (their content is ignored).
//   * OFDM bins leave in FFT order: output cycle p, lane m is bin bitrev7(p) + 128m.
//
// Lint notes: the FFT's out_k and the IFFT's out_first/out_n are position indices that
// the top does not need (it tracks frames with its own tag queue); the wires stay so
// the connections are explicit, and the lint tools report them as unused.
module eq_top
  import eq_pkg::*;
#(
  parameter int SEQ_L   = 256,   // Golay CES length
  parameter int POST    = 128,   // CES postfix length
  parameter int CIR_LEN = 128    // channel impulse response window
) (
  input  logic              clk_in,
  input  logic              rst_n,
  output logic              clk_core,
  // received samples (core clock domain)
  input  logic              rx_valid,
  input  logic              ces_on,
  input  logic signed [6:0] rx_re [LANES],
  input  logic signed [6:0] rx_im [LANES],
  output logic              ces_busy,
  // 3-wire serial interface
  input  logic              sclk,
  input  logic              sen,
  input  logic              sdi,
  output logic              sdo,
  // built-in test symbol source
  input  logic              tst_en,
  output logic              tst_valid,
  output logic signed [6:0] tst_re [LANES],
  output logic signed [6:0] tst_im [LANES],
  // demodulated bits and status
  output logic              dem_valid,
  output logic [15:0]       dem_bits,
  output logic              est_done,
  output logic [15:0]       prbs_err,
  output logic [15:0]       prbs_words,
  // to the two LVDS output drivers
  output logic [1:0]        lvds_data,
  output logic              lvds_valid
);
  localparam int WOFF = SEQ_L - 1;            // correlator output at the CES a peak
  localparam int A0   = 8 + 1 + WOFF / 4;     // core cycle of the first window sample
  localparam int ROT  = WOFF % 4;             // lane rotation of the window
  localparam int BOFF = (SEQ_L + POST) / 4;   // CES b window start, cycles after a
  localparam int BDLY = NSUB - BOFF;          // wait of the b window for its frame
  localparam int WCYC = CIR_LEN / 4;          // window length in cycles
  localparam int EEND = A0 + 2 * NSUB;        // end of the estimation feed
  localparam int CCW  = $clog2(EEND + 1);

  // ---------------------------------------------------------------- clocks, config
  logic [2:0] phase;
  clk_div8 u_div (.clk_in(clk_in), .rst_n(rst_n), .clk_core(clk_core), .phase(phase));

  eq_mode_e   cfg_mode;
  mod_e       cfg_mod;
  cp_e        cfg_cp;
  logic       cfg_prbs_restart;
  logic [2:0] cfg_nshift;
  logic [9:0] cfg_thr;
  logic [23:0] sig_pow, noise_pow;
  logic [15:0] snr_inv;

  function automatic logic [15:0] sat16(logic [23:0] v);
    return (v > 24'hFFFF) ? 16'hFFFF : v[15:0];
  endfunction

  serial3w u_ser (
    .sclk(sclk), .sen(sen), .sdi(sdi), .sdo(sdo), .rst_n(rst_n), .clk_core(clk_core),
    .st_sig(sat16(sig_pow)), .st_noise(sat16(noise_pow)), .st_snr_inv(snr_inv),
    .st_prbs_err(prbs_err), .st_prbs_words(prbs_words), .st_est_done(est_done),
    .cfg_mode(cfg_mode), .cfg_mod(cfg_mod), .cfg_cp(cfg_cp),
    .cfg_prbs_restart(cfg_prbs_restart), .cfg_nshift(cfg_nshift), .cfg_thr(cfg_thr)
  );

  // ---------------------------------------------------------------- Golay correlator
  logic signed [6:0] ra_re [LANES], ra_im [LANES], rb_re [LANES], rb_im [LANES];
  logic              est_busy;   // estimator owns the FFT (see CES sequencing)
  golay_corr4 u_corr (
    .clk(clk_core), .rst_n(rst_n), .in_valid((rx_valid && ces_on) || est_busy),
    .in_re(rx_re), .in_im(rx_im),
    .ra_re(ra_re), .ra_im(ra_im), .rb_re(rb_re), .rb_im(rb_im)
  );

  // ---------------------------------------------------------------- CES sequencing
  logic [CCW-1:0] cc;
  always_ff @(posedge clk_core or negedge rst_n) begin
    if (!rst_n) begin
      est_busy <= 1'b0;
      cc       <= '0;
    end else if (!est_busy) begin
      if (rx_valid && ces_on) begin
        est_busy <= 1'b1;
        cc       <= CCW'(1);
      end
    end else begin
      cc <= cc + CCW'(1);
      if (cc == CCW'(EEND - 1)) est_busy <= 1'b0;
    end
  end
  assign ces_busy = est_busy;

  // A new CES restarts the FFT and IFFT frame counters, dropping whatever a previous
  // packet left in the pipelines (its flush blocks or a partial frame).
  logic ces_start;
  assign ces_start = !est_busy && rx_valid && ces_on;

  // Window extraction: lane j of a window cycle is correlator sample 4(c-1) + ROT + j,
  // taken from the previous and the current correlator output.
  logic signed [6:0] pa_re [LANES], pa_im [LANES], pb_re [LANES], pb_im [LANES];
  logic signed [6:0] wa_re [LANES], wa_im [LANES], wb_re [LANES], wb_im [LANES];
  always_ff @(posedge clk_core or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin
        pa_re[l] <= '0; pa_im[l] <= '0; pb_re[l] <= '0; pb_im[l] <= '0;
      end
    end else begin
      pa_re <= ra_re; pa_im <= ra_im; pb_re <= rb_re; pb_im <= rb_im;
    end
  end
  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      if (ROT + j < LANES) begin
        wa_re[j] = pa_re[ROT + j]; wa_im[j] = pa_im[ROT + j];
        wb_re[j] = pb_re[ROT + j]; wb_im[j] = pb_im[ROT + j];
      end else begin
        wa_re[j] = ra_re[ROT + j - LANES]; wa_im[j] = ra_im[ROT + j - LANES];
        wb_re[j] = rb_re[ROT + j - LANES]; wb_im[j] = rb_im[ROT + j - LANES];
      end
    end
  end

  // Delay line holding the CES b window until its FFT frame starts.
  logic signed [6:0] dl_re [BDLY][LANES], dl_im [BDLY][LANES];
  always_ff @(posedge clk_core or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BDLY; i++)
        for (int l = 0; l < LANES; l++) begin
          dl_re[i][l] <= '0;
          dl_im[i][l] <= '0;
        end
    end else if (est_busy) begin
      dl_re[0] <= wb_re;
      dl_im[0] <= wb_im;
      for (int i = 1; i < BDLY; i++) begin
        dl_re[i] <= dl_re[i-1];
        dl_im[i] <= dl_im[i-1];
      end
    end
  end

  // ---------------------------------------------------------------- payload framing
  logic [7:0] bc;          // position within CP + block
  logic       cfr_ok;      // a channel estimate exists
  logic [7:0] cpc;
  assign cpc = (cfg_cp == CP_128) ? 8'd32 : 8'd16;
  always_ff @(posedge clk_core or negedge rst_n) begin
    if (!rst_n) begin
      bc     <= '0;
      cfr_ok <= 1'b0;
    end else if (est_busy || ces_on) begin
      bc <= '0;
      if (est_busy && cc == CCW'(EEND - 1)) cfr_ok <= 1'b1;
    end else if (rx_valid && cfr_ok) begin
      bc <= (bc == cpc + 8'd127) ? 8'd0 : bc + 8'd1;
    end
  end

  // ---------------------------------------------------------------- FFT input mux
  logic              fft_iv, frame_start;
  frame_tag_e        start_tag;
  logic signed [6:0] fi_re [LANES], fi_im [LANES];
  logic [CCW-1:0]    ca;
  assign ca = cc - CCW'(A0);
  always_comb begin
    fft_iv      = 1'b0;
    frame_start = 1'b0;
    start_tag   = TAG_NONE;
    for (int l = 0; l < LANES; l++) begin
      fi_re[l] = '0;
      fi_im[l] = '0;
    end
    if (est_busy) begin
      if (cc >= CCW'(A0)) begin
        fft_iv = 1'b1;
        if (ca < CCW'(WCYC)) begin
          fi_re = wa_re;
          fi_im = wa_im;
        end else if (ca >= CCW'(NSUB) && ca < CCW'(NSUB + WCYC)) begin
          fi_re = dl_re[BDLY-1];
          fi_im = dl_im[BDLY-1];
        end
        if (ca == CCW'(0)) begin
          frame_start = 1'b1;
          start_tag   = TAG_CES_A;
        end else if (ca == CCW'(NSUB)) begin
          frame_start = 1'b1;
          start_tag   = TAG_CES_B;
        end
      end
    end else if (!ces_on && rx_valid && cfr_ok && bc >= cpc) begin
      fft_iv = 1'b1;
      fi_re  = rx_re;
      fi_im  = rx_im;
      if (bc == cpc) begin
        frame_start = 1'b1;
        start_tag   = TAG_DATA;
      end
    end
  end

  // ---------------------------------------------------------------- 512-point FFT
  logic               fo_v, fo_first;
  logic [6:0]         fo_pos, fo_k;
  logic signed [10:0] fo_re [LANES], fo_im [LANES];
  fft512_4p u_fft (
    .clk(clk_core), .rst_n(rst_n), .in_valid(fft_iv), .clear(ces_start), .in_noscale(est_busy),
    .in_re(fi_re), .in_im(fi_im),
    .out_valid(fo_v), .out_first(fo_first), .out_pos(fo_pos), .out_k(fo_k),
    .out_re(fo_re), .out_im(fo_im)
  );

  // Frame tags travel beside the FFT pipeline.
  frame_tag_e tq [4];
  logic [1:0] tq_wr, tq_rd;
  frame_tag_e cur_tag, ftag;
  always_ff @(posedge clk_core or negedge rst_n) begin
    if (!rst_n) begin
      tq_wr   <= '0;
      tq_rd   <= '0;
      cur_tag <= TAG_NONE;
      for (int i = 0; i < 4; i++) tq[i] <= TAG_NONE;
    end else begin
      if (ces_start) begin
        tq_wr   <= '0;
        tq_rd   <= '0;
        cur_tag <= TAG_NONE;
      end else begin
        if (frame_start) begin
          tq[tq_wr] <= start_tag;
          tq_wr     <= tq_wr + 2'd1;
        end
        if (fo_first) begin
          cur_tag <= tq[tq_rd];
          tq_rd   <= tq_rd + 2'd1;
        end
      end
    end
  end
  assign ftag = fo_first ? tq[tq_rd] : cur_tag;

  // ---------------------------------------------------------------- estimator back end
  logic        cfr_we;
  logic [6:0]  cfr_waddr;
  logic [87:0] cfr_wdata, cfr_rdata;
  golay_chest u_chest (
    .clk(clk_core), .rst_n(rst_n), .fc_valid(fo_v), .fc_tag(ftag), .fc_pos(fo_pos),
    .fc_re(fo_re), .fc_im(fo_im), .cfr_we(cfr_we), .cfr_addr(cfr_waddr),
    .cfr_wdata(cfr_wdata), .sig_pow(sig_pow), .noise_pow(noise_pow), .snr_inv(snr_inv),
    .est_done(est_done)
  );

  cfr_sram #(.DEPTH(128), .DW(88)) u_cfr (
    .clk(clk_core), .we(cfr_we), .waddr(cfr_waddr), .wdata(cfr_wdata),
    .raddr(fo_pos), .rdata(cfr_rdata)
  );

  // ---------------------------------------------------------------- MMSE equalizer
  logic               yv1, yv2;
  logic signed [10:0] y1_re [LANES], y1_im [LANES], y2_re [LANES], y2_im [LANES];
  logic signed [10:0] h2_re [LANES], h2_im [LANES];
  logic [23:0]        reg_n;
  always_ff @(posedge clk_core or negedge rst_n) begin
    if (!rst_n) begin
      yv1   <= 1'b0;
      yv2   <= 1'b0;
      reg_n <= '0;
      for (int l = 0; l < LANES; l++) begin
        y1_re[l] <= '0; y1_im[l] <= '0; y2_re[l] <= '0; y2_im[l] <= '0;
        h2_re[l] <= '0; h2_im[l] <= '0;
      end
    end else begin
      yv1   <= fo_v && (ftag == TAG_DATA);
      y1_re <= fo_re;
      y1_im <= fo_im;
      yv2   <= yv1;
      y2_re <= y1_re;
      y2_im <= y1_im;
      for (int l = 0; l < LANES; l++) {h2_re[l], h2_im[l]} <= cfr_rdata[l*22 +: 22];
      reg_n <= (cfg_nshift == 3'd7) ? 24'd0 : noise_pow >> cfg_nshift;
    end
  end

  logic               zv;
  logic signed [10:0] z_re [LANES], z_im [LANES];
  mmse_eq u_eq (
    .clk(clk_core), .rst_n(rst_n), .in_valid(yv2), .y_re(y2_re), .y_im(y2_im),
    .h_re(h2_re), .h_im(h2_im), .noise(reg_n), .out_valid(zv), .z_re(z_re), .z_im(z_im)
  );

  // ---------------------------------------------------------------- 512-point IFFT
  logic              xv, xfirst;
  logic [6:0]        xn;
  logic signed [7:0] x_re [LANES], x_im [LANES];
  logic              if_v;
  assign if_v = zv && cfg_mode == MODE_SCFDE;   // the IFFT is idle in OFDM mode
  ifft512_4p u_ifft (
    .clk(clk_core), .rst_n(rst_n), .in_valid(if_v), .clear(ces_start),
    .in_re(z_re), .in_im(z_im), .out_valid(xv), .out_first(xfirst), .out_n(xn),
    .out_re(x_re), .out_im(x_im)
  );


  // ---------------------------------------------------------------- demapper
  logic               dv;
  logic signed [10:0] d_re [LANES], d_im [LANES];
  always_comb begin
    if (cfg_mode == MODE_SCFDE) begin
      dv = xv;
      for (int l = 0; l < LANES; l++) begin
        d_re[l] = 11'(x_re[l]);
        d_im[l] = 11'(x_im[l]);
      end
    end else begin
      dv   = zv;
      d_re = z_re;
      d_im = z_im;
    end
  end

  qam_demod #(.IW(11)) u_dem (
    .clk(clk_core), .rst_n(rst_n), .mod_sel(cfg_mod), .thr(cfg_thr), .in_valid(dv),
    .in_re(d_re), .in_im(d_im), .out_valid(dem_valid), .bits(dem_bits)
  );

  // ---------------------------------------------------------------- built-in test
  logic [15:0] tx_bits;
  prbs_gen u_txprbs (
    .clk(clk_core), .rst_n(rst_n), .mod_sel(cfg_mod), .restart(cfg_prbs_restart),
    .en(tst_en), .bits(tx_bits)
  );
  qam_mod u_map (
    .clk(clk_core), .rst_n(rst_n), .mod_sel(cfg_mod), .in_valid(tst_en), .bits(tx_bits),
    .out_valid(tst_valid), .out_re(tst_re), .out_im(tst_im)
  );
  prbs_chk u_chk (
    .clk(clk_core), .rst_n(rst_n), .mod_sel(cfg_mod), .restart(cfg_prbs_restart),
    .in_valid(dem_valid), .bits(dem_bits), .err_cnt(prbs_err), .word_cnt(prbs_words)
  );

  // ---------------------------------------------------------------- output multiplexer
  out_mux u_omux (
    .clk_in(clk_in), .rst_n(rst_n), .phase(phase), .mod_sel(cfg_mod),
    .word_valid(dem_valid), .word(dem_bits), .ser_data(lvds_data), .ser_valid(lvds_valid)
  );

  // The two window offsets must fit one FFT frame.
  initial begin
    assert (BOFF <= NSUB && WCYC <= BOFF && CIR_LEN <= POST)
      else $error("CES window geometry does not fit a 128-cycle FFT frame");
  end
endmodule
