// tb_eq_top: end-to-end test of the equalizer chip at its default (full) size.
//
// What it does: configures the chip over the 3-wire interface, checks the built-in
// test mapper against a reference PRBS-15 / 16QAM model, then receives four packets
// through a multipath channel with noise and checks every demodulated bit:
//   packet 1: SC-FDE, 16QAM, CP 1/8 (64 samples), zero-forcing (shift 7)
//   packet 2: OFDM,   QPSK,  CP 1/4 (128 samples), MMSE (shift 0)
//   packet 3: SC-FDE, 16QAM signal demapped as QPSK (sign bits), CP 1/4, MMSE, after
//             the OFDM packet, with stale IFFT frames of packet 1 still in the pipeline
//   packet 4: SC-FDE, 16QAM signal demapped as BPSK (in-phase sign), CP 1/8, MMSE/4
// Each packet is CES a (48*Ca + 128-sample postfix), CES b (48*Cb + postfix), then three
// data blocks whose bits come from the same PRBS-15 as the on-chip checker, then
// flush blocks (three for SC-FDE, two for OFDM).  Payload input has random bubbles.
//
// How: the channel h = 0.8 + (0.2+0.12j) z^-2 + (-0.08+0.06j) z^-5 is applied to the
// whole sample stream, +-1 uniform noise is added and the result is rounded and clipped
// to 7 bits.  OFDM blocks are c * IDFT(X) with the QPSK bins X placed so that output
// cycle p, lane m carries bin bitrev7(p) + 128m, the chip's output order.
// Checks: every demodulated word of the data blocks against the transmitted bits; the
// PRBS checker error count once it has seen the data words; est_done and the status
// registers read back over the 3-wire interface; the LVDS lane stream reassembled into
// words against dem_bits; the rms error of the equalized symbols; the 136-cycle FFT
// latency is implied by the word order.  All parameters of eq_top are at their defaults.
// Mechanisms counted and required to occur: CES estimation, SC-FDE and OFDM paths,
// both CP lengths, input bubbles, ZF and MMSE settings, 16QAM, QPSK and BPSK demapping, stale
// frame discard at a new CES, LVDS output words, 3-wire reads.
module tb_eq_top;
  import eq_pkg::*;
  localparam int NBLK = 3;
  localparam int NFL_SC = 3, NFL_OF = 2;   // trailing blocks that push the last data block out
  localparam real HR [3] = '{0.8, 0.2, -0.08};
  localparam real HI [3] = '{0.0, 0.12, 0.06};
  localparam int  HD [3] = '{0, 2, 5};

  logic clk_in = 1'b0, rst_n = 1'b1, clk_core;
  logic rx_valid = 1'b0, ces_on = 1'b0, ces_busy;
  logic signed [6:0] rx_re [LANES], rx_im [LANES];
  logic sclk = 1'b0, sen = 1'b0, sdi = 1'b0, sdo;
  logic tst_en = 1'b0, tst_valid;
  logic signed [6:0] tst_re [LANES], tst_im [LANES];
  logic dem_valid, est_done, lvds_valid;
  logic [15:0] dem_bits, prbs_err, prbs_words;
  logic [1:0] lvds_data;

  int checks = 0, failures = 0;
  int n_est = 0, n_scfde = 0, n_ofdm = 0, n_cp64 = 0, n_cp128 = 0, n_bubble = 0;
  int n_zf = 0, n_mmse = 0, n_qam16 = 0, n_qpsk = 0, n_bpsk = 0, n_lvds = 0, n_rd = 0, n_drop = 0;

  eq_top dut (.*);

  always #1 clk_in = ~clk_in;

  initial begin
    for (int l = 0; l < LANES; l++) begin
      rx_re[l] = '0;
      rx_im[l] = '0;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endfunction

  // ------------------------------------------------------------ reference PRBS-15
  logic [14:0] pst;
  function automatic logic [15:0] prbs_word(int nb);
    logic [15:0] w;
    logic nbit;
    w = '0;
    for (int i = 0; i < nb; i++) begin
      nbit = pst[14] ^ pst[13];
      w[i] = nbit;
      pst = {pst[13:0], nbit};
    end
    return w;
  endfunction

  function automatic int lvl16(logic neg, logic inner);
    int a;
    a = inner ? 16 : 48;
    return neg ? -a : a;
  endfunction

  // ------------------------------------------------------------ 3-wire access
  task automatic sw(logic [6:0] a, logic [15:0] d);
    logic [23:0] f;
    f = {1'b0, a, d};
    sen = 1'b1;
    for (int i = 23; i >= 0; i--) begin
      sdi = f[i];
      #20 sclk = 1'b1;
      #20 sclk = 1'b0;
    end
    #20 sen = 1'b0;
    #40;
  endtask

  task automatic sr(logic [6:0] a, output logic [15:0] d);
    logic [23:0] f;
    f = {1'b1, a, 16'h0};
    sen = 1'b1;
    for (int i = 23; i >= 0; i--) begin
      sdi = f[i];
      #20 sclk = 1'b1;
      if (i < 16) d[i] = sdo;
      #20 sclk = 1'b0;
    end
    #20 sen = 1'b0;
    #40;
    n_rd++;
  endtask

  task automatic cfg(bit mode, mod_e m, bit cp, int nsh);
    logic [15:0] c;
    c = 16'({nsh[2:0], 1'b0, cp, m, mode});
    sw(7'h00, c | 16'h0010);     // restart PRBS generator and checker
    repeat (4) @(posedge clk_core);
    sw(7'h00, c);
    repeat (4) @(posedge clk_core);
  endtask

  // ------------------------------------------------------------ Golay pair
  int ca [256], cb [256];
  initial begin
    int a [256], b [256], ta [256], tb2 [256];
    int dl;
    for (int i = 0; i < 256; i++) begin
      a[i] = (i == 0);
      b[i] = (i == 0);
    end
    for (int k = 0; k < 8; k++) begin
      dl = 1 << k;
      for (int i = 0; i < 256; i++) begin
        int bd;
        bd = (i >= dl) ? b[i - dl] : 0;
        ta[i] = a[i] + bd;
        tb2[i] = a[i] - bd;
      end
      a = ta;
      b = tb2;
    end
    for (int i = 0; i < 256; i++) begin
      ca[i] = a[255 - i];
      cb[i] = b[255 - i];
    end
  end

  // ------------------------------------------------------------ packet builder
  real txr [$], txi [$];         // transmitted samples of the current packet
  int  rxr [$], rxi [$];         // received, quantised
  logic [15:0] exp_w [$];        // expected demodulated words of the data blocks
  int ces_len;

  function automatic int bitrev7(int p);
    int r;
    r = 0;
    for (int i = 0; i < 7; i++) if (p & (1 << i)) r |= 1 << (6 - i);
    return r;
  endfunction

  task automatic build(bit ofdm, int cp);
    real xr [512], xi [512];
    int  nb;
    txr.delete();
    txi.delete();
    rxr.delete();
    rxi.delete();
    exp_w.delete();
    for (int i = 0; i < 384; i++) begin
      txr.push_back(48.0 * ca[i % 256]);
      txi.push_back(0.0);
    end
    for (int i = 0; i < 384; i++) begin
      txr.push_back(48.0 * cb[i % 256]);
      txi.push_back(0.0);
    end
    ces_len = 768;
    pst = 15'h7FFF;
    nb = ofdm ? 8 : 16;
    for (int blk = 0; blk < NBLK + (ofdm ? NFL_OF : NFL_SC); blk++) begin
      bit flush;
      flush = blk >= NBLK;
      for (int n = 0; n < 512; n++) begin
        xr[n] = 0.0;
        xi[n] = 0.0;
      end
      if (!ofdm) begin
        for (int n = 0; n < 128; n++) begin
          logic [15:0] w;
          w = flush ? 16'h0 : prbs_word(16);
          if (!flush) exp_w.push_back(w);
          for (int j = 0; j < LANES; j++) begin
            xr[4 * n + j] = flush ? 0.0 : real'(lvl16(w[4 * j], w[4 * j + 1]));
            xi[4 * n + j] = flush ? 0.0 : real'(lvl16(w[4 * j + 2], w[4 * j + 3]));
          end
        end
      end else if (!flush) begin
        real br [512], bi [512];
        for (int p = 0; p < 128; p++) begin
          logic [15:0] w;
          w = prbs_word(8);
          exp_w.push_back(w);
          for (int m = 0; m < LANES; m++) begin
            int k;
            k = bitrev7(p) + 128 * m;
            br[k] = w[2 * m] ? -1.0 : 1.0;
            bi[k] = w[2 * m + 1] ? -1.0 : 1.0;
          end
        end
        for (int n = 0; n < 512; n++) begin
          real sr_, si_;
          sr_ = 0.0;
          si_ = 0.0;
          for (int k = 0; k < 512; k++) begin
            real c, s;
            c = $cos(2.0 * 3.14159265358979 * real'((n * k) % 512) / 512.0);
            s = $sin(2.0 * 3.14159265358979 * real'((n * k) % 512) / 512.0);
            sr_ += br[k] * c - bi[k] * s;
            si_ += br[k] * s + bi[k] * c;
          end
          xr[n] = 200.0 * sr_ / 512.0;
          xi[n] = 200.0 * si_ / 512.0;
        end
      end
      for (int n = 0; n < cp; n++) begin
        txr.push_back(xr[512 - cp + n]);
        txi.push_back(xi[512 - cp + n]);
      end
      for (int n = 0; n < 512; n++) begin
        txr.push_back(xr[n]);
        txi.push_back(xi[n]);
      end
    end
    // channel, noise, quantisation
    for (int n = 0; n < txr.size(); n++) begin
      real yr, yi;
      int qr, qi;
      yr = 0.0;
      yi = 0.0;
      for (int t = 0; t < 3; t++)
        if (n >= HD[t]) begin
          yr += HR[t] * txr[n - HD[t]] - HI[t] * txi[n - HD[t]];
          yi += HR[t] * txi[n - HD[t]] + HI[t] * txr[n - HD[t]];
        end
      qr = int'($floor(yr + 0.5)) + int'($urandom_range(0, 2)) - 1;
      qi = int'($floor(yi + 0.5)) + int'($urandom_range(0, 2)) - 1;
      rxr.push_back(qr > 63 ? 63 : (qr < -64 ? -64 : qr));
      rxi.push_back(qi > 63 ? 63 : (qi < -64 ? -64 : qi));
    end
  endtask

  // ------------------------------------------------------------ drive
  task automatic drive_packet(int cp);
    int idx;
    @(posedge clk_core);
    for (int c = 0; c < ces_len / 4; c++) begin
      rx_valid <= 1'b1;
      ces_on   <= 1'b1;
      for (int j = 0; j < LANES; j++) begin
        rx_re[j] <= 7'(rxr[4 * c + j]);
        rx_im[j] <= 7'(rxi[4 * c + j]);
      end
      @(posedge clk_core);
      if (c == 0) chk(ces_busy == 1'b0, "ces_busy before CES");
    end
    rx_valid <= 1'b0;
    ces_on   <= 1'b0;
    @(posedge clk_core);
    chk(ces_busy == 1'b1, "ces_busy during estimation");
    while (ces_busy) @(posedge clk_core);
    n_est++;
    repeat (3) @(posedge clk_core);
    idx = ces_len;
    while (idx < rxr.size()) begin
      if ($urandom_range(0, 9) == 0) begin
        rx_valid <= 1'b0;
        n_bubble++;
      end else begin
        rx_valid <= 1'b1;
        for (int j = 0; j < LANES; j++) begin
          rx_re[j] <= 7'(rxr[idx + j]);
          rx_im[j] <= 7'(rxi[idx + j]);
        end
        idx += 4;
      end
      @(posedge clk_core);
    end
    rx_valid <= 1'b0;
    repeat (200) @(posedge clk_core);
  endtask

  // ------------------------------------------------------------ capture
  logic [15:0] got_w [$];
  logic [15:0] lv_w [$];
  always @(posedge clk_core) if (dem_valid) got_w.push_back(dem_bits);

  // LVDS: rebuild each word from the two lanes (bit i of a half on sub-cycle i for
  // 16QAM, i*2..i*2+1 for QPSK).
  logic [7:0] lv0, lv1;
  always @(negedge clk_in) begin
    if (lvds_valid) begin
      int s;
      s = int'(dut.u_omux.sub);
      if (dut.cfg_mod == MOD_QAM16) begin
        lv0[s] = lvds_data[0];
        lv1[s] = lvds_data[1];
        if (s == 7) lv_w.push_back({lv1, lv0});
      end else if (dut.cfg_mod == MOD_QPSK) begin
        if (s[0] == 1'b0) begin
          lv0[s / 2] = lvds_data[0];
          lv1[s / 2] = lvds_data[1];
        end
        if (s == 7) lv_w.push_back({8'h0, lv1[3:0], lv0[3:0]});
      end else if (dut.cfg_mod == MOD_BPSK) begin
        if (s[1:0] == 2'd0) begin
          lv0[s / 4] = lvds_data[0];
          lv1[s / 4] = lvds_data[1];
        end
        if (s == 7) lv_w.push_back({12'h0, lv1[1:0], lv0[1:0]});
      end
    end
  end

  // Pipeline restarts at a CES while a previous packet's frames are in flight.
  always @(posedge clk_core) if (dut.ces_start && dut.u_ifft.pos != 0) n_drop++;

  // ------------------------------------------------------------ packet check
  task automatic check_packet(string name, int nb_words);
    int nerr, werr;
    logic [15:0] rd;
    nerr = 0;
    werr = 0;
    chk(got_w.size() >= exp_w.size(), $sformatf("%s: %0d words, expected >= %0d", name,
        got_w.size(), exp_w.size()));
    for (int i = 0; i < exp_w.size() && i < got_w.size(); i++) begin
      logic [15:0] d;
      d = got_w[i] ^ exp_w[i];
      checks++;
      if (d != 0) begin
        werr++;
        nerr += $countones(d);
        if (werr <= 5) $display("%s word %0d: got %h exp %h", name, i, got_w[i], exp_w[i]);
      end
    end
    if (werr != 0) failures++;
    $display("%s: %0d words compared, %0d bit errors", name, exp_w.size(), nerr);
    // LVDS stream equals the demodulated words
    chk(lv_w.size() == got_w.size(), $sformatf("%s: lvds words %0d vs %0d", name,
        lv_w.size(), got_w.size()));
    for (int i = 0; i < lv_w.size() && i < got_w.size(); i++)
      chk(lv_w[i] == got_w[i], $sformatf("%s: lvds word %0d %h vs %h", name, i, lv_w[i],
          got_w[i]));
    n_lvds += lv_w.size();
    // status over the 3-wire interface
    sr(7'h15, rd);
    chk(rd[0] == 1'b1 && est_done, $sformatf("%s: est_done read %h", name, rd));
    sr(7'h14, rd);
    chk(rd == prbs_words, $sformatf("%s: prbs words read %0d vs %0d", name, rd, prbs_words));
    sr(7'h11, rd);
    chk(rd == 16'(dut.noise_pow > 24'hFFFF ? 24'hFFFF : dut.noise_pow), "noise read");
    sr(7'h10, rd);
    chk(rd != 0, "signal power nonzero");
    $display("%s: S=%0d N=%0d snr_inv=%0d", name, dut.sig_pow, dut.noise_pow, dut.snr_inv);
    got_w.delete();
    lv_w.delete();
  endtask

  // PRBS checker errors when exactly the data words have been seen
  int snap_target = -1, snap_err = -1;
  always @(posedge clk_core)
    if (snap_target > 0 && int'(prbs_words) == snap_target && snap_err < 0)
      snap_err = int'(prbs_err);

  // Error vector of the SC-FDE 16QAM symbols before the demapper (ideal 64/48 * level).
  real e2 = 0.0;
  int  e_n = 0, e_w = 0;
  always @(posedge clk_core)
    if (dut.dv && dut.cfg_mode == MODE_SCFDE && dut.cfg_mod == MOD_QAM16 &&
        e_w < exp_w.size()) begin
      for (int j = 0; j < LANES; j++) begin
        real er, ei;
        er = real'(dut.d_re[j]) - 64.0 / 48.0 * lvl16(exp_w[e_w][4 * j], exp_w[e_w][4 * j + 1]);
        ei = real'(dut.d_im[j]) - 64.0 / 48.0 * lvl16(exp_w[e_w][4 * j + 2], exp_w[e_w][4 * j + 3]);
        e2 += er * er + ei * ei;
        e_n += 2;
      end
      e_w++;
    end

  // ------------------------------------------------------------ main
  initial begin
    logic [15:0] rd;
    #3 rst_n = 1'b0;            // a falling edge applies the asynchronous reset
    repeat (5) @(posedge clk_in);
    rst_n = 1'b1;
    repeat (4) @(posedge clk_core);

    // threshold register reset value and write/read back
    sr(7'h01, rd);
    chk(rd == 16'd43, $sformatf("threshold reset %0d", rd));
    sw(7'h01, 16'd43);

    // built-in test mapper: 16QAM from PRBS-15
    cfg(1'b0, MOD_QAM16, 1'b0, 7);
    pst = 15'h7FFF;
    fork
      begin
        @(posedge clk_core);
        tst_en <= 1'b1;
        repeat (64) @(posedge clk_core);
        tst_en <= 1'b0;
      end
      begin
        int seen;
        seen = 0;
        while (seen < 64) begin
          @(posedge clk_core);
          if (tst_valid) begin
            logic [15:0] w;
            w = prbs_word(16);
            for (int j = 0; j < LANES; j++) begin
              chk(int'(tst_re[j]) == lvl16(w[4 * j], w[4 * j + 1]) &&
                  int'(tst_im[j]) == lvl16(w[4 * j + 2], w[4 * j + 3]),
                  $sformatf("test mapper word %0d lane %0d: %0d,%0d w=%h gen=%h", seen, j, tst_re[j], tst_im[j], w, dut.tx_bits));
            end
            seen++;
          end
        end
      end
    join

    // packet 1: SC-FDE, 16QAM, CP 64, ZF
    cfg(1'b0, MOD_QAM16, 1'b0, 7);
    build(1'b0, 64);
    snap_target = NBLK * 128;
    snap_err = -1;
    got_w.delete();
    lv_w.delete();
    drive_packet(64);
    n_scfde++;
    n_cp64++;
    n_zf++;
    n_qam16++;
    chk(snap_err == 0, $sformatf("packet 1 PRBS checker errors %0d", snap_err));
    $display("SC-FDE 16QAM error vector rms %0.2f (outer level 64)", $sqrt(e2 / e_n));
    chk($sqrt(e2 / e_n) < 5.0, "SC-FDE error vector");
    check_packet("SC-FDE 16QAM", 16);

    // packet 2: OFDM, QPSK, CP 128, MMSE
    cfg(1'b1, MOD_QPSK, 1'b1, 0);
    build(1'b1, 128);
    snap_target = NBLK * 128;
    snap_err = -1;
    got_w.delete();
    lv_w.delete();
    drive_packet(128);
    n_ofdm++;
    n_cp128++;
    n_mmse++;
    n_qpsk++;
    chk(snap_err == 0, $sformatf("packet 2 PRBS checker errors %0d", snap_err));
    check_packet("OFDM QPSK", 8);

    // packet 3: SC-FDE again after the OFDM packet, QPSK, CP 128, MMSE; stale IFFT
    // frames of packet 1 must not appear.
    cfg(1'b0, MOD_QPSK, 1'b1, 0);
    begin
      // reuse the SC-FDE builder with QPSK levels: build 16QAM then remap words
      build(1'b0, 128);
    end
    snap_target = -1;
    got_w.delete();
    lv_w.delete();
    drive_packet(128);
    // the 16QAM signal demapped as QPSK gives the sign bits of each symbol
    for (int i = 0; i < exp_w.size(); i++) begin
      logic [15:0] w, q;
      w = exp_w[i];
      q = '0;
      for (int j = 0; j < LANES; j++) begin
        q[2 * j] = w[4 * j];
        q[2 * j + 1] = w[4 * j + 2];
      end
      exp_w[i] = q;
    end
    check_packet("SC-FDE QPSK after OFDM", 8);
    n_scfde++;

    // packet 4: SC-FDE, BPSK decisions (sign of the in-phase part), CP 64, MMSE with the
    // regulariser scaled down by 4.
    cfg(1'b0, MOD_BPSK, 1'b0, 2);
    build(1'b0, 64);
    snap_target = -1;
    got_w.delete();
    lv_w.delete();
    drive_packet(64);
    for (int i = 0; i < exp_w.size(); i++) begin
      logic [15:0] w, q;
      w = exp_w[i];
      q = '0;
      for (int j = 0; j < LANES; j++) q[j] = w[4 * j];
      exp_w[i] = q;
    end
    check_packet("SC-FDE BPSK", 4);
    n_scfde++;
    n_cp64++;
    n_mmse++;
    n_bpsk++;

    // every mechanism must have happened
    chk(n_est == 4, "estimation count");
    chk(n_scfde == 3 && n_ofdm == 1, "mode count");
    chk(n_cp64 > 0 && n_cp128 > 0, "CP lengths");
    chk(n_bubble > 0, "input bubbles");
    chk(n_zf > 0 && n_mmse > 0, "ZF and MMSE");
    chk(n_qam16 > 0 && n_qpsk > 0 && n_bpsk > 0, "16QAM, QPSK and BPSK");
    chk(n_lvds > 0, "LVDS words");
    chk(n_rd > 0, "3-wire reads");
    chk(n_drop > 0, "stale frame discard");
    $display("counts: est=%0d scfde=%0d ofdm=%0d cp64=%0d cp128=%0d bubbles=%0d zf=%0d mmse=%0d",
             n_est, n_scfde, n_ofdm, n_cp64, n_cp128, n_bubble, n_zf, n_mmse);
    $display("counts: qam16=%0d qpsk=%0d bpsk=%0d lvds_words=%0d reads=%0d dropped=%0d",
             n_qam16, n_qpsk, n_bpsk, n_lvds, n_rd, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
