// tb_serial3w: checks the 3-wire configuration interface.
//
// Drives 24-bit frames (read flag, 7-bit address, 16 data bits, MSB first on rising
// sclk) as a host would.  Checks: reset values (control 0, threshold 43); writes to the
// control and threshold registers read back unchanged and appear on the cfg_* outputs
// after the two-flop synchroniser (within three core cycles); each status register
// reads back the value on its input; writes to read-only or unknown addresses change
// nothing; an aborted frame (sen dropped early) does not write.
module tb_serial3w;
  import eq_pkg::*;
  logic sclk = 1'b0, sen = 1'b0, sdi = 1'b0, sdo, rst_n = 1'b1, clk_core = 1'b0;
  logic [15:0] st_sig = 16'h1234, st_noise = 16'h0567, st_snr_inv = 16'h89ab;
  logic [15:0] st_prbs_err = 16'h0003, st_prbs_words = 16'hbeef;
  logic st_est_done = 1'b1;
  eq_mode_e cfg_mode;
  mod_e cfg_mod;
  cp_e cfg_cp;
  logic cfg_prbs_restart;
  logic [2:0] cfg_nshift;
  logic [9:0] cfg_thr;
  int checks = 0, failures = 0;

  serial3w dut (.*);

  always #4 clk_core = ~clk_core;
  initial #1 rst_n = 1'b0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(logic rd, logic [6:0] a, logic [15:0] d, int nbits,
                       output logic [15:0] q);
    logic [23:0] f;
    f = {rd, a, d};
    q = '0;
    sen = 1'b1;
    for (int i = 23; i >= 24 - nbits; i--) begin
      sdi = f[i];
      #50 sclk = 1'b1;
      if (i < 16) q[i] = sdo;
      #50 sclk = 1'b0;
    end
    #50 sen = 1'b0;
    #100;
  endtask

  function automatic void chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endfunction

  initial begin
    logic [15:0] q;
    #20 rst_n = 1'b1;
    frame(1'b1, 7'h00, 16'h0, 24, q);
    chk(q == 16'h0000, "control reset");
    frame(1'b1, 7'h01, 16'h0, 24, q);
    chk(q == 16'd43 && cfg_thr == 10'd43, "threshold reset");
    // control write: OFDM, 16QAM, CP 1/4, restart, shift 5
    frame(1'b0, 7'h00, 16'hBD, 24, q);
    repeat (3) @(posedge clk_core);
    chk(cfg_mode == MODE_OFDM && cfg_mod == MOD_QAM16 && cfg_cp == CP_128 &&
        cfg_prbs_restart && cfg_nshift == 3'd5, "control outputs");
    frame(1'b1, 7'h00, 16'h0, 24, q);
    chk(q == 16'h00BD, $sformatf("control read %h", q));
    frame(1'b0, 7'h01, 16'd300, 24, q);
    repeat (3) @(posedge clk_core);
    chk(cfg_thr == 10'd300, "threshold output");
    // aborted write
    frame(1'b0, 7'h01, 16'd7, 20, q);
    frame(1'b1, 7'h01, 16'h0, 24, q);
    chk(q == 16'd300, "aborted frame ignored");
    // read-only and unknown addresses
    frame(1'b0, 7'h10, 16'h5555, 24, q);
    frame(1'b0, 7'h7F, 16'h5555, 24, q);
    frame(1'b1, 7'h10, 16'h0, 24, q);
    chk(q == st_sig, "signal power");
    frame(1'b1, 7'h11, 16'h0, 24, q);
    chk(q == st_noise, "noise power");
    frame(1'b1, 7'h12, 16'h0, 24, q);
    chk(q == st_snr_inv, "inverse SNR");
    frame(1'b1, 7'h13, 16'h0, 24, q);
    chk(q == st_prbs_err, "prbs errors");
    frame(1'b1, 7'h14, 16'h0, 24, q);
    chk(q == st_prbs_words, "prbs words");
    frame(1'b1, 7'h15, 16'h0, 24, q);
    chk(q == 16'h0001, "status");
    frame(1'b1, 7'h7F, 16'h0, 24, q);
    chk(q == 16'h0000, "unknown address");
    frame(1'b1, 7'h00, 16'h0, 24, q);
    chk(q == 16'h00BD, "control unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
