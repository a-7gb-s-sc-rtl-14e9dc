// serial3w: 3-wire serial configuration and test interface.
//
// A PC drives sclk (sub-MHz), sen (frame enable, active high) and sdi; read data
// return on sdo (the chip's bidirectional data pin is split into sdi/sdo here).  A frame
// is 24 bits, MSB first, sampled on rising sclk edges while sen is high:
//   bit 23 = 1 for read, bits 22:16 = register address, bits 15:0 = write data.
// A write takes effect after the 24th bit.  For a read, the addressed register is
// loaded after the 8th bit and shifted out on sdo on the next 16 falling sclk edges.
// sen low between frames clears the frame state (asynchronously, as sclk is idle).
//
// Register map (design choice; the source says only that operating configurations are
// set and results read back through this interface):
//   0x00  control:   [0] mode (0 SC-FDE, 1 OFDM), [2:1] modulation, [3] CP 1/4 (else
//                    1/8), [4] PRBS checker restart, [7:5] regulariser shift: the
//                    equalizer adds N >> shift to |H|^2, 7 = no regulariser (ZF)
//   0x01  demapper 16QAM threshold [9:0]
//   0x10  signal power S [15:0]       (read only, core status)
//   0x11  noise power N [15:0]
//   0x12  inverse SNR [15:0]
//   0x13  PRBS bit errors, 0x14 PRBS words, 0x15 status [0] estimate done
//
// Clocking: the registers live in the sclk domain.  Configuration is quasi-static and
// crosses into the core domain through a two-flop synchroniser per bit; status words
// are sampled in the sclk domain when a read is decoded (they must be stable then).
module serial3w
  import eq_pkg::*;
(
  input  logic        sclk,
  input  logic        sen,
  input  logic        sdi,
  output logic        sdo,
  input  logic        rst_n,
  input  logic        clk_core,
  input  logic [15:0] st_sig,
  input  logic [15:0] st_noise,
  input  logic [15:0] st_snr_inv,
  input  logic [15:0] st_prbs_err,
  input  logic [15:0] st_prbs_words,
  input  logic        st_est_done,
  output eq_mode_e    cfg_mode,
  output mod_e        cfg_mod,
  output cp_e         cfg_cp,
  output logic        cfg_prbs_restart,
  output logic [2:0]  cfg_nshift,
  output logic [9:0]  cfg_thr
);
  logic [23:0] sr;
  logic [4:0]  nbit;
  logic [15:0] ctrl_q, thr_q, rd_sh;
  logic [23:0] nsr;
  assign nsr = {sr[22:0], sdi};

  function automatic logic [15:0] rd_mux(logic [6:0] a);
    case (a)
      7'h00:   return ctrl_q;
      7'h01:   return thr_q;
      7'h10:   return st_sig;
      7'h11:   return st_noise;
      7'h12:   return st_snr_inv;
      7'h13:   return st_prbs_err;
      7'h14:   return st_prbs_words;
      7'h15:   return {15'd0, st_est_done};
      default: return 16'h0000;
    endcase
  endfunction

  // Frame state: sen low clears the bit counter asynchronously, since sclk is idle
  // between frames.
  logic frm_rst_n;
  assign frm_rst_n = rst_n & sen;
  always_ff @(posedge sclk or negedge frm_rst_n) begin
    if (!frm_rst_n) begin
      sr   <= '0;
      nbit <= '0;
    end else begin
      sr   <= nsr;
      nbit <= (nbit == 5'd24) ? nbit : nbit + 5'd1;
    end
  end

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q <= '0;
      thr_q  <= 16'd43;
    end else if (sen && nbit == 5'd23 && !nsr[23]) begin
      case (nsr[22:16])
        7'h00:   ctrl_q <= nsr[15:0];
        7'h01:   thr_q  <= nsr[15:0];
        default: ;
      endcase
    end
  end

  // Read data leave on falling edges.
  always_ff @(negedge sclk or negedge rst_n) begin
    if (!rst_n) begin
      rd_sh <= '0;
    end else if (sen && nbit == 5'd8 && sr[7]) begin
      rd_sh <= rd_mux(sr[6:0]);
    end else if (sen) begin
      rd_sh <= {rd_sh[14:0], 1'b0};
    end
  end
  assign sdo = rd_sh[15];

  // Configuration into the core clock domain.
  logic [15:0] c_meta, c_sync, t_meta, t_sync;
  always_ff @(posedge clk_core or negedge rst_n) begin
    if (!rst_n) begin
      c_meta <= '0;
      c_sync <= '0;
      t_meta <= 16'd43;
      t_sync <= 16'd43;
    end else begin
      c_meta <= ctrl_q;
      c_sync <= c_meta;
      t_meta <= thr_q;
      t_sync <= t_meta;
    end
  end
  assign cfg_mode         = eq_mode_e'(c_sync[0]);
  assign cfg_mod          = mod_e'(c_sync[2:1]);
  assign cfg_cp           = cp_e'(c_sync[3]);
  assign cfg_prbs_restart = c_sync[4];
  assign cfg_nshift       = c_sync[7:5];
  assign cfg_thr          = t_sync[9:0];
endmodule
