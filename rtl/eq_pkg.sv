// eq_pkg: constants, enums and helper functions shared by the 60 GHz SC-FDE/OFDM
// MMSE equalizer.
//
// The equalizer works on 512-sample blocks that arrive four samples per core clock
// (lane j of a cycle n carries sample 4n+j).  All FFT twiddle factors are generated
// here at elaboration time from cos/sin, quantised to TW_W bits with TW_FRAC
// fractional bits, so no table file is needed.  Saturation and rounding helpers keep
// the fixed-point conventions identical in every datapath block.
package eq_pkg;

  localparam int NFFT     = 512;          // block / FFT length
  localparam int LANES    = 4;            // samples per core clock
  localparam int NSUB     = NFFT / LANES; // 128-point sub-FFT length
  localparam int TW_W     = 12;           // twiddle word width (signed)
  localparam int TW_FRAC  = 10;           // twiddle fraction bits, 1.0 = 1024

  // Operating mode chosen by the CES_on / configuration logic.
  typedef enum logic {MODE_SCFDE = 1'b0, MODE_OFDM = 1'b1} eq_mode_e;

  // Symbol modulation used by the (de)mappers and the output multiplexer.
  typedef enum logic [1:0] {MOD_BPSK = 2'd0, MOD_QPSK = 2'd1, MOD_QAM16 = 2'd2} mod_e;

  // Cyclic prefix length: 1/8 or 1/4 of a 512-sample payload block.
  typedef enum logic {CP_64 = 1'b0, CP_128 = 1'b1} cp_e;

  // What a 512-sample frame in the FFT pipeline holds.
  typedef enum logic [1:0] {TAG_NONE = 2'd0, TAG_CES_A = 2'd1, TAG_CES_B = 2'd2,
                            TAG_DATA = 2'd3} frame_tag_e;

  // Twiddle W_N^k = exp(-j*2*pi*k/N) (or its conjugate when inv is set), quantised.
  function automatic logic signed [TW_W-1:0] tw_re(int k, int n);
    real a;
    a = 2.0 * 3.14159265358979323846 * real'(k) / real'(n);
    return TW_W'($rtoi($floor($cos(a) * real'(1 << TW_FRAC) + 0.5)));
  endfunction

  function automatic logic signed [TW_W-1:0] tw_im(int k, int n, bit inv);
    real a;
    real s;
    a = 2.0 * 3.14159265358979323846 * real'(k) / real'(n);
    s = inv ? $sin(a) : -$sin(a);
    return TW_W'($rtoi($floor(s * real'(1 << TW_FRAC) + 0.5)));
  endfunction

  // 7-bit bit reversal, used for the order in which the SDF FFT delivers bins.
  function automatic logic [6:0] bitrev7(logic [6:0] v);
    logic [6:0] r;
    for (int i = 0; i < 7; i++) r[i] = v[6-i];
    return r;
  endfunction

endpackage
