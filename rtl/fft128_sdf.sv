// fft128_sdf: 128-point radix-2 single-path delay feedback FFT/IFFT, 7 stages.
//
// This is the per-lane engine of the 4-parallel 512-point processors: seven
// sdf_stage instances in a pipeline, one sample per enabled cycle.
//   DIT = 0  (used by the FFT)  natural-order input, bit-reversed output; FIFO depths
//            64, 32, ..., 1.
//   DIT = 1  (used by the IFFT) bit-reversed input, natural-order output; FIFO depths
//            1, 2, ..., 64.  Pairing the two removes any reorder buffer between the
//            FFT, the equalizer and the IFFT.
// SCALE_MASK bit s halves the outputs of stage s; the other stages grow into the W-bit
// word with saturation.  A frame whose in_noscale is high at its first sample is
// computed with no halving at all (exact DFT, saturating); the flag follows the frame
// through the stages and leaves as out_noscale.  INVERSE conjugates all twiddles.
//
// Timing: everything advances on en only.  A frame is 128 enabled input cycles; its
// first output appears LAT = 134 enabled cycles after its first input, so the last
// part of a frame is pushed out by the next one.  out_first marks output index 0 of
// a frame and out_idx counts output positions 0..127 within it.  clear (checked before
// en) empties the pipeline's frame bookkeeping: counters restart at the next sample
// and no output is marked valid until a new frame has passed through.
module fft128_sdf
  import eq_pkg::*;
#(
  parameter bit       DIT        = 1'b0,
  parameter bit       INVERSE    = 1'b0,
  parameter int       W          = 11,
  parameter bit [6:0] SCALE_MASK = 7'b1110000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                clear,       // synchronous restart of the frame counters
  input  logic                in_noscale,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im,
  output logic                out_valid,
  output logic                out_first,
  output logic                out_noscale,
  output logic [6:0]          out_idx
);
  localparam int NST = 7;
  localparam int LAT = 127 + NST;   // sum of FIFO depths plus one register per stage

  function automatic int depth(int s);
    return DIT ? (1 << s) : (64 >> s);
  endfunction
  function automatic int lat_before(int s);
    int l;
    l = 0;
    for (int i = 0; i < s; i++) l += depth(i) + 1;
    return l;
  endfunction

  logic [8:0] gcnt;      // enabled input samples, modulo 512
  logic       fl [4];    // no-scale flag of frames gcnt[8:7]
  logic [8:0] seen;      // saturating count up to LAT for out_valid
  logic signed [W-1:0] d_re [NST+1];
  logic signed [W-1:0] d_im [NST+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gcnt <= '0;
      seen <= '0;
      for (int i = 0; i < 4; i++) fl[i] <= 1'b0;
    end else if (clear) begin
      gcnt <= '0;
      seen <= '0;
    end else if (en) begin
      gcnt <= gcnt + 9'd1;
      if (gcnt[6:0] == 7'd0) fl[gcnt[8:7]] <= in_noscale;
      if (seen < 9'(LAT)) seen <= seen + 9'd1;
    end
  end

  assign d_re[0] = in_re;
  assign d_im[0] = in_im;

  for (genvar s = 0; s < NST; s++) begin : g_st
    localparam int DS = depth(s);
    localparam int CWS = $clog2(2 * DS);
    logic [8:0] lc;
    logic       fcur, sc;
    assign lc   = gcnt - 9'(lat_before(s));
    // The frame now entering stage s began lat_before(s) samples ago; at the first
    // sample of a frame its flag is still being written, so take it from the input.
    assign fcur = (gcnt[6:0] == 7'd0 && lc[8:7] == gcnt[8:7]) ? in_noscale : fl[lc[8:7]];
    assign sc   = SCALE_MASK[s] && !fcur;
    sdf_stage #(
      .D(DS), .DIT(DIT), .INVERSE(INVERSE), .W(W)
    ) u_stage (
      .clk(clk), .rst_n(rst_n), .en(en), .cnt(lc[CWS-1:0]), .scale(sc),
      .in_re(d_re[s]), .in_im(d_im[s]), .out_re(d_re[s+1]), .out_im(d_im[s+1])
    );
  end

  logic [8:0] oc;
  assign oc          = gcnt - 9'(LAT);
  assign out_noscale = fl[oc[8:7]];
  assign out_re    = d_re[NST];
  assign out_im    = d_im[NST];
  assign out_valid = en && (seen == 9'(LAT));
  assign out_idx   = oc[6:0];
  assign out_first = out_valid && (oc[6:0] == 7'd0);
endmodule
