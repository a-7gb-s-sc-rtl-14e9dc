// cmult_tw: complex multiply of a data sample by a quantised twiddle factor.
//
// (xr + j*xi) * (wr + j*wi) is formed with four real products, rounded back to the
// data format by dropping TW_FRAC fraction bits (round half up) and saturated to W
// bits, since a unit-magnitude twiddle can still grow one component by sqrt(2).
// Purely combinational; the caller registers the result.  The rounding and
// saturation are this design's choice: the source only states that each FFT stage
// truncates and scales so that the processors keep at least 31 dB SQNR.
module cmult_tw
  import eq_pkg::*;
#(
  parameter int W = 11
) (
  input  logic signed [W-1:0]    xr,
  input  logic signed [W-1:0]    xi,
  input  logic signed [TW_W-1:0] wr,
  input  logic signed [TW_W-1:0] wi,
  output logic signed [W-1:0]    yr,
  output logic signed [W-1:0]    yi
);
  localparam int PW = W + TW_W + 1;

  function automatic logic signed [W-1:0] sat(logic signed [PW-1:0] v);
    logic signed [PW-1:0] hi;
    logic signed [PW-1:0] lo;
    hi = PW'((2 ** (W - 1)) - 1);
    lo = -PW'(2 ** (W - 1));
    if (v > hi) return hi[W-1:0];
    if (v < lo) return lo[W-1:0];
    return v[W-1:0];
  endfunction

  logic signed [PW-1:0] pr, pi;

  always_comb begin
    pr = PW'(xr) * PW'(wr) - PW'(xi) * PW'(wi);
    pi = PW'(xr) * PW'(wi) + PW'(xi) * PW'(wr);
    pr = (pr + PW'(1 << (TW_FRAC - 1))) >>> TW_FRAC;
    pi = (pi + PW'(1 << (TW_FRAC - 1))) >>> TW_FRAC;
    yr = sat(pr);
    yi = sat(pi);
  end
endmodule
