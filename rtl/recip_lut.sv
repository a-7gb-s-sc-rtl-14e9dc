// recip_lut: reciprocal by interpolated look-up table, the divider core of the MMSE
// equalizer and of the inverse-SNR computation.
//
// The input d is normalised to m * 2^e with m in [1, 2).  The IDX_B bits after the
// leading one address a table of 1/m, the next FR_B bits interpolate linearly between
// two neighbouring entries, so 10 bits of the mantissa are used (the source specifies
// a 10-bit interpolated inverse LUT followed by a multiplier).  The table holds
// T[i] = round(2^RB * 2^IDX_B / (2^IDX_B + i)), i = 0..2^IDX_B, and is computed at
// elaboration.  Result: 1/d ~= r * 2^-(e + RB).  d = 0 is treated as d = 1.
//
// Timing: two-stage pipeline (normalise and table read, then interpolate), latency 2
// cycles, one result per cycle, matching the source's 2-cycle divider.  The caller
// multiplies its numerator by r and shifts by e.
module recip_lut #(
  parameter int DIN_W = 32,
  parameter int IDX_B = 6,
  parameter int FR_B  = 4,
  parameter int RB    = 11,
  localparam int EW   = $clog2(DIN_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIN_W-1:0] d,
  output logic [RB:0]      r,
  output logic [EW-1:0]    e
);
  localparam int NT = (1 << IDX_B) + 1;
  typedef logic [RB:0] tab_t [NT];
  function automatic tab_t mk();
    tab_t t;
    for (int i = 0; i < NT; i++) begin
      longint num, den;
      num = longint'(64'd1 << (RB + IDX_B + 1));
      den = longint'(1 << IDX_B) + longint'(i);  // 2^IDX_B + i
      t[i] = (RB + 1)'((num / den + 1) / 2);
    end
    return t;
  endfunction
  localparam tab_t TAB = mk();

  // Stage 1: leading-one detection, normalisation, table read.
  logic [EW-1:0]    lz_pos;
  logic [DIN_W-1:0] norm;
  logic [IDX_B-1:0] idx;
  logic [FR_B-1:0]  frc;
  always_comb begin
    lz_pos = '0;
    for (int i = 0; i < DIN_W; i++) if (d[i]) lz_pos = EW'(i);
    norm = d << (EW'(DIN_W - 1) - lz_pos);
    {idx, frc} = norm[DIN_W-2 -: IDX_B + FR_B];
  end

  logic [RB:0]     t0, t1;
  logic [FR_B-1:0] frc_q;
  logic [EW-1:0]   e_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t0    <= '0;
      t1    <= '0;
      frc_q <= '0;
      e_q   <= '0;
    end else begin
      t0    <= TAB[(IDX_B + 1)'(idx)];
      t1    <= TAB[(IDX_B + 1)'(idx) + (IDX_B + 1)'(1)];
      frc_q <= frc;
      e_q   <= lz_pos;
    end
  end

  // Stage 2: linear interpolation r = t0 - (t0 - t1) * frc / 2^FR_B.
  logic [RB+FR_B+1:0] dlt;
  assign dlt = (RB + FR_B + 2)'(t0 - t1) * (RB + FR_B + 2)'(frc_q);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
      e <= '0;
    end else begin
      r <= t0 - (RB + 1)'(dlt >> FR_B);
      e <= e_q;
    end
  end
endmodule
