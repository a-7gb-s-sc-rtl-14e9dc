// qam_demod: 4-parallel hard-decision demapper for BPSK, QPSK and Gray-coded 16QAM.
//
// One symbol per lane per cycle.  Per symbol: b0 = (re < 0); for QPSK b1 = (im < 0);
// for 16QAM b1 = (|re| < thr), b2 = (im < 0), b3 = (|im| < thr), i.e. the levels
// -3,-1,+1,+3 carry (b0,b1) = 10, 11, 01, 00.  thr is the decision boundary between
// the inner and outer amplitude (2x the inner level) and is programmable because the
// equalized amplitude depends on the transmitter scaling.  Lane l's bits occupy
// bits[NB*l +: NB] with NB = 1, 2 or 4; unused upper bits are zero.  The source names
// the on-chip (de)modulators but gives no mapping; this one is a design choice.
//
// Timing: one register stage, out_valid = in_valid one cycle later.
module qam_demod
  import eq_pkg::*;
#(
  parameter int IW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  mod_e                 mod_sel,
  input  logic [IW-2:0]        thr,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_re [LANES],
  input  logic signed [IW-1:0] in_im [LANES],
  output logic                 out_valid,
  output logic [15:0]          bits
);
  function automatic logic inner(logic signed [IW-1:0] v, logic [IW-2:0] t);
    logic [IW-1:0] a;
    a = v[IW-1] ? IW'(-v) : IW'(v);
    return a < IW'(t);
  endfunction

  logic [15:0] b;
  always_comb begin
    b = '0;
    for (int l = 0; l < LANES; l++) begin
      case (mod_sel)
        MOD_BPSK: b[l] = in_re[l][IW-1];
        MOD_QPSK: b[2*l +: 2] = {in_im[l][IW-1], in_re[l][IW-1]};
        default:  b[4*l +: 4] = {inner(in_im[l], thr), in_im[l][IW-1],
                                 inner(in_re[l], thr), in_re[l][IW-1]};
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      bits      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) bits <= b;
    end
  end
endmodule
