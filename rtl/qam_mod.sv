// qam_mod: 4-parallel BPSK / QPSK / Gray-coded 16QAM mapper, the test-signal source that
// pairs with qam_demod.
//
// Lane l takes bits[NB*l +: NB] (NB = 1, 2, 4) with the bit meanings of qam_demod:
// b0 = sign of re, b1 = inner (1) or outer (0) amplitude of re, b2/b3 the same for im.
// BPSK and QPSK use amplitude A2; 16QAM uses A1 (inner) and A3 (outer).  The level
// values are design choices that fit the 7-bit equalizer input.
//
// Timing: one register stage, out_valid = in_valid one cycle later.
module qam_mod
  import eq_pkg::*;
#(
  parameter int OW = 7,
  parameter int A1 = 16,
  parameter int A2 = 32,
  parameter int A3 = 48
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  mod_e                 mod_sel,
  input  logic                 in_valid,
  input  logic [15:0]          bits,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_re [LANES],
  output logic signed [OW-1:0] out_im [LANES]
);
  function automatic logic signed [OW-1:0] lvl(logic neg, logic [OW-1:0] a);
    return neg ? -OW'(a) : OW'(a);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int l = 0; l < LANES; l++) begin
        out_re[l] <= '0;
        out_im[l] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      for (int l = 0; l < LANES; l++) begin
        case (mod_sel)
          MOD_BPSK: begin
            out_re[l] <= lvl(bits[l], OW'(A2));
            out_im[l] <= '0;
          end
          MOD_QPSK: begin
            out_re[l] <= lvl(bits[2*l], OW'(A2));
            out_im[l] <= lvl(bits[2*l+1], OW'(A2));
          end
          default: begin
            out_re[l] <= lvl(bits[4*l], bits[4*l+1] ? OW'(A1) : OW'(A3));
            out_im[l] <= lvl(bits[4*l+2], bits[4*l+3] ? OW'(A1) : OW'(A3));
          end
        endcase
      end
    end
  end
endmodule
