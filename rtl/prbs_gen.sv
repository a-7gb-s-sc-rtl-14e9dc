// prbs_gen: parallel PRBS-15 generator (x^15 + x^14 + 1) for the built-in test.
//
// Each enabled cycle delivers the next 4, 8 or 16 bits of the sequence (one bit per
// BPSK symbol, two per QPSK, four per 16QAM symbol, four symbols per cycle), bit 0
// first.  The LFSR steps are unrolled so one cycle advances the state by that many bits.
// restart reloads the seed, so a generator and a checker started together stay
// aligned.  The source states that 4-parallel PRBS generators and checkers exist but
// not their polynomial; PRBS-15 is a design choice.
module prbs_gen
  import eq_pkg::*;
#(
  parameter logic [14:0] SEED = 15'h7FFF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mod_e        mod_sel,
  input  logic        restart,
  input  logic        en,
  output logic [15:0] bits
);
  logic [14:0] st;
  logic [14:0] st4, st8, st16;

  always_comb begin
    logic [14:0] s;
    logic        nb;
    s = st;
    st4 = '0;
    st8 = '0;
    bits = '0;
    for (int i = 0; i < 16; i++) begin
      nb = s[14] ^ s[13];
      bits[i] = nb;
      s = {s[13:0], nb};
      if (i == 3) st4 = s;
      if (i == 7) st8 = s;
    end
    st16 = s;
    case (mod_sel)
      MOD_BPSK: bits[15:4] = '0;
      MOD_QPSK: bits[15:8] = '0;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       st <= SEED;
    else if (restart) st <= SEED;
    else if (en) begin
      case (mod_sel)
        MOD_BPSK: st <= st4;
        MOD_QPSK: st <= st8;
        default:  st <= st16;
      endcase
    end
  end
endmodule
