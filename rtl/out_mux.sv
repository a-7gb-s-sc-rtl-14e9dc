// out_mux: output multiplexer that serialises the demodulated bits onto two lanes
// (the two LVDS drivers of the chip).
//
// Each core cycle produces four symbols: 16 bits for 16QAM, 8 for QPSK, 4 for BPSK.
// The word is split in two halves, lane 0 sends the low half and lane 1 the high half,
// LSB first.  The multiplexer runs on the input clock (8 per core cycle): for 16QAM it
// shifts every input-clock cycle, for QPSK every second one (the source's "1/2 of the
// input clock" rate), for BPSK every fourth one (design choice; the source only names
// the two faster rates).  ser_valid marks bits that carry data.
//
// Timing: the core-domain word is captured at the input-clock edge where phase == 6,
// three input cycles after the core edge, when it is stable; the first bit of a word
// appears on the lanes at that edge and the lanes lag the core by about one core cycle.
module out_mux
  import eq_pkg::*;
(
  input  logic        clk_in,
  input  logic        rst_n,
  input  logic [2:0]  phase,
  input  mod_e        mod_sel,
  input  logic        word_valid,
  input  logic [15:0] word,
  output logic [1:0]  ser_data,
  output logic        ser_valid
);
  logic [7:0] sh0, sh1;
  logic       vld;
  logic [2:0] sub;     // input cycles since load
  logic       step;

  always_comb begin
    case (mod_sel)
      MOD_BPSK: step = (sub[1:0] == 2'd3);
      MOD_QPSK: step = sub[0];
      default:  step = 1'b1;
    endcase
  end

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      sh0 <= '0;
      sh1 <= '0;
      vld <= 1'b0;
      sub <= '0;
    end else if (phase == 3'd6) begin
      sub <= '0;
      vld <= word_valid;
      case (mod_sel)
        MOD_BPSK: begin
          sh0 <= {6'd0, word[1:0]};
          sh1 <= {6'd0, word[3:2]};
        end
        MOD_QPSK: begin
          sh0 <= {4'd0, word[3:0]};
          sh1 <= {4'd0, word[7:4]};
        end
        default: begin
          sh0 <= word[7:0];
          sh1 <= word[15:8];
        end
      endcase
    end else begin
      sub <= sub + 3'd1;
      if (step) begin
        sh0 <= {1'b0, sh0[7:1]};
        sh1 <= {1'b0, sh1[7:1]};
      end
    end
  end

  assign ser_data  = {sh1[0], sh0[0]};
  assign ser_valid = vld;
endmodule
