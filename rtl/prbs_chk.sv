// prbs_chk: PRBS-15 checker for the demodulated 4-parallel bit stream.
//
// A local prbs_gen, restarted with the transmitter's generator, predicts each word of
// received bits; the checker counts words and bit errors (saturating 16-bit counters).
// restart clears the counters and re-aligns the reference.
// Timing: one word per cycle with in_valid; counters update one cycle later.
module prbs_chk
  import eq_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  mod_e        mod_sel,
  input  logic        restart,
  input  logic        in_valid,
  input  logic [15:0] bits,
  output logic [15:0] err_cnt,
  output logic [15:0] word_cnt
);
  logic [15:0] ref_bits;
  prbs_gen u_ref (
    .clk(clk), .rst_n(rst_n), .mod_sel(mod_sel), .restart(restart), .en(in_valid),
    .bits(ref_bits)
  );

  logic [4:0] nerr;
  always_comb begin
    nerr = '0;
    for (int i = 0; i < 16; i++) nerr += 5'(bits[i] ^ ref_bits[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_cnt  <= '0;
      word_cnt <= '0;
    end else if (restart) begin
      err_cnt  <= '0;
      word_cnt <= '0;
    end else if (in_valid) begin
      err_cnt  <= (17'(err_cnt) + 17'(nerr) > 17'hFFFF) ? 16'hFFFF : err_cnt + 16'(nerr);
      word_cnt <= (word_cnt == 16'hFFFF) ? word_cnt : word_cnt + 16'd1;
    end
  end
endmodule
