// tb_out_mux: checks the two-lane output serialiser.
//
// clk_div8 provides the core clock and phase; a random word is presented with
// word_valid on each core cycle (with gaps).  The lanes are sampled on every input
// clock; each word must come out with lane 0 carrying the low half and lane 1 the high
// half, LSB first, one bit per input clock for 16QAM, one per two for QPSK and one per
// four for BPSK, with ser_valid high exactly for words that were valid, and the first
// bit appearing at the phase-6 input edge after the core edge that presented the word.
module tb_out_mux;
  import eq_pkg::*;
  logic clk_in = 1'b0, rst_n = 1'b1, clk_core;
  logic [2:0] phase;
  mod_e mod_sel = MOD_QAM16;
  logic word_valid = 1'b0;
  logic [15:0] word = '0;
  logic [1:0] ser_data;
  logic ser_valid;
  logic [15:0] sent [$];
  logic [15:0] rcv [$];
  int checks = 0, failures = 0;

  clk_div8 u_div (.*);
  out_mux dut (.*);

  always #1 clk_in = ~clk_in;
  initial #1 rst_n = 1'b0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Rebuild words: the edge where phase becomes 7 is the first of eight bit slots.
  int slot = 0;
  logic [7:0] h0, h1;
  logic vl;
  always @(negedge clk_in) begin
    int nb, per;
    per = (mod_sel == MOD_QAM16) ? 1 : (mod_sel == MOD_QPSK ? 2 : 4);
    nb = 8 / per;
    if (phase == 3'd7) begin
      slot = 0;
      vl = ser_valid;
    end
    if (slot % per == 0) begin
      h0[slot / per] = ser_data[0];
      h1[slot / per] = ser_data[1];
    end
    if (slot == 7 && vl) begin
      logic [15:0] w;
      case (nb)
        8: w = {h1, h0};
        4: w = {8'h0, h1[3:0], h0[3:0]};
        default: w = {12'h0, h1[1:0], h0[1:0]};
      endcase
      rcv.push_back(w);
    end
    slot++;
  end

  initial begin
    repeat (3) @(posedge clk_in);
    rst_n = 1'b1;
    for (int m = 2; m >= 0; m--) begin
      @(posedge clk_core);
      mod_sel <= mod_e'(m);
      word_valid <= 1'b0;
      repeat (3) @(posedge clk_core);
      sent.delete();
      rcv.delete();
      for (int n = 0; n < 100; n++) begin
        logic [15:0] w;
        w = 16'($urandom());
        if (m == 0) w[15:4] = '0;
        if (m == 1) w[15:8] = '0;
        word_valid <= ($urandom_range(0, 3) != 0);
        word <= w;
        @(posedge clk_core);
        if (word_valid) sent.push_back(word);
      end
      word_valid <= 1'b0;
      repeat (3) @(posedge clk_core);
      checks++;
      if (sent.size() != rcv.size()) begin
        failures++;
        $display("mod %0d: %0d words sent, %0d received", m, sent.size(), rcv.size());
      end
      for (int i = 0; i < sent.size() && i < rcv.size(); i++) begin
        checks++;
        if (sent[i] != rcv[i]) begin
          failures++;
          if (failures < 10) $display("mod %0d word %0d: %h vs %h", m, i, rcv[i], sent[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
