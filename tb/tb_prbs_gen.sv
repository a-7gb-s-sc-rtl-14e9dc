// tb_prbs_gen: checks the parallel PRBS-15 generator.
//
// A bit-serial reference LFSR (x^15 + x^14 + 1, seed all ones) is run beside the
// generator; in each modulation (4, 8, 16 bits per enabled cycle) every word must equal
// the next bits of the reference, bit 0 first, with the unused bits zero.  Enable gaps
// must hold the state; restart must return to the seed.  The sequence must repeat with
// period 2^15 - 1 (checked on the serial model against the hardware over a full period
// in 16QAM mode).
module tb_prbs_gen;
  import eq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, restart = 1'b0, en = 1'b0;
  mod_e mod_sel = MOD_BPSK;
  logic [15:0] bits;
  logic [14:0] rs;
  int checks = 0, failures = 0;

  prbs_gen dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_word(int nb);
    logic [15:0] w;
    logic b;
    w = '0;
    for (int i = 0; i < nb; i++) begin
      b = rs[14] ^ rs[13];
      w[i] = b;
      rs = {rs[13:0], b};
    end
    return w;
  endfunction

  initial begin
    logic [15:0] first;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int m = 0; m < 3; m++) begin
      int nb;
      nb = 4 << m;
      @(negedge clk);
      mod_sel = mod_e'(m);
      restart = 1'b1;
      @(negedge clk);
      restart = 1'b0;
      rs = 15'h7FFF;
      for (int n = 0; n < 300; n++) begin
        en = ($urandom_range(0, 3) != 0);
        #1;
        if (en) begin
          checks++;
          if (bits != ref_word(nb)) begin
            failures++;
            if (failures < 10) $display("mod %0d word %0d: %h", m, n, bits);
          end
        end
        @(negedge clk);
      end
    end
    // full period in 16QAM mode: 2^15 - 1 words of 16 bits return to the start word
    @(negedge clk);
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    en = 1'b1;
    #1 first = bits;
    for (int n = 0; n < 32767; n++) @(negedge clk);
    #1;
    checks++;
    if (bits != first) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
