// tb_prbs_chk: checks the PRBS-15 error counter.
//
// Words from a reference PRBS-15 model are fed with random valid gaps; known numbers of
// bit errors are injected into chosen words.  After each run err_cnt must equal the
// injected total and word_cnt the number of valid words; restart must clear both.
// Run in all three modulations.
module tb_prbs_chk;
  import eq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, restart = 1'b0, in_valid = 1'b0;
  mod_e mod_sel = MOD_QPSK;
  logic [15:0] bits = '0, err_cnt, word_cnt;
  logic [14:0] rs;
  int checks = 0, failures = 0;

  prbs_chk dut (.*);

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
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int m = 0; m < 3; m++) begin
      int nb, nerr, nw;
      nb = 4 << m;
      nerr = 0;
      nw = 0;
      @(negedge clk);
      mod_sel = mod_e'(m);
      restart = 1'b1;
      @(negedge clk);
      restart = 1'b0;
      @(negedge clk);
      checks++;
      if (err_cnt != 0 || word_cnt != 0) failures++;
      rs = 15'h7FFF;
      for (int n = 0; n < 500; n++) begin
        in_valid = ($urandom_range(0, 4) != 0);
        if (in_valid) begin
          logic [15:0] w;
          w = ref_word(nb);
          if (n % 37 == 5) begin
            int k;
            k = $urandom_range(1, nb);
            for (int i = 0; i < k; i++) w[i] = ~w[i];
            nerr += k;
          end
          bits = w;
          nw++;
        end
        @(negedge clk);
      end
      in_valid = 1'b0;
      @(negedge clk);
      checks++;
      if (int'(err_cnt) != nerr || int'(word_cnt) != nw) begin
        failures++;
        $display("mod %0d: errors %0d vs %0d, words %0d vs %0d", m, err_cnt, nerr, word_cnt, nw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
