// tb_qam_mod: checks the built-in test mapper.
//
// Random bit words are mapped in each modulation; every lane must carry the level
// given by its bits (BPSK/QPSK +-A2, 16QAM +-A1 inner / +-A3 outer, sign bit 1 =
// negative) one cycle later, and a qam_demod placed behind it with threshold 32 (the
// midpoint of the default 16QAM levels) must return the original bits.
module tb_qam_mod;
  import eq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0, out_valid, dvalid;
  mod_e mod_sel = MOD_QAM16;
  logic [15:0] bits = '0, dbits;
  logic signed [6:0] out_re [LANES], out_im [LANES];
  logic [15:0] q1 [$], q2 [$];
  int checks = 0, failures = 0;

  qam_mod dut (.*);
  qam_demod #(.IW(7)) u_dem (
    .clk(clk), .rst_n(rst_n), .mod_sel(mod_sel), .thr(6'd32), .in_valid(out_valid),
    .in_re(out_re), .in_im(out_im), .out_valid(dvalid), .bits(dbits)
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lvl(logic neg, int a);
    return neg ? -a : a;
  endfunction

  always @(posedge clk) begin
    if (out_valid) begin
      logic [15:0] w;
      w = q1.pop_front();
      for (int l = 0; l < LANES; l++) begin
        int er, ei;
        case (mod_sel)
          MOD_BPSK: begin er = lvl(w[l], 32); ei = 0; end
          MOD_QPSK: begin er = lvl(w[2 * l], 32); ei = lvl(w[2 * l + 1], 32); end
          default: begin
            er = lvl(w[4 * l], w[4 * l + 1] ? 16 : 48);
            ei = lvl(w[4 * l + 2], w[4 * l + 3] ? 16 : 48);
          end
        endcase
        checks++;
        if (int'(out_re[l]) != er || int'(out_im[l]) != ei) begin
          failures++;
          if (failures < 10) $display("lane %0d: %0d,%0d vs %0d,%0d", l, out_re[l], out_im[l], er, ei);
        end
      end
    end
    if (dvalid) begin
      checks++;
      if (dbits != q2.pop_front()) failures++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int m = 0; m < 3; m++) begin
      @(posedge clk);
      mod_sel <= mod_e'(m);
      @(posedge clk);
      for (int n = 0; n < 200; n++) begin
        logic [15:0] w;
        w = 16'($urandom());
        if (m == 0) w[15:4] = '0;
        if (m == 1) w[15:8] = '0;
        in_valid <= ($urandom_range(0, 3) != 0);
        bits     <= w;
        @(posedge clk);
        if (in_valid) begin
          q1.push_back(bits);
          q2.push_back(bits);
        end
      end
      in_valid <= 1'b0;
      repeat (4) @(posedge clk);
    end
    checks++;
    if (q1.size() != 0 || q2.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
