// tb_qam_demod: checks the 4-parallel BPSK / QPSK / 16QAM hard-decision demapper.
//
// For each modulation, random 8-bit symbols (plus the exact boundary values 0, +-thr)
// and a random threshold are applied with random valid gaps; every output word must
// match the decision rules (b0 = re < 0, b1 = |re| < thr, b2 = im < 0, b3 = |im| < thr;
// QPSK {im < 0, re < 0}; BPSK re < 0) with unused bits zero, exactly one cycle later.
module tb_qam_demod;
  import eq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0, out_valid;
  mod_e mod_sel = MOD_QAM16;
  logic [6:0] thr = 7'd43;
  logic signed [7:0] in_re [LANES], in_im [LANES];
  logic [15:0] bits;
  logic [15:0] expq [$];
  int checks = 0, failures = 0;

  qam_demod #(.IW(8)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] model(mod_e m, int t, int r [LANES], int i [LANES]);
    logic [15:0] b;
    int ar, ai;
    b = '0;
    for (int l = 0; l < LANES; l++) begin
      ar = r[l] < 0 ? -r[l] : r[l];
      ai = i[l] < 0 ? -i[l] : i[l];
      case (m)
        MOD_BPSK: b[l] = r[l] < 0;
        MOD_QPSK: b[2 * l +: 2] = {i[l] < 0, r[l] < 0};
        default:  b[4 * l +: 4] = {ai < t, i[l] < 0, ar < t, r[l] < 0};
      endcase
    end
    return b;
  endfunction

  // expected word is pushed with the input; out_valid must follow one cycle later
  logic v_d = 1'b0;
  always @(posedge clk) begin
    checks++;
    if (out_valid != v_d) failures++;
    v_d <= in_valid;
    if (out_valid) begin
      logic [15:0] e;
      e = expq.pop_front();
      checks++;
      if (bits != e) begin
        failures++;
        if (failures < 10) $display("mod %0d: %h vs %h", mod_sel, bits, e);
      end
    end
  end

  initial begin
    int r [LANES], i [LANES];
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int m = 0; m < 3; m++) begin
      @(posedge clk);
      in_valid <= 1'b0;
      mod_sel  <= mod_e'(m);
      thr      <= 7'($urandom_range(20, 60));
      repeat (2) @(posedge clk);
      for (int n = 0; n < 300; n++) begin
        for (int l = 0; l < LANES; l++) begin
          case ($urandom_range(0, 7))
            0: r[l] = 0;
            1: r[l] = int'(thr);
            2: r[l] = -int'(thr);
            default: r[l] = int'($urandom_range(0, 255)) - 128;
          endcase
          i[l] = int'($urandom_range(0, 255)) - 128;
          in_re[l] <= 8'(r[l]);
          in_im[l] <= 8'(i[l]);
        end
        if ($urandom_range(0, 4) == 0) begin
          in_valid <= 1'b0;
        end else begin
          in_valid <= 1'b1;
          expq.push_back(model(mod_e'(m), int'(thr), r, i));
        end
        @(posedge clk);
      end
      in_valid <= 1'b0;
      repeat (3) @(posedge clk);
    end
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
