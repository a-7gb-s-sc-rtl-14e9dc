// tb_sdf_stage: checks single radix-2 SDF butterfly stages.
//
// Four instances run on the same random stream: DIF with D = 4 and D = 1, DIT with
// D = 4, and DIF D = 4 with scale set.  For a block x[0..2D-1] and output position i of
// that block (visible after the enabled edge that takes input position i+D, i.e. D+1
// enabled edges counting the one that took position i):
//   DIF: i < D: x[i] + x[i+D];      i >= D: (x[i-D] - x[i]) * W_2D^(i-D)
//   DIT: i < D: x[i] + W*x[i+D];    i >= D: x[i-D] - W*x[i],  W = W_2D^(i mod D)
// Scaled outputs are the same values halved (rounded); all within one LSB of the
// exact value.  The valid stream has gaps, which must not disturb the result.
module tb_sdf_stage;
  import eq_pkg::*;
  localparam int NS = 64;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [3:0] cnt8 = '0;
  logic signed [10:0] in_re = '0, in_im = '0;
  logic signed [10:0] o_re [4], o_im [4];
  int checks = 0, failures = 0;
  int xr [NS], xi [NS];
  int ne = 0;

  sdf_stage #(.D(4)) u_dif4 (.clk(clk), .rst_n(rst_n), .en(en), .cnt(cnt8[2:0]), .scale(1'b0),
    .in_re(in_re), .in_im(in_im), .out_re(o_re[0]), .out_im(o_im[0]));
  sdf_stage #(.D(1)) u_dif1 (.clk(clk), .rst_n(rst_n), .en(en), .cnt(cnt8[0:0]), .scale(1'b0),
    .in_re(in_re), .in_im(in_im), .out_re(o_re[1]), .out_im(o_im[1]));
  sdf_stage #(.D(4), .DIT(1'b1)) u_dit4 (.clk(clk), .rst_n(rst_n), .en(en), .cnt(cnt8[2:0]),
    .scale(1'b0), .in_re(in_re), .in_im(in_im), .out_re(o_re[2]), .out_im(o_im[2]));
  sdf_stage #(.D(4)) u_dif4s (.clk(clk), .rst_n(rst_n), .en(en), .cnt(cnt8[2:0]), .scale(1'b1),
    .in_re(in_re), .in_im(in_im), .out_re(o_re[3]), .out_im(o_im[3]));

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real adiff(real a, real b);
    return a > b ? a - b : b - a;
  endfunction

  function automatic void expect_out(int inst, int d, bit dit, int div, int s);
    int blk, i, a, b;
    real wr, wi, er, ei, pr, pi;
    blk = (s / (2 * d)) * 2 * d;
    i = s % (2 * d);
    a = blk + (i % d);
    b = a + d;
    wr = $cos(2.0 * 3.14159265358979 * (i % d) / (2 * d));
    wi = -$sin(2.0 * 3.14159265358979 * (i % d) / (2 * d));
    if (!dit) begin
      if (i < d) begin
        er = xr[a] + xr[b];
        ei = xi[a] + xi[b];
      end else begin
        pr = xr[a] - xr[b];
        pi = xi[a] - xi[b];
        er = pr * wr - pi * wi;
        ei = pr * wi + pi * wr;
      end
    end else begin
      pr = xr[b] * wr - xi[b] * wi;
      pi = xr[b] * wi + xi[b] * wr;
      er = (i < d) ? xr[a] + pr : xr[a] - pr;
      ei = (i < d) ? xi[a] + pi : xi[a] - pi;
    end
    er = er / div;
    ei = ei / div;
    checks++;
    if (adiff(real'(o_re[inst]), er) > 1.01 || adiff(real'(o_im[inst]), ei) > 1.01) begin
      failures++;
      if (failures < 10) $display("inst %0d sample %0d: %0d,%0d vs %0f,%0f", inst, s, o_re[inst], o_im[inst], er, ei);
    end
  endfunction

  initial begin
    for (int s = 0; s < NS; s++) begin
      xr[s] = int'($urandom_range(0, 800)) - 400;
      xi[s] = int'($urandom_range(0, 800)) - 400;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (ne < NS + 8) begin
      if ($urandom_range(0, 3) == 0) begin
        en <= 1'b0;
        @(posedge clk);
      end else begin
        en    <= 1'b1;
        in_re <= 11'(ne < NS ? xr[ne] : 0);
        in_im <= 11'(ne < NS ? xi[ne] : 0);
        cnt8  <= 4'(ne);
        @(posedge clk);
        // outputs now reflect the state after ne+1 enabled inputs
        #1;
        if (ne >= 4 && ne - 4 < NS - 8) begin
          expect_out(0, 4, 1'b0, 1, ne - 4);
          expect_out(2, 4, 1'b1, 1, ne - 4);
          expect_out(3, 4, 1'b0, 2, ne - 4);
        end
        if (ne >= 1 && ne - 1 < NS - 2) expect_out(1, 1, 1'b0, 1, ne - 1);
        ne++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
