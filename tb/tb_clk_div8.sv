// tb_clk_div8: checks the core clock divider.
//
// After reset the phase counter must step 0..7 on every input clock edge and clk_core
// (phase[2]) must have a period of exactly 8 input clocks with 4 high and 4 low.
module tb_clk_div8;
  logic clk_in = 1'b0, rst_n = 1'b1, clk_core;
  logic [2:0] phase;
  int checks = 0, failures = 0;

  clk_div8 dut (.*);

  always #1 clk_in = ~clk_in;
  initial #1 rst_n = 1'b0;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] prev;
    time t_rise, t_prev, t_fall;
    #4 rst_n = 1'b1;
    @(posedge clk_in);
    #0.1 prev = phase;
    for (int i = 0; i < 64; i++) begin
      @(posedge clk_in);
      #0.1;
      checks++;
      if (phase != prev + 3'd1) failures++;
      checks++;
      if (clk_core != phase[2]) failures++;
      prev = phase;
    end
    @(posedge clk_core) t_prev = $time;
    @(negedge clk_core) t_fall = $time;
    @(posedge clk_core) t_rise = $time;
    checks++;
    if (t_rise - t_prev != 16 || t_fall - t_prev != 8) begin
      failures++;
      $display("period %0t high %0t", t_rise - t_prev, t_fall - t_prev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
