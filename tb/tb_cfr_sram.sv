// tb_cfr_sram: checks the one-write, one-read spectrum memory.
//
// Writes random 88-bit words to all 128 addresses, then reads them back in random order
// while writing other addresses in the same cycles; read data must appear exactly one
// cycle after the address and equal the last value written there before that edge.
module tb_cfr_sram;
  logic clk = 1'b0, we = 1'b0;
  logic [6:0] waddr = '0, raddr = '0;
  logic [87:0] wdata = '0, rdata;
  logic [87:0] mem [128];
  int checks = 0, failures = 0;

  cfr_sram #(.DEPTH(128), .DW(88)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [87:0] rnd88();
    return {$urandom(), $urandom(), 24'($urandom())};
  endfunction

  initial begin
    logic [87:0] expd;
    for (int a = 0; a < 128; a++) begin
      @(negedge clk);
      we = 1'b1;
      waddr = 7'(a);
      wdata = rnd88();
      mem[a] = wdata;
    end
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      raddr = 7'($urandom_range(0, 127));
      expd = mem[raddr];
      we = $urandom_range(0, 1);
      waddr = 7'($urandom_range(0, 127));
      if (waddr == raddr) waddr = waddr + 7'd1;
      wdata = rnd88();
      if (we) mem[waddr] = wdata;
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== expd) begin
        failures++;
        if (failures < 10) $display("addr %0d: %h vs %h", raddr, rdata, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
