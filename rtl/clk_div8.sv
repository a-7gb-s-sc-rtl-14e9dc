// clk_div8: divides the high-speed input clock by 8 to make the equalizer core clock.
//
// A free-running 3-bit counter on the input clock; clk_core is its MSB, so a core
// rising edge follows the input edge at which the counter goes from 3 to 4.  phase is
// the counter itself and lets the output multiplexer pick an input-clock cycle in
// which the core-domain data are stable.  The source states the 1/8 ratio; the counter
// implementation is a design choice (a real chip would use a dedicated divider cell
// and a clock tree; here the generated clock is a flip-flop output).
module clk_div8 (
  input  logic       clk_in,
  input  logic       rst_n,
  output logic       clk_core,
  output logic [2:0] phase
);
  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + 3'd1;
  end
  assign clk_core = phase[2];
endmodule
