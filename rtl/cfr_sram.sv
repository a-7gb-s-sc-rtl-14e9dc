// cfr_sram: one-write, one-read synchronous memory holding 4-lane spectra.
//
// Used twice: for the cross-correlation spectrum FC_ra while FC_rb is computed, and for
// the final channel frequency response H read by the equalizer.  A word is the four
// complex bins of one FFT output position, so DEPTH = 128 words cover a 512-bin
// spectrum and the address is simply the FFT output position.  The source uses an
// SRAM macro (24 KB on chip in total); here it is an array that a memory compiler or
// synthesis can map.  Writes take effect at the clock edge; reads are registered
// (data appears one cycle after the address).  Contents are not reset.
module cfr_sram #(
  parameter int DEPTH = 128,
  parameter int DW    = 88,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
