// sine_rom: quarter-wave sine lookup table, 2^ADDR_BITS words of MAG_BITS
// bits (256 x 7 bits by default), with a registered read port (data appears
// the clock after addr).
//
// Word a holds min(127, round(128 * sin(2*pi*(a + 0.5) / 1024))) (for
// ADDR_BITS = 8), i.e. the positive quarter of a sine of amplitude 128 sampled
// 1024 times per cycle;
// the few top words saturate at 127 to fit 7 bits.  The table is computed at
// elaboration time by ppm_pkg::sine_entry, so it maps to a ROM initialised in
// the bitstream.
//
// Size, amplitude 128 and 7-bit coding follow the source design; the half-step
// sampling point and the saturation are this implementation's choices.
module sine_rom
  import ppm_pkg::*;
#(
  parameter int unsigned ADDR_BITS = ADDR_BITS_DEF
) (
  input  logic                 clk,
  input  logic [ADDR_BITS-1:0] addr,
  output logic [MAG_BITS-1:0]  data
);

  logic [MAG_BITS-1:0] rom [2**ADDR_BITS];

  initial begin
    for (int unsigned a = 0; a < 2**ADDR_BITS; a++)
      rom[a] = sine_entry(a, ADDR_BITS);
  end

  always_ff @(posedge clk) data <= rom[addr];

endmodule
