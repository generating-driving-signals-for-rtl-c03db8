// sign_logic: quarter-wave folding of a full-cycle phase.  Combinational.
//
// The phase has 2 quadrant bits above ADDR_BITS offset bits.  In the first
// and third quarter the offset addresses the table directly, in the second and
// fourth it is mirrored (bitwise inverted), so the address runs up and then
// down through the table each half cycle.  The sign bit is the top quadrant
// bit: 0 = plus (first half cycle), 1 = minus.  It becomes the MSB of the PWM
// sample.  Together with a table holding sin(2*pi*(a + 0.5)/2^(ADDR_BITS+2))
// this reproduces the full sine exactly.
//
// Mapping only 90 degrees and reversing the sign for the other half period is
// from the source design; the mirroring by inversion goes with this
// implementation's half-step table.
module sign_logic #(
  parameter int unsigned ADDR_BITS = ppm_pkg::ADDR_BITS_DEF
) (
  input  logic [ADDR_BITS+1:0] phase,
  output logic [ADDR_BITS-1:0] addr,
  output logic                 sign
);

  assign addr = phase[ADDR_BITS] ? ~phase[ADDR_BITS-1:0] : phase[ADDR_BITS-1:0];
  assign sign = phase[ADDR_BITS+1];

endmodule
