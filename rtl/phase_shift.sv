// phase_shift: derives the phase of each of the three output phases from the
// accumulator phase.  Combinational.
//
// sel = 0 (phase A) adds 0, sel = 1 (phase B) adds 2/3 of a cycle (B lags A by
// 120 degrees) and sel = 2 (phase C) adds 1/3 of a cycle (C lags A by 240
// degrees), modulo 2^PH_BITS.  The offsets are round(2^PH_BITS * k / 3):
// 683 and 341 for PH_BITS = 10.  sel = 3 behaves like sel = 0.
//
// A phase shift block giving three table addresses per PWM cycle is from the
// source design; the phase order A-B-C and the rounding are this
// implementation's choices.
module phase_shift #(
  parameter int unsigned PH_BITS = ppm_pkg::ADDR_BITS_DEF + 2
) (
  input  logic [PH_BITS-1:0] phase_in,
  input  logic [1:0]         sel,
  output logic [PH_BITS-1:0] phase_out
);

  localparam logic [PH_BITS-1:0] OFF_120 = PH_BITS'(((1 << PH_BITS) + 1) / 3);
  localparam logic [PH_BITS-1:0] OFF_240 = PH_BITS'(((2 << PH_BITS) + 1) / 3);

  always_comb begin
    unique case (sel)
      2'd1:    phase_out = phase_in + OFF_240;
      2'd2:    phase_out = phase_in + OFF_120;
      default: phase_out = phase_in;
    endcase
  end

endmodule
