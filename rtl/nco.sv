// nco: numerically controlled oscillator (phase accumulator).
//
// Once per PWM period (at fs_edge) the phase increment dphi from the PIR is
// added to the L-bit accumulator, so the generated frequency is
// Fg = Fs * dphi / 2^L; with L = 20 and Fs = 104.86 kHz the resolution is
// 0.1 Hz and dphi = 500 gives 50 Hz.  dphi = 0 freezes the phase.  The top
// PH_BITS bits of the accumulator are the phase handed to the phase shift
// block.  wrap pulses for one clock when the accumulator overflows, which is
// the start of a period of the generated signal (phase 0 of phase A).  The
// phase and wrap are registered and change one clock after fs_edge.
//
// The accumulator and L = 20 follow the source design; using the 10 top bits
// (2 quadrant bits + P = 8 address bits) is this implementation's reading of
// the quarter-wave addressing.
module nco #(
  parameter int unsigned PHASE_BITS = ppm_pkg::PHASE_BITS_DEF,
  parameter int unsigned PH_BITS    = ppm_pkg::ADDR_BITS_DEF + 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  fs_edge,
  input  logic [PHASE_BITS-1:0] dphi,
  output logic [PHASE_BITS-1:0] acc,
  output logic [PH_BITS-1:0]    phase,
  output logic                  wrap
);

  logic [PHASE_BITS:0] sum;
  assign sum   = {1'b0, acc} + {1'b0, dphi};
  assign phase = acc[PHASE_BITS-1 -: PH_BITS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      wrap <= 1'b0;
    end else begin
      wrap <= 1'b0;
      if (fs_edge) begin
        acc  <= sum[PHASE_BITS-1:0];
        wrap <= sum[PHASE_BITS];
      end
    end
  end

endmodule
