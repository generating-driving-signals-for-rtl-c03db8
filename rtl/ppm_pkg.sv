// ppm_pkg: types and constants shared by the three-phase PWM/PPM inverter
// controller.
//
// The controller synthesises three sine-modulated, center-based PWM signals by
// direct digital synthesis: a phase accumulator (L = 20 bits) addresses a
// quarter-wave sine table (P = 8 address bits, 7-bit samples), the sample is
// scaled by an 8-bit amplitude word and offset by N/2, and a down-counter timer
// with n = 8 bits turns the result into a pulse width.  The numbers L, P, n and
// the 150 ns step of the dead-time / impulse-width settings follow the source
// design; the register word layout below is this implementation's own choice.
package ppm_pkg;

  localparam int unsigned PHASE_BITS_DEF = 20;  // L, phase accumulator width
  localparam int unsigned ADDR_BITS_DEF  = 8;   // P, quarter-wave ROM address bits
  localparam int unsigned MAG_BITS       = 7;   // magnitude bits stored in the ROM
  localparam int unsigned PWM_BITS_DEF   = 8;   // n, PWM timer bits (N = 2^n)
  localparam int unsigned AMP_BITS       = 8;   // amplitude word Y (ACR or ADC)
  localparam int unsigned NPHASE         = 3;
  localparam int unsigned PIR_RESET_DEF  = 500; // 50 Hz at Fs = 104.86 kHz, L = 20
  // One step of the dead-time, impulse-width and pulse-deletion settings, in
  // system clocks: 4 clocks of 26.844 MHz = 149 ns, the 150 ns step.
  localparam int unsigned DT_UNIT_DEF    = 4;

  // Multiplier J of the 150 ns step: J = 1, 4, 16 or 64.
  typedef enum logic [1:0] {
    J_1  = 2'd0,
    J_4  = 2'd1,
    J_16 = 2'd2,
    J_64 = 2'd3
  } jsel_e;

  // Timer Control Register.
  typedef struct packed {
    logic [7:0] prescale;    // quantization tick = (prescale + 1) system clocks
    jsel_e      pulse_del;   // shortest high or low pulse, J steps
    jsel_e      gate_width;  // gate-drive impulse width, J steps
    jsel_e      dead_time;   // dead time, J steps
  } tcr_t;                   // 14 bits

  localparam tcr_t TCR_RESET = '{prescale: 8'd0, pulse_del: J_1,
                                 gate_width: J_4, dead_time: J_1};

  // SPI word: {addr[1:0], 2'b00, data[19:0]}, MSB first.
  localparam int unsigned SPI_WORD_BITS = 24;
  typedef enum logic [1:0] {
    REG_PIR = 2'd0,
    REG_ACR = 2'd1,
    REG_TCR = 2'd2
  } reg_addr_e;

  // J as a number: 1, 4, 16, 64.
  function automatic int unsigned j_value(jsel_e j);
    return 32'd1 << (2 * int'(j));
  endfunction

  localparam int SINE_FRAC = 28;

  // Entry a of the quarter-wave table:
  //   T[a] = min(2^MAG_BITS - 1, round(128 * sin(2*pi*(a + 0.5) / 2^(abits+2))))
  // (abits = 8: 1024 samples per cycle)
  // computed with a 28-bit fixed-point Taylor series (error < 1e-5).
  // The half-step offset makes the table symmetric under address mirroring.
  function automatic logic [MAG_BITS-1:0] sine_entry(int unsigned a,
                                                      int unsigned abits = ADDR_BITS_DEF);
    longint pi_fx;
    longint x, x2, term, sum, r;
    pi_fx = 64'd843314857;                       // round(pi * 2^28)
    x     = (pi_fx * longint'(2 * a + 1)) >>> (abits + 2);  // 2*pi*(a+0.5)/2^(abits+2)
    x2    = (x * x) >>> SINE_FRAC;
    term  = x;
    sum   = x;
    for (int k = 1; k <= 6; k++) begin
      term = -((term * x2) >>> SINE_FRAC) / longint'((2 * k) * (2 * k + 1));
      sum  = sum + term;
    end
    r = (sum * 128 + (64'd1 <<< (SINE_FRAC - 1))) >>> SINE_FRAC;
    if (r > longint'((1 << MAG_BITS) - 1)) r = longint'((1 << MAG_BITS) - 1);
    if (r < 0) r = 0;
    return MAG_BITS'(r);
  endfunction

endpackage
