// ppm_inverter_ctrl: digital controller for a three-phase inverter that drives
// its power switches with pulse position modulated (PPM) gate impulses.
//
// Data path, once per PWM period Ts = 2^PWM_BITS quantization ticks:
//   nco           phase accumulator += PIR (frequency and phase control)
//   mod_sequencer for phases A, B, C in turn (one per Ts/4): phase shift by
//                 0 / 240 / 120 degrees, quarter-wave sine ROM + sign logic,
//                 Z = X * Y / 256 + N/2 in the amplitude modulator, result to
//                 the timer data buffer of that phase
//   pwm_timer     at the next sampling edge: pulse deletion, down counters,
//                 center-based PWM per phase
//   dead_time     complementary upper/lower drive per leg with dead time
//   gate_drive    turn-on / turn-off impulses per switch (6 switches)
// Control: spi_regs holds PIR, ACR and TCR written by a host over SPI.  The
// amplitude word Y is the ACR (peripheral mode, standalone = 0) or the value
// of an external ADC sampled once per output period by adc_iface (stand-alone
// mode, standalone = 1).  TCR sets the quantization prescaler, dead time,
// impulse width and pulse deletion time.
//
// Defaults follow the source design: L = 20, P = 8, n = 8; at a 26.844 MHz
// clock with prescale 0, Fs = 104.86 kHz, the frequency step is 0.1 Hz and
// the reset PIR of 500 gives 50 Hz.  A new sample reaches the outputs one PWM
// period after it is computed.  fs_sync marks the start of each PWM period
// (the sampling edge), e.g. for triggering measurements.  Gate-drive index
// 2*i is the upper switch of phase i, 2*i+1 the lower one.  The internal
// status strobes (register write, conversion done, buffer write, pulse
// deleted, dead time started) and the full accumulator are left unconnected
// at this level; they exist for the block tests and for debugging.
module ppm_inverter_ctrl
  import ppm_pkg::*;
#(
  parameter int unsigned PHASE_BITS = PHASE_BITS_DEF,
  parameter int unsigned ADDR_BITS  = ADDR_BITS_DEF,
  parameter int unsigned PWM_BITS   = PWM_BITS_DEF,
  parameter int unsigned PIR_RESET  = PIR_RESET_DEF,
  parameter int unsigned DT_UNIT    = DT_UNIT_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  standalone,
  input  logic                  spi_sclk,
  input  logic                  spi_mosi,
  input  logic                  spi_cs_n,
  output logic                  adc_start,
  input  logic [AMP_BITS-1:0]   adc_data,
  input  logic                  adc_eoc,
  output logic                  fs_sync,   // one clock at each sampling edge Fs
  output logic [NPHASE-1:0]     pwm,
  output logic [NPHASE-1:0]     drv_hi,
  output logic [NPHASE-1:0]     drv_lo,
  output logic [2*NPHASE-1:0]   gd_on,
  output logic [2*NPHASE-1:0]   gd_off
);

  logic [PHASE_BITS-1:0] pir;
  logic [AMP_BITS-1:0]   acr, y_adc, y;
  tcr_t                  tcr;
  logic                  wr_strobe;
  logic                  q_tick, fs_edge, slot_start;
  logic [1:0]            slot;
  logic [PWM_BITS-1:0]   count;
  logic [PHASE_BITS-1:0] acc;
  logic [ADDR_BITS+1:0]  phase;
  logic                  wrap, conv_done, sample_wr;
  logic [PWM_BITS-1:0]   sample [NPHASE];
  logic [NPHASE-1:0]     deleted, dt_inserted;
  logic [2*NPHASE-1:0]   sw;

  spi_regs #(.PHASE_BITS(PHASE_BITS), .PIR_RESET(PIR_RESET)) u_spi (
    .clk, .rst_n, .spi_sclk, .spi_mosi, .spi_cs_n,
    .pir, .acr, .tcr, .wr_strobe
  );

  pwm_timebase #(.PWM_BITS(PWM_BITS)) u_tb (
    .clk, .rst_n, .prescale(tcr.prescale), .q_tick, .fs_edge, .slot_start,
    .slot, .count
  );

  nco #(.PHASE_BITS(PHASE_BITS), .PH_BITS(ADDR_BITS + 2)) u_nco (
    .clk, .rst_n, .fs_edge, .dphi(pir), .acc, .phase, .wrap
  );

  adc_iface u_adc (
    .clk, .rst_n, .wrap, .adc_data, .adc_eoc, .adc_start, .y_hold(y_adc),
    .conv_done
  );

  assign y = standalone ? y_adc : acr;
  assign fs_sync = fs_edge;

  mod_sequencer #(.ADDR_BITS(ADDR_BITS), .PWM_BITS(PWM_BITS)) u_seq (
    .clk, .rst_n, .slot_start, .slot, .phase, .y, .sample, .sample_wr
  );

  pwm_timer #(.PWM_BITS(PWM_BITS), .DT_UNIT(DT_UNIT)) u_timer (
    .clk, .rst_n, .q_tick, .fs_edge, .sample, .pulse_del(tcr.pulse_del),
    .pwm, .deleted
  );

  for (genvar i = 0; i < NPHASE; i++) begin : g_leg
    dead_time #(.DT_UNIT(DT_UNIT)) u_dt (
      .clk, .rst_n, .pwm(pwm[i]), .dt_sel(tcr.dead_time),
      .hi(drv_hi[i]), .lo(drv_lo[i]), .inserted(dt_inserted[i])
    );
    assign sw[2*i]   = drv_hi[i];
    assign sw[2*i+1] = drv_lo[i];
  end

  for (genvar j = 0; j < 2*NPHASE; j++) begin : g_gate
    gate_drive #(.DT_UNIT(DT_UNIT)) u_gd (
      .clk, .rst_n, .drv(sw[j]), .width_sel(tcr.gate_width),
      .on_p(gd_on[j]), .off_p(gd_off[j])
    );
  end

  // The two switches of a leg are never on together.
  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n)
    (drv_hi & drv_lo) == '0);

endmodule
