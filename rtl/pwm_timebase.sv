// pwm_timebase: quantization clock and sampling period of the PWM timer.
//
// The PWM period Ts is divided into N = 2^PWM_BITS quantization periods Tq.
// A prescaler divides the system clock by (prescale + 1) to give one q_tick
// per Tq (prescale = 0: every clock is a tick, as in the source design's
// example where the quantization clock is 26.844 MHz).  A tick counter counts
// 0 .. N-1.  fs_edge marks the tick at which a new PWM period starts (count
// goes to 0): this is the "rising edge of the sampling signal Fs".  slot_start
// marks the ticks at which count reaches 0, N/4, N/2 and 3N/4, and slot gives
// which quarter of the period begins; the modulator computes one phase per
// Ts/4 slot.  All outputs are registered-state decodes valid in the clock
// cycle of the tick.
//
// Programming the PWM frequency through the TCR follows the source design; the
// prescaler is this implementation's way of doing it.
module pwm_timebase #(
  parameter int unsigned PWM_BITS = ppm_pkg::PWM_BITS_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [7:0]          prescale,
  output logic                q_tick,      // one clock per quantization period
  output logic                fs_edge,     // q_tick that starts a PWM period
  output logic                slot_start,  // q_tick that starts a Ts/4 slot
  output logic [1:0]          slot,        // slot that starts at slot_start
  output logic [PWM_BITS-1:0] count        // tick number within the period
);

  logic [7:0] pc;
  logic [PWM_BITS-1:0] count_next;

  assign q_tick     = (pc >= prescale);
  assign count_next = count + 1'b1;
  assign fs_edge    = q_tick && (count_next == '0);
  assign slot_start = q_tick && (count_next[PWM_BITS-3:0] == '0);
  assign slot       = count_next[PWM_BITS-1 -: 2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc    <= '0;
      count <= '1;  // first tick after reset starts a period
    end else begin
      pc <= q_tick ? 8'd0 : pc + 8'd1;
      if (q_tick) count <= count_next;
    end
  end

endmodule
