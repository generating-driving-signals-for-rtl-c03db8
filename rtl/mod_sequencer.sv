// mod_sequencer: time-shared sample computation for the three phases and the
// three timer data buffers.
//
// One PWM period is split into four Ts/4 slots (from pwm_timebase).  In slot
// 0, 1 and 2 the sequencer computes the sample of phase A, B and C:
//   S_ADDR  the phase shift block adds the phase offset to the accumulator
//           phase, the sign logic folds it into a table address and a sign;
//           the table is read (registered, one clock);
//   S_ROM   the magnitude is ready; the amplitude modulator is started;
//   S_MUL   wait for the modulator; its result Z goes into buffer sel.
// A computation takes 10 clocks, which must fit in a slot (an assertion
// checks this).  Slot 3 is idle.  The amplitude word y is captured at the
// start of slot 0 so all three phases of a period use the same value.  The
// buffers are read by the PWM timer at the next sampling edge, so a sample
// computed from the phase of period k is output in period k+1.  The buffers
// reset to N/2 (50 % duty, zero output voltage).
//
// Time-sharing one multiplier and adder over the three phases within one PWM
// cycle, one Ts/4 interval per multiplication, and the three timer data
// buffers follow the source design; the state sequence is this
// implementation's own.
module mod_sequencer
  import ppm_pkg::*;
#(
  parameter int unsigned ADDR_BITS = ADDR_BITS_DEF,
  parameter int unsigned PWM_BITS  = PWM_BITS_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 slot_start,
  input  logic [1:0]           slot,
  input  logic [ADDR_BITS+1:0] phase,     // accumulator phase (NCO top bits)
  input  logic [AMP_BITS-1:0]  y,         // amplitude word (ACR or ADC)
  output logic [PWM_BITS-1:0]  sample [NPHASE],
  output logic                 sample_wr  // one clock when a buffer is written
);

  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_ROM, S_MUL} state_e;
  state_e state;

  logic [1:0]           sel;
  logic [ADDR_BITS+1:0] ph_shifted;
  logic [ADDR_BITS-1:0] rom_addr;
  logic                 sign_now, sign_q;
  logic [MAG_BITS-1:0]  mag;
  logic [AMP_BITS-1:0]  y_lat;
  logic                 mul_start, mul_busy, mul_done;
  logic [PWM_BITS-1:0]  z;

  phase_shift #(.PH_BITS(ADDR_BITS + 2)) u_shift (
    .phase_in(phase), .sel(sel), .phase_out(ph_shifted)
  );

  sign_logic #(.ADDR_BITS(ADDR_BITS)) u_sign (
    .phase(ph_shifted), .addr(rom_addr), .sign(sign_now)
  );

  sine_rom #(.ADDR_BITS(ADDR_BITS)) u_rom (
    .clk(clk), .addr(rom_addr), .data(mag)
  );

  assign mul_start = (state == S_ROM);

  amp_mod #(.PWM_BITS(PWM_BITS)) u_mul (
    .clk(clk), .rst_n(rst_n), .start(mul_start), .sign(sign_q), .mag(mag),
    .y(y_lat), .busy(mul_busy), .done(mul_done), .z(z)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      sel       <= '0;
      sign_q    <= 1'b0;
      y_lat     <= '0;
      sample_wr <= 1'b0;
      for (int i = 0; i < NPHASE; i++)
        sample[i] <= PWM_BITS'(1) << (PWM_BITS - 1);
    end else begin
      sample_wr <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (slot_start && slot != 2'd3) begin
            sel   <= slot;
            state <= S_ADDR;
            if (slot == 2'd0) y_lat <= y;
          end
        end
        S_ADDR: begin
          sign_q <= sign_now;
          state  <= S_ROM;
        end
        S_ROM: state <= S_MUL;
        S_MUL: begin
          if (mul_done) begin
            sample[sel] <= z;
            sample_wr   <= 1'b1;
            state       <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A new slot must not begin before the previous computation is finished.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (slot_start && slot != 2'd3) |-> state == S_IDLE);

endmodule
