// pwm_timer: three-channel center-based PWM timer with pulse deletion.
//
// At the sampling edge (fs_edge) every channel takes its sample K from the
// timer data buffer in parallel, applies pulse deletion and loads its down
// counter.  Pulse deletion: a high pulse shorter than PD = J * DT_UNIT
// quantization periods (J = 1, 4, 16, 64 from the TCR) is removed (K -> 0),
// and so is a low pulse shorter than PD (K -> N); with prescale = 0 and the
// default DT_UNIT, PD is J * 150 ns like the other TCR times.  The channel then
// counts quantization ticks down twice: first the delay (N - K) / 2 with its
// flip-flop reset, then K ticks with the flip-flop set; when the second count
// reaches zero the flip-flop is reset.  The pulse of K ticks is thus centered
// in the period (within half a tick).  K = 0 gives no pulse, K = N a pulse the
// whole period.  The output is registered and changes in the clock after the
// q_tick that starts the tick.
//
// Parallel loading of down counters at the sampling edge, counting at the
// quantization clock, resetting the flip-flop at zero, center-based pulses
// and the pulse deletion time follow the source design.  The delay count
// that centres the pulse, and measuring the deletion time in quantization
// ticks, are this implementation's choices.
module pwm_timer
  import ppm_pkg::*;
#(
  parameter int unsigned PWM_BITS = PWM_BITS_DEF,
  parameter int unsigned DT_UNIT  = DT_UNIT_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                q_tick,
  input  logic                fs_edge,
  input  logic [PWM_BITS-1:0] sample [NPHASE],
  input  jsel_e               pulse_del,
  output logic [NPHASE-1:0]   pwm,
  output logic [NPHASE-1:0]   deleted      // one clock per deleted pulse
);

  localparam int unsigned N = 1 << PWM_BITS;
  typedef enum logic [1:0] {C_IDLE, C_DELAY, C_HIGH} cstate_e;

  cstate_e             st  [NPHASE];
  logic [PWM_BITS:0]   cnt [NPHASE];
  logic [PWM_BITS:0]   kh  [NPHASE];   // K, kept for the high phase
  logic [PWM_BITS+7:0] pd;
  logic [PWM_BITS:0]   k   [NPHASE];
  logic [PWM_BITS:0]   s   [NPHASE];
  logic [NPHASE-1:0]   del;

  assign pd = (PWM_BITS+8)'(j_value(pulse_del) * DT_UNIT);

  always_comb begin
    for (int i = 0; i < NPHASE; i++) begin
      k[i]   = {1'b0, sample[i]};
      del[i] = 1'b0;
      if ((PWM_BITS+8)'(k[i]) < pd && k[i] != '0) begin
        k[i]   = '0;
        del[i] = 1'b1;
      end else if ((PWM_BITS+8)'(N - k[i]) < pd && k[i] != (PWM_BITS+1)'(N)) begin
        k[i]   = (PWM_BITS+1)'(N);
        del[i] = 1'b1;
      end
      s[i] = ((PWM_BITS+1)'(N) - k[i]) >> 1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwm     <= '0;
      deleted <= '0;
      for (int i = 0; i < NPHASE; i++) begin
        st[i]  <= C_IDLE;
        cnt[i] <= '0;
        kh[i]  <= '0;
      end
    end else begin
      deleted <= '0;
      for (int i = 0; i < NPHASE; i++) begin
        if (fs_edge) begin
          kh[i]      <= k[i];
          deleted[i] <= del[i];
          if (k[i] == '0) begin
            pwm[i] <= 1'b0;
            st[i]  <= C_IDLE;
          end else if (s[i] == '0) begin
            pwm[i] <= 1'b1;
            cnt[i] <= k[i] - 1'b1;
            st[i]  <= C_HIGH;
          end else begin
            pwm[i] <= 1'b0;
            cnt[i] <= s[i] - 1'b1;
            st[i]  <= C_DELAY;
          end
        end else if (q_tick) begin
          unique case (st[i])
            C_DELAY: begin
              if (cnt[i] == '0) begin
                pwm[i] <= 1'b1;
                cnt[i] <= kh[i] - 1'b1;
                st[i]  <= C_HIGH;
              end else begin
                cnt[i] <= cnt[i] - 1'b1;
              end
            end
            C_HIGH: begin
              if (cnt[i] == '0) begin
                pwm[i] <= 1'b0;
                st[i]  <= C_IDLE;
              end else begin
                cnt[i] <= cnt[i] - 1'b1;
              end
            end
            default: ;
          endcase
        end
      end
    end
  end

endmodule
