// dead_time: dead-time generator for one inverter leg.
//
// From one PWM signal it makes the complementary pair hi (upper switch) and lo
// (lower switch).  At every edge of pwm both outputs go low at once; after a
// dead time of J * DT_UNIT clocks (J = 1, 4, 16, 64 from the TCR; J * 150 ns
// at 26.844 MHz with the default DT_UNIT = 4) the switch that pwm asks for is
// turned on.  A new edge during the dead time restarts it, so pulses shorter
// than the dead time do not reach the switches.  Timing: the edge is seen one
// clock after pwm changes; the turned-off output falls then, and the turned-on
// output rises J * DT_UNIT clocks later.  After reset both are off, and lo
// turns on after one dead time if pwm is low.
//
// The J * 150 ns settings and the purpose (no cross conduction) follow the
// source design; the counter implementation is this implementation's own.
module dead_time
  import ppm_pkg::*;
#(
  parameter int unsigned DT_UNIT = DT_UNIT_DEF
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  pwm,
  input  jsel_e dt_sel,
  output logic  hi,
  output logic  lo,
  output logic  inserted   // one clock at the start of each dead time
);

  logic       pwm_q, busy;
  logic [9:0] cnt;
  logic [9:0] dt;

  assign dt = 10'(j_value(dt_sel) * DT_UNIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwm_q    <= 1'b0;
      busy     <= 1'b1;
      cnt      <= 10'(DT_UNIT) - 10'd1;
      hi       <= 1'b0;
      lo       <= 1'b0;
      inserted <= 1'b0;
    end else begin
      pwm_q    <= pwm;
      inserted <= 1'b0;
      if (pwm != pwm_q) begin
        hi       <= 1'b0;
        lo       <= 1'b0;
        busy     <= 1'b1;
        cnt      <= dt - 10'd1;
        inserted <= 1'b1;
      end else if (busy) begin
        if (cnt == '0) begin
          busy <= 1'b0;
          hi   <= pwm_q;
          lo   <= ~pwm_q;
        end else begin
          cnt <= cnt - 10'd1;
        end
      end
    end
  end

endmodule
