// gate_drive: pulse position modulated (PPM) gate-drive impulses for one power
// switch driven through a pulse transformer.
//
// A MOSFET gate holds its charge, so the switch needs only the positions of
// the edges of its drive signal: a short impulse that charges the gate at the
// turn-on edge, and an impulse of opposite polarity that discharges it at the
// turn-off edge.  At each rising edge of drv this block raises on_p, at each
// falling edge off_p, each for W = J * DT_UNIT clocks (J = 1, 4, 16, 64 from
// the TCR, the same ranges as the dead time).  The transformer driver applies
// +V while on_p and -V while off_p is high, so the core is reset every cycle.
// A new edge ends the running impulse and starts its own.  Timing: the
// impulse begins one clock after drv changes.
//
// The PPM principle, the opposite-polarity turn-off impulse and the
// programmable width follow the source design; the two-wire output and the
// counter are this implementation's choices.
module gate_drive
  import ppm_pkg::*;
#(
  parameter int unsigned DT_UNIT = DT_UNIT_DEF
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  drv,
  input  jsel_e width_sel,
  output logic  on_p,
  output logic  off_p
);

  logic       drv_q;
  logic [9:0] cnt;
  logic [9:0] w;

  assign w = 10'(j_value(width_sel) * DT_UNIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drv_q <= 1'b0;
      cnt   <= '0;
      on_p  <= 1'b0;
      off_p <= 1'b0;
    end else begin
      drv_q <= drv;
      if (drv != drv_q) begin
        on_p  <= drv;
        off_p <= ~drv;
        cnt   <= w - 10'd1;
      end else if (on_p || off_p) begin
        if (cnt == '0) begin
          on_p  <= 1'b0;
          off_p <= 1'b0;
        end else begin
          cnt <= cnt - 10'd1;
        end
      end
    end
  end

  a_one_polarity: assert property (@(posedge clk) disable iff (!rst_n) !(on_p && off_p));

endmodule
