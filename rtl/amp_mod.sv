// amp_mod: amplitude modulator, the digital multiplier and adder between the
// sine table and the PWM timer.
//
// It computes Z = N/2 + X * Y / 256 for a signed PWM sample X (sign bit plus
// 7-bit magnitude from the sine table) and an unsigned amplitude word Y
// (0 .. 255, so the modulation index is Y/256).  For N = 256 this is
// Z = 128 +/- ((|X| * Y) >> 8): the eight LSBs of the product are dropped
// and N/2 = 128 is added, giving the sample in offset binary.  For other
// PWM_BITS the product is shifted by (16 - PWM_BITS) instead, keeping the
// same modulation index.
//
// The multiplier is serial (shift and add): a start pulse loads the operands,
// one magnitude bit is processed per clock, and done pulses for one clock,
// with z valid from then on, MAG_BITS = 7 clocks after the clock edge that
// takes start.  busy is high in between; a start while busy restarts the
// operation.
//
// Eq. Z = X*Y/256 + 128, the 8-bit operands, the dropped LSBs and the offset
// follow the source design, which also multiplies serially (one phase per
// quarter PWM period).  Truncating the magnitude (rounding toward zero, so the
// positive and negative half waves are symmetric) rather than the two's
// complement product is this implementation's choice.
module amp_mod
  import ppm_pkg::*;
#(
  parameter int unsigned PWM_BITS = PWM_BITS_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                sign,   // 0 = plus, 1 = minus
  input  logic [MAG_BITS-1:0] mag,
  input  logic [AMP_BITS-1:0] y,
  output logic                busy,
  output logic                done,
  output logic [PWM_BITS-1:0] z
);

  localparam int unsigned PBITS = MAG_BITS + AMP_BITS;  // 15-bit product
  localparam int unsigned SHIFT = 16 - PWM_BITS;
  localparam logic [PWM_BITS-1:0] HALF = PWM_BITS'(1) << (PWM_BITS - 1);

  logic [PBITS-1:0]    mcand, prod, prod_next, q;
  logic [MAG_BITS-1:0] mplier;
  logic [2:0]          cnt;
  logic                sgn;

  assign prod_next = mplier[0] ? prod + mcand : prod;
  assign q         = prod_next >> SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mcand  <= '0;
      mplier <= '0;
      prod   <= '0;
      cnt    <= '0;
      sgn    <= 1'b0;
      busy   <= 1'b0;
      done   <= 1'b0;
      z      <= HALF;
    end else begin
      done <= 1'b0;
      if (start) begin
        mcand  <= PBITS'(y);
        mplier <= mag;
        prod   <= '0;
        cnt    <= 3'(MAG_BITS);
        sgn    <= sign;
        busy   <= 1'b1;
      end else if (busy) begin
        prod   <= prod_next;
        mcand  <= mcand << 1;
        mplier <= mplier >> 1;
        cnt    <= cnt - 3'd1;
        if (cnt == 3'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
          z    <= sgn ? HALF - PWM_BITS'(q) : HALF + PWM_BITS'(q);
        end
      end
    end
  end

endmodule
