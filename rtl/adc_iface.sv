// adc_iface: ADC control for the stand-alone mode.
//
// The amplitude of the output voltage is then set by an external 8-bit ADC
// (offset binary) that measures an error voltage.  At the start of every
// period of the generated signal (the phase accumulator overflow, wrap) this
// block pulses adc_start for one clock, so the error is always sampled at the
// same phase.  When the converter answers with adc_eoc the result is stored
// in y_hold, which stays constant until the next conversion, i.e. for one
// output period.  y_hold resets to 0 (zero amplitude), so the output rises
// gently from zero after reset.  conv_done pulses when y_hold is updated.
//
// Sampling synchronised to the output period and holding the value through
// the period follow the source design; the start/end-of-conversion handshake
// is this implementation's assumption about the ADC.
module adc_iface
  import ppm_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wrap,
  input  logic [AMP_BITS-1:0] adc_data,
  input  logic                adc_eoc,
  output logic                adc_start,
  output logic [AMP_BITS-1:0] y_hold,
  output logic                conv_done
);

  logic waiting;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_start <= 1'b0;
      waiting   <= 1'b0;
      y_hold    <= '0;
      conv_done <= 1'b0;
    end else begin
      adc_start <= 1'b0;
      conv_done <= 1'b0;
      if (wrap) begin
        adc_start <= 1'b1;
        waiting   <= 1'b1;
      end else if (waiting && adc_eoc) begin
        y_hold    <= adc_data;
        waiting   <= 1'b0;
        conv_done <= 1'b1;
      end
    end
  end

endmodule
