// spi_regs: host interface of the controller.  A Serial Peripheral Interface
// shift register collects a control word; on receipt of a whole word it is
// buffered into the Phase Increment Register (PIR), the Amplitude Control
// Register (ACR) or the Timer Control Register (TCR).
//
// How it works: SCLK, MOSI and CS_N are synchronised into the system clock
// domain by two flip-flops each, so SCLK must be slower than clk/4.  MOSI is
// sampled on rising SCLK, MSB first (SPI mode 0).  When CS_N rises after exactly
// SPI_WORD_BITS (24) bits, the word {addr[1:0], 2'b00, data[19:0]} is written:
// addr 0 = PIR (data[PHASE_BITS-1:0]), 1 = ACR (data[7:0]), 2 = TCR
// (data[13:0], layout tcr_t).  A word of any other length, or addr 3, is
// dropped.  The register updates at the third clock edge after CS_N rises,
// and wr_strobe pulses for one clock at that moment.
//
// The use of SPI, the shift register and the three buffered registers follow
// the source design; the word format, the SPI mode, the synchroniser and the
// reset values (PIR = 500, i.e. 50 Hz; ACR = 0, zero amplitude) are this
// implementation's choices.
module spi_regs
  import ppm_pkg::*;
#(
  parameter int unsigned PHASE_BITS = PHASE_BITS_DEF,
  parameter int unsigned PIR_RESET  = PIR_RESET_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  spi_sclk,
  input  logic                  spi_mosi,
  input  logic                  spi_cs_n,
  output logic [PHASE_BITS-1:0] pir,
  output logic [AMP_BITS-1:0]   acr,
  output tcr_t                  tcr,
  output logic                  wr_strobe
);

  logic [2:0] sclk_s, cs_s;
  logic [1:0] mosi_s;
  logic [SPI_WORD_BITS-1:0] shreg;
  logic [5:0] nbits;

  wire sclk_rise = sclk_s[1] & ~sclk_s[2];
  wire cs_rise   = cs_s[1] & ~cs_s[2];
  wire cs_active = ~cs_s[1];

  reg_addr_e waddr;
  assign waddr = reg_addr_e'(shreg[SPI_WORD_BITS-1 -: 2]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s    <= '0;
      cs_s      <= '1;
      mosi_s    <= '0;
      shreg     <= '0;
      nbits     <= '0;
      pir       <= PHASE_BITS'(PIR_RESET);
      acr       <= '0;
      tcr       <= TCR_RESET;
      wr_strobe <= 1'b0;
    end else begin
      sclk_s    <= {sclk_s[1:0], spi_sclk};
      cs_s      <= {cs_s[1:0], spi_cs_n};
      mosi_s    <= {mosi_s[0], spi_mosi};
      wr_strobe <= 1'b0;
      if (cs_rise) begin
        if (nbits == 6'(SPI_WORD_BITS)) begin
          unique case (waddr)
            REG_PIR: begin pir <= shreg[PHASE_BITS-1:0]; wr_strobe <= 1'b1; end
            REG_ACR: begin acr <= shreg[AMP_BITS-1:0];   wr_strobe <= 1'b1; end
            REG_TCR: begin tcr <= tcr_t'(shreg[$bits(tcr_t)-1:0]); wr_strobe <= 1'b1; end
            default: ;
          endcase
        end
        nbits <= '0;
      end else if (cs_active && sclk_rise) begin
        shreg <= {shreg[SPI_WORD_BITS-2:0], mosi_s[1]};
        if (nbits != '1) nbits <= nbits + 6'd1;
      end else if (!cs_active) begin
        nbits <= '0;
      end
    end
  end

endmodule
