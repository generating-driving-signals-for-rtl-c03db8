// tb_spi_regs: sends SPI words (mode 0, MSB first, SCLK = clk/8) and checks
// that PIR, ACR and TCR take the data of whole 24-bit words only, keep their
// reset values until written, ignore short/long words and address 3, and
// stay unchanged while a word is being shifted in.
module tb_spi_regs;
  import ppm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic sclk = 0, mosi = 0, cs_n = 1;
  logic [19:0] pir;
  logic [7:0]  acr;
  tcr_t        tcr;
  logic        wr_strobe;
  int          strobes = 0;

  spi_regs dut (.clk, .rst_n, .spi_sclk(sclk), .spi_mosi(mosi), .spi_cs_n(cs_n),
                .pir, .acr, .tcr, .wr_strobe);

  always #5 clk = ~clk;
  always @(posedge clk) if (wr_strobe) strobes++;

  task automatic send(input logic [31:0] word, input int nbits);
    cs_n = 0;
    repeat (4) @(negedge clk);
    for (int b = nbits - 1; b >= 0; b--) begin
      mosi = word[b];
      repeat (4) @(negedge clk);
      sclk = 1;
      repeat (4) @(negedge clk);
      sclk = 0;
    end
    repeat (4) @(negedge clk);
    cs_n = 1;
    repeat (6) @(negedge clk);
  endtask

  task automatic check(input int e_pir, input int e_acr, input int e_tcr, input string what);
    checks++;
    if (int'(pir) != e_pir || int'(acr) != e_acr || int'(tcr) != e_tcr) begin
      failures++;
      $display("%s: pir %0d acr %0d tcr %h", what, pir, acr, tcr);
    end
  endtask

  initial begin
    int e_pir, e_acr, e_tcr, s0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    e_pir = 500; e_acr = 0; e_tcr = int'(TCR_RESET);
    check(e_pir, e_acr, e_tcr, "reset");
    send({8'h00, 2'd0, 2'b00, 20'h12345}, 24); e_pir = 'h12345;
    check(e_pir, e_acr, e_tcr, "pir");
    send({8'h00, 2'd1, 2'b00, 20'h000C8}, 24); e_acr = 'hC8;
    check(e_pir, e_acr, e_tcr, "acr");
    send({8'h00, 2'd2, 2'b00, 20'h02D1B}, 24); e_tcr = 'h2D1B;
    check(e_pir, e_acr, e_tcr, "tcr");
    checks++;
    if (tcr.prescale != 8'hB4 || tcr.dead_time != J_64 || tcr.gate_width != J_16 || tcr.pulse_del != J_4) failures++;
    s0 = strobes;
    send({8'h00, 2'd0, 2'b00, 20'h00001}, 23);
    check(e_pir, e_acr, e_tcr, "short word ignored");
    send({7'h00, 2'd0, 2'b00, 20'h00001, 1'b0}, 25);
    check(e_pir, e_acr, e_tcr, "long word ignored");
    send({8'h00, 2'd3, 2'b00, 20'hFFFFF}, 24);
    check(e_pir, e_acr, e_tcr, "address 3 ignored");
    checks++;
    if (strobes != s0) failures++;
    for (int i = 0; i < 30; i++) begin
      int a, d;
      a = $urandom_range(0, 2);
      d = $urandom_range(0, (1 << 20) - 1);
      send({8'h00, 2'(a), 2'b00, 20'(d)}, 24);
      if (a == 0) e_pir = d;
      else if (a == 1) e_acr = d & 'hFF;
      else e_tcr = d & 'h3FFF;
      check(e_pir, e_acr, e_tcr, "random");
    end
    checks++;
    if (strobes != s0 + 30) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // registers must not move while a word is being shifted in
  always @(posedge clk) if (rst_n && !cs_n && wr_strobe) begin
    failures++;
    $display("write while CS active");
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
