// tb_adc_iface: a behavioural ADC answers each start pulse with a new value
// after a random conversion time.  Checks one start per wrap, that y_hold
// takes the converted value and holds it until the next conversion, and that
// an end-of-conversion without a request is ignored.
module tb_adc_iface;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic wrap = 0, adc_eoc = 0, adc_start, conv_done;
  logic [7:0] adc_data = 0, y_hold;
  int starts = 0;

  adc_iface dut (.clk, .rst_n, .wrap, .adc_data, .adc_eoc, .adc_start, .y_hold, .conv_done);

  always #5 clk = ~clk;
  always @(posedge clk) if (adc_start) starts++;

  initial begin
    logic [7:0] expect_y = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (y_hold != 0) failures++;
    // eoc without a request
    adc_data = 8'h55; adc_eoc = 1;
    @(negedge clk);
    adc_eoc = 0;
    @(negedge clk);
    checks++;
    if (y_hold != 0) failures++;
    for (int i = 0; i < 50; i++) begin
      int s0, conv;
      s0 = starts;
      wrap = 1;
      @(negedge clk);
      wrap = 0;
      @(negedge clk);
      checks++;
      if (starts != s0 + 1) failures++;
      conv = $urandom_range(1, 40);
      repeat (conv) begin
        @(negedge clk);
        checks++;
        if (y_hold != expect_y) failures++;
      end
      adc_data = 8'($urandom);
      adc_eoc = 1;
      @(negedge clk);
      adc_eoc = 0;
      expect_y = adc_data;
      adc_data = 8'($urandom);
      repeat ($urandom_range(2, 30)) begin
        @(negedge clk);
        checks++;
        if (y_hold != expect_y) begin
          failures++;
          $display("y_hold %0d expected %0d", y_hold, expect_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
