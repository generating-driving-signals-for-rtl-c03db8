// tb_sine_rom: reads every word of the quarter-wave table and compares it
// with min(127, round(128 * sin(2*pi*(a+0.5)/1024))) computed with real
// arithmetic.  Also checks the one-clock read latency.
module tb_sine_rom;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [7:0] addr;
  logic [6:0] data;

  sine_rom dut (.clk(clk), .addr(addr), .data(data));

  always #5 clk = ~clk;

  function automatic int ref_entry(int a);
    real v;
    int r;
    v = 128.0 * $sin(2.0 * 3.14159265358979 * (real'(a) + 0.5) / 1024.0);
    r = int'(v);   // rounds to nearest
    return (r > 127) ? 127 : r;
  endfunction

  initial begin
    addr = 0;
    @(negedge clk);
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a);
      @(posedge clk);
      #1;
      checks++;
      if (int'(data) != ref_entry(a)) begin
        failures++;
        if (failures < 8) $display("addr %0d: %0d expected %0d", a, data, ref_entry(a));
      end
    end
    // latency: data must not follow addr before the clock edge
    @(negedge clk);
    addr = 8'd0;
    #1;
    checks++;
    if (int'(data) != ref_entry(255)) failures++;
    @(posedge clk);
    #1;
    checks++;
    if (int'(data) != ref_entry(0)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
