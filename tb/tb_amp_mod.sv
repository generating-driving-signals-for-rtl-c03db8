// tb_amp_mod: drives the serial amplitude modulator with corner and random
// operands and compares Z with 128 +/- floor(|X| * Y / 256); checks that done
// comes exactly 7 clocks after the start edge.
module tb_amp_mod;
  import ppm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, sign = 0, busy, done;
  logic [6:0] mag = 0;
  logic [7:0] y = 0, z;

  amp_mod dut (.clk, .rst_n, .start, .sign, .mag, .y, .busy, .done, .z);

  always #5 clk = ~clk;

  task automatic run(input logic s, input int m, input int yy);
    int lat, exp_z, q;
    @(negedge clk);
    sign = s; mag = 7'(m); y = 8'(yy); start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;
    while (!done && lat < 50) begin
      @(negedge clk);
      lat++;
    end
    q     = (m * yy) / 256;
    exp_z = s ? 128 - q : 128 + q;
    checks++;
    if (int'(z) != exp_z) begin
      failures++;
      $display("sign %0d mag %0d y %0d: z %0d expected %0d", s, m, yy, z, exp_z);
    end
    checks++;
    if (lat != 7) begin   // done visible 7 clocks after the start edge
      failures++;
      $display("latency %0d", lat);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 127, 255); run(1, 127, 255); run(0, 0, 255); run(1, 0, 0);
    run(0, 64, 128);  run(1, 1, 255);   run(0, 127, 1);  run(1, 100, 200);
    for (int i = 0; i < 300; i++) run($urandom_range(0, 1), $urandom_range(0, 127), $urandom_range(0, 255));
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
