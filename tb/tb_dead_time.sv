// tb_dead_time: drives random PWM edges and compares hi/lo with a reference:
// after an edge of pwm (seen one clock later) both are low; the requested
// switch turns on J*4 clocks later unless another edge came first.  Also
// checks that hi and lo are never high together, for all four J settings.
module tb_dead_time;
  import ppm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, pwm = 0;
  jsel_e dt_sel = J_1;
  logic hi, lo, inserted;

  dead_time dut (.clk, .rst_n, .pwm, .dt_sel, .hi, .lo, .inserted);

  always #5 clk = ~clk;

  // reference: clocks since the last change of pwm
  int since = 0;
  logic pwm_prev = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 4; j++) begin
      int dt;
      dt_sel = jsel_e'(j);
      dt = 4 << (2 * j);
      repeat (dt + 4) @(negedge clk);
      for (int e = 0; e < 60; e++) begin
        int hold;
        pwm = ~pwm;
        hold = (e % 3 == 0) ? $urandom_range(1, dt) : $urandom_range(dt, 3 * dt);
        for (int c = 1; c <= hold; c++) begin
          @(negedge clk);
          // c clocks after the change of pwm; the block saw it at clock 1
          checks++;
          if (c < dt + 1) begin
            if (hi || lo) failures++;
          end else begin
            if (hi != pwm || lo != ~pwm) begin
              failures++;
              if (failures < 6) $display("J%0d c=%0d dt=%0d hi %0d lo %0d pwm %0d", j, c, dt, hi, lo, pwm);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (hi && lo) failures++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
