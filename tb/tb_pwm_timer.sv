// tb_pwm_timer: the timer is clocked by a pwm_timebase.  Every period each
// channel gets a new random or corner-case sample, written at a random time
// during the period.  For every quantization tick t the output is compared
// with the reference: high for s <= t < s + K, s = (256 - K) / 2, where K is
// the sample taken at the sampling edge after pulse deletion (K < PD -> 0,
// 256 - K < PD -> 256, PD = 4J ticks).  Runs with prescale 0 and 2 and all
// four pulse deletion settings, and counts deleted pulses.
module tb_pwm_timer;
  import ppm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] prescale = 0;
  logic q_tick, fs_edge, slot_start;
  logic [1:0] slot;
  logic [7:0] count;
  logic [7:0] sample [NPHASE];
  jsel_e pulse_del = J_1;
  logic [2:0] pwm, deleted;
  int kcur [NPHASE];
  logic tick_seen = 0;
  int deletions = 0, periods = 0;

  pwm_timebase u_tb (.clk, .rst_n, .prescale, .q_tick, .fs_edge, .slot_start, .slot, .count);
  pwm_timer dut (.clk, .rst_n, .q_tick, .fs_edge, .sample, .pulse_del, .pwm, .deleted);

  always #5 clk = ~clk;

  function automatic int after_del(int k, int pd);
    if (k != 0 && k < pd) return 0;
    if (k != 256 && 256 - k < pd) return 256;
    return k;
  endfunction

  always @(posedge clk) begin
    tick_seen <= rst_n && q_tick;
    if (rst_n && fs_edge) begin
      periods <= periods + 1;
      for (int i = 0; i < NPHASE; i++) begin
        kcur[i] <= after_del(int'(sample[i]), 4 << (2 * int'(pulse_del)));
      end
    end
    for (int i = 0; i < NPHASE; i++) if (deleted[i]) deletions <= deletions + 1;
  end

  always @(negedge clk) begin
    if (tick_seen && periods > 1) begin
      for (int i = 0; i < NPHASE; i++) begin
        int t, s;
        logic e;
        t = int'(count);
        s = (256 - kcur[i]) / 2;
        e = (t >= s) && (t < s + kcur[i]);
        checks++;
        if (pwm[i] != e) begin
          failures++;
          if (failures < 6) $display("ch%0d K=%0d t=%0d pwm=%0d", i, kcur[i], t, pwm[i]);
        end
      end
    end
  end

  initial begin
    int corner [8] = '{0, 1, 2, 3, 128, 253, 254, 255};
    foreach (sample[i]) sample[i] = 8'd128;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 80; p++) begin
      @(posedge clk iff fs_edge);
      if (p % 10 == 0) pulse_del = jsel_e'((p / 10) % 4);
      if (p == 40) prescale = 8'd2;
      repeat ($urandom_range(5, 100)) @(negedge clk);
      for (int i = 0; i < NPHASE; i++)
        sample[i] = (i == p % 3) ? 8'(corner[$urandom_range(0, 7)]) : 8'($urandom_range(0, 255));
      if (p % 10 == 9) begin
        // make the deletion setting visible: one sample just below PD in each band
        sample[0] = 8'(((4 << (2 * int'(pulse_del))) - 1) % 256);
      end
    end
    @(posedge clk iff fs_edge);
    @(posedge clk iff fs_edge);
    checks++;
    if (deletions == 0) failures++;
    $display("periods %0d deleted pulses %0d", periods, deletions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
