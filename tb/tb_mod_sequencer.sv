// tb_mod_sequencer: the sequencer runs from a pwm_timebase; the test plays
// the phase accumulator (a random phase each period, changed at the sampling
// edge) and changes the amplitude word at random times.  Each buffer write is
// checked against 128 +/- floor(T * Y / 256), where T is the table value
// computed with real arithmetic for the phase shifted by 0, +683 or +341,
// the sign is that of the half cycle, and Y is the amplitude at the start of
// the period.  Also checks that phase i is written within Ts/4 slot i and
// that all three buffers are written every period.
module tb_mod_sequencer;
  import ppm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic q_tick, fs_edge, slot_start;
  logic [1:0] slot;
  logic [7:0] count;
  logic [9:0] phase = 0;
  logic [7:0] y = 0, y_ref = 0;
  logic [7:0] sample [NPHASE];
  logic sample_wr;
  int writes = 0, periods = 0, written_in_period = 0;

  pwm_timebase u_tb (.clk, .rst_n, .prescale(8'd0), .q_tick, .fs_edge, .slot_start, .slot, .count);
  mod_sequencer dut (.clk, .rst_n, .slot_start, .slot, .phase, .y, .sample, .sample_wr);

  always #5 clk = ~clk;

  function automatic int table_val(int a);
    int r;
    r = int'(128.0 * $sin(2.0 * 3.14159265358979 * (real'(a) + 0.5) / 1024.0));
    return (r > 127) ? 127 : r;
  endfunction

  function automatic int ref_sample(int ph, int yy);
    int h, a, m;
    h = ph % 512;
    a = (h < 256) ? h : 511 - h;
    m = (table_val(a) * yy) / 256;
    return (ph >= 512) ? 128 - m : 128 + m;
  endfunction

  always @(posedge clk) begin
    if (rst_n && fs_edge) begin
      phase <= 10'($urandom);
      y_ref <= y;
      periods <= periods + 1;
      if (periods > 0) begin
        checks++;
        if (written_in_period != 3) failures++;
      end
      written_in_period <= 0;
    end
  end

  // check each write one clock later, when the buffer holds it
  logic wr_d = 0;
  int   slot_of_write = 0;
  always @(posedge clk) begin
    wr_d <= sample_wr;
    if (sample_wr) begin
      slot_of_write <= int'(count) / 64;
      written_in_period <= written_in_period + 1;
    end
  end
  always @(negedge clk) begin
    if (wr_d && periods > 0) begin
      int i, offs [3] = '{0, 683, 341};
      i = slot_of_write;
      writes++;
      checks++;
      if (i > 2 || int'(sample[i]) != ref_sample((int'(phase) + offs[i]) % 1024, int'(y_ref))) begin
        failures++;
        if (failures < 6) $display("slot %0d phase %0d y %0d sample %0d", i, phase, y_ref, sample[i]);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    for (int i = 0; i < NPHASE; i++) begin
      checks++;
      if (sample[i] != 8'd128) failures++;
    end
    rst_n = 1;
    for (int p = 0; p < 400; p++) begin
      repeat ($urandom_range(10, 240)) @(negedge clk);
      y = (p % 50 == 0) ? 8'd255 : (p % 50 == 1) ? 8'd0 : 8'($urandom);
      repeat (300) @(negedge clk) if (fs_edge) break;
    end
    checks++;
    if (writes < 3 * 350) failures++;
    $display("periods %0d writes %0d", periods, writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
