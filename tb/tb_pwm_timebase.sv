// tb_pwm_timebase: samples the outputs in every clock cycle and checks the quantization tick rate for several prescale
// values, that fs_edge comes every 256 ticks and that slot_start/slot mark
// ticks 0, 64, 128 and 192 of the period.
module tb_pwm_timebase;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] prescale = 0;
  logic q_tick, fs_edge, slot_start;
  logic [1:0] slot;
  logic [7:0] count;

  pwm_timebase dut (.clk, .rst_n, .prescale, .q_tick, .fs_edge, .slot_start, .slot, .count);

  always #5 clk = ~clk;

  initial begin
    int presc_list [4] = '{0, 1, 3, 6};
    repeat (3) @(negedge clk);
    foreach (presc_list[p]) begin
      int clocks, ticks, last_fs, tick_no;
      rst_n = 0;
      prescale = 8'(presc_list[p]);
      @(negedge clk);
      rst_n = 1;
      clocks = 0; ticks = 0; last_fs = -1; tick_no = -1;
      while (ticks < 3 * 256 + 1) begin
        #1;
        clocks++;
        if (q_tick) begin
          ticks++;
          tick_no++;
          checks++;
          if (clocks != ticks * (presc_list[p] + 1)) begin failures++; if (failures < 5) $display("p%0d clocks %0d ticks %0d", p, clocks, ticks); end
          // tick_no counts ticks from the first one, which starts a period
          checks++;
          if (fs_edge != (tick_no % 256 == 0)) begin failures++; if (failures < 5) $display("fs p%0d tick %0d", p, tick_no); end
          checks++;
          if (slot_start != (tick_no % 64 == 0) || (slot_start && int'(slot) != (tick_no % 256) / 64)) failures++;
        end else begin
          checks++;
          if (fs_edge || slot_start) failures++;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
