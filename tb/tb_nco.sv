// tb_nco: phase accumulator.  Applies increments with random gaps between
// sampling edges, and compares accumulator, phase and overflow with a
// reference sum modulo 2^20.  Checks that 500 gives one wrap every 2098 or
// 2097 periods (2^20 / 500 = 2097.15, 50 Hz at Fs = 104.86 kHz) and that 0
// freezes the phase.
module tb_nco;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, fs_edge = 0;
  logic [19:0] dphi = 0, acc;
  logic [9:0] phase;
  logic wrap;
  longint ref_acc = 0;

  nco dut (.clk, .rst_n, .fs_edge, .dphi, .acc, .phase, .wrap);

  always #5 clk = ~clk;

  task automatic step(input int d);
    logic exp_wrap;
    @(negedge clk);
    dphi = 20'(d); fs_edge = 1;
    @(negedge clk);
    fs_edge = 0;
    exp_wrap = (ref_acc + d) >= (1 << 20);
    ref_acc  = (ref_acc + d) % (1 << 20);
    checks++;
    if (acc != 20'(ref_acc) || phase != 10'(ref_acc >> 10) || wrap != exp_wrap) begin
      failures++;
      if (failures < 5) $display("acc %0d exp %0d wrap %0d", acc, ref_acc, wrap);
    end
    repeat ($urandom_range(1, 3)) @(negedge clk);
    checks++;
    if (acc != 20'(ref_acc) || wrap) failures++;
  endtask

  initial begin
    int wraps, last, gap;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) step($urandom_range(0, (1 << 19)));
    for (int i = 0; i < 20; i++) step(0);
    wraps = 0; last = -1;
    for (int i = 0; i < 3 * 2098; i++) begin
      step(500);
      if (ref_acc < 500) begin
        if (last >= 0) begin
          gap = i - last;
          checks++;
          if (gap != 2097 && gap != 2098) failures++;
        end
        last = i;
        wraps++;
      end
    end
    checks++;
    if (wraps < 2) failures++;
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
