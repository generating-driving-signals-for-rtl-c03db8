// tb_gate_drive: drives random switch signals and checks that every rising
// edge gives an on impulse and every falling edge an off impulse of exactly
// J*4 clocks (shortened only by the next edge), starting one clock after the
// edge, for all four width settings.
module tb_gate_drive;
  import ppm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, drv = 0;
  jsel_e width_sel = J_1;
  logic on_p, off_p;

  gate_drive dut (.clk, .rst_n, .drv, .width_sel, .on_p, .off_p);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (on_p || off_p) failures++;
    for (int j = 0; j < 4; j++) begin
      int w;
      width_sel = jsel_e'(j);
      w = 4 << (2 * j);
      for (int e = 0; e < 40; e++) begin
        int hold;
        drv = ~drv;
        hold = (e % 4 == 0) ? $urandom_range(1, w) : $urandom_range(w + 1, 2 * w + 5);
        for (int c = 1; c <= hold; c++) begin
          @(negedge clk);
          checks++;
          if (c <= w) begin
            if (on_p != drv || off_p != ~drv) begin
              failures++;
              if (failures < 6) $display("J%0d c=%0d on %0d off %0d drv %0d", j, c, on_p, off_p, drv);
            end
          end else begin
            if (on_p || off_p) failures++;
          end
        end
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
