// tb_phase_shift: exhaustive check of the phase shift block: for every input
// phase and select, the output must be the input plus 0, 2/3 or 1/3 of a
// cycle (round(1024*k/3)) modulo 1024.
module tb_phase_shift;
  int checks = 0, failures = 0;
  logic [9:0] pin, pout;
  logic [1:0] sel;

  phase_shift dut (.phase_in(pin), .sel(sel), .phase_out(pout));

  initial begin
    int exp_off [4] = '{0, 683, 341, 0};
    for (int p = 0; p < 1024; p++)
      for (int s = 0; s < 4; s++) begin
        pin = 10'(p); sel = 2'(s);
        #1;
        checks++;
        if (int'(pout) != (p + exp_off[s]) % 1024) begin
          failures++;
          if (failures < 5) $display("phase %0d sel %0d -> %0d", p, s, pout);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
