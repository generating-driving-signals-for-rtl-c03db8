// tb_sign_logic: exhaustive check of the quarter-wave folding.  For every
// phase the reference computes the quadrant independently: the table point
// (phase mod 512) is mirrored about 255.5 in the second half of each half
// cycle, and the sign is set for phases of 512 and above.
module tb_sign_logic;
  int checks = 0, failures = 0;
  logic [9:0] ph;
  logic [7:0] addr;
  logic       sign;

  sign_logic dut (.phase(ph), .addr(addr), .sign(sign));

  initial begin
    for (int p = 0; p < 1024; p++) begin
      int h, ea;
      ph = 10'(p);
      #1;
      h  = p % 512;
      ea = (h < 256) ? h : 511 - h;
      checks++;
      if (int'(addr) != ea || sign != (p >= 512)) begin
        failures++;
        if (failures < 5) $display("phase %0d: addr %0d sign %0d", p, addr, sign);
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
