// tb_ppm_inverter_ctrl_n12: the end-to-end test of tb_ppm_inverter_ctrl with
// the controller built for a 12-bit PWM timer (N = 4096), the largest n the
// design is meant for.  The run is shortened (fewer periods, stand-alone
// mode at a higher output frequency) because each PWM period is 16 times
// longer, and the first run uses the longest pulse deletion time so that
// deletion happens; the checks are the same.
module tb_ppm_inverter_ctrl_n12;
  import ppm_pkg::*;
  localparam int NB = 12;               // PWM timer bits of the design under test
  localparam int N = 1 << NB;
  localparam int SA_PIR = 20000;        // stand-alone run: shortened
  localparam int SA_PERIODS = 120;      // about two output periods
  localparam int WATCHDOG = 3000000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, standalone = 0;
  logic sclk = 0, mosi = 0, cs_n = 1;
  logic adc_start, adc_eoc = 0;
  logic [7:0] adc_data = 0;
  logic fs_sync;
  logic [2:0] pwm, drv_hi, drv_lo;
  logic [5:0] gd_on, gd_off;

  ppm_inverter_ctrl #(.PWM_BITS(NB)) dut (
    .clk, .rst_n, .standalone, .spi_sclk(sclk), .spi_mosi(mosi), .spi_cs_n(cs_n),
    .adc_start, .adc_data, .adc_eoc, .fs_sync, .pwm, .drv_hi, .drv_lo, .gd_on, .gd_off
  );

  always #5 clk = ~clk;

  // ---------------- models of the host-visible state ----------------
  int pir_m = 500, acr_m = 0, presc_m = 0, dt_m = 4, gw_m = 16, pd_m = 4;
  int y_adc_m = 0;
  logic adc_wait_m = 0;
  int settle = 3;          // periods not checked after a configuration change

  // mechanism counters
  int n_spi_pir = 0, n_spi_acr = 0, n_spi_tcr = 0, n_del_low = 0, n_del_high = 0;
  int n_dead = 0, n_gd_on = 0, n_gd_off = 0, n_presc = 0, n_adc = 0, n_mode = 0;
  int n_wrap = 0, n_periods_checked = 0;

  function automatic int table_val(int a);
    int r;
    r = int'(128.0 * $sin(2.0 * 3.14159265358979 * (real'(a) + 0.5) / 1024.0));
    return (r > 127) ? 127 : r;
  endfunction

  function automatic int raw_sample(int ph, int yy);
    int h, a, m;
    h = ph % 512;
    a = (h < 256) ? h : 511 - h;
    m = (table_val(a) * yy) >> (16 - NB);
    return (ph >= 512) ? N / 2 - m : N / 2 + m;
  endfunction

  // ---------------- host SPI ----------------
  task automatic spi_write(input int addr, input int data);
    logic [23:0] w;
    w = {2'(addr), 2'b00, 20'(data)};
    @(posedge clk iff fs_sync);
    @(negedge clk);
    cs_n = 0;
    repeat (2) @(negedge clk);
    for (int b = 23; b >= 0; b--) begin
      mosi = w[b];
      repeat (4) @(negedge clk);
      sclk = 1;
      repeat (4) @(negedge clk);
      sclk = 0;
    end
    repeat (2) @(negedge clk);
    cs_n = 1;
    repeat (5) @(negedge clk);
    case (addr)
      0: begin pir_m = data; n_spi_pir++; end
      1: begin acr_m = data & 255; n_spi_acr++; end
      default: begin
        presc_m = (data >> 6) & 255;
        pd_m    = 4 << (2 * ((data >> 4) & 3));
        gw_m    = 4 << (2 * ((data >> 2) & 3));
        dt_m    = 4 << (2 * (data & 3));
        n_spi_tcr++;
      end
    endcase
    settle = 3;
  endtask

  function automatic int tcr_word(int presc, int pdj, int gwj, int dtj);
    return (presc << 6) | (pdj << 4) | (gwj << 2) | dtj;
  endfunction

  // ---------------- ADC model ----------------
  int adc_value = 40;
  always @(posedge clk) begin
    if (adc_start) begin
      fork
        begin
          repeat (30) @(negedge clk);
          adc_data = 8'(adc_value);
          adc_value = (adc_value * 7 + 61) % 256;
          adc_eoc = 1;
          @(negedge clk);
          adc_eoc = 0;
        end
      join_none
    end
  end
  always @(posedge clk) begin
    if (adc_start) adc_wait_m <= 1'b1;
    else if (adc_wait_m && adc_eoc) begin
      adc_wait_m <= 1'b0;
      y_adc_m    <= int'(adc_data);
      n_adc      <= n_adc + 1;
    end
  end

  // ---------------- period reference and measurement ----------------
  longint ref_acc = 0;
  int raw_next [3] = '{N / 2, N / 2, N / 2};
  int k_cur [3], s_cur [3];
  int hc [3], first [3];
  int cyc = 0, presc_cur = 0, edges = 0;

  always @(posedge clk) begin
    if (rst_n && fs_sync) begin
      edges++;
      // end of a period: compare the measurement
      if (edges > 3 && settle == 0) begin
        n_periods_checked++;
        if (presc_cur != 0) n_presc++;
        for (int i = 0; i < 3; i++) begin
          checks++;
          if (hc[i] != k_cur[i] * (presc_cur + 1) ||
              (k_cur[i] != 0 && first[i] != s_cur[i] * (presc_cur + 1))) begin
            failures++;
            if (failures < 10)
              $display("period %0d phase %0d: K %0d high %0d first %0d (P=%0d)",
                       edges, i, k_cur[i], hc[i], first[i], presc_cur);
          end
        end
      end
      if (settle > 0) settle--;
      // the samples computed in the last period are loaded now
      for (int i = 0; i < 3; i++) begin
        int k;
        k = raw_next[i];
        if (k != 0 && k < pd_m) begin k = 0; n_del_low++; end
        else if (k != N && N - k < pd_m) begin k = N; n_del_high++; end
        k_cur[i] = k;
        s_cur[i] = (N - k) / 2;
        hc[i] = 0;
        first[i] = -1;
      end
      presc_cur = presc_m;
      cyc = 0;
      // phase accumulator and the samples of the period that starts now
      if (ref_acc + pir_m >= (1 << 20)) n_wrap++;
      ref_acc = (ref_acc + pir_m) % (1 << 20);
      begin
        int ph, yy, offs [3] = '{0, 683, 341};
        ph = int'(ref_acc >> 10);
        yy = standalone ? y_adc_m : acr_m;
        for (int i = 0; i < 3; i++) raw_next[i] = raw_sample((ph + offs[i]) % 1024, yy);
      end
    end
  end

  // per-cycle measurement and switch-level checks
  int st_pwm [3] = '{0, 0, 0};
  int st_sw [6] = '{0, 0, 0, 0, 0, 0};
  logic [2:0] pwm_q = 0;
  logic [5:0] sw_q = 0;
  always @(negedge clk) begin
    logic [5:0] sw;
    if (rst_n) begin
      for (int i = 0; i < 3; i++) begin
        if (pwm[i]) begin
          if (first[i] < 0) first[i] = cyc;
          hc[i]++;
        end
        st_pwm[i] = (pwm[i] != pwm_q[i]) ? 0 : st_pwm[i] + 1;
        if (pwm[i] != pwm_q[i]) n_dead++;
        if (settle == 0 && edges > 3) begin
          checks++;
          if (drv_hi[i] && drv_lo[i]) failures++;
          if (st_pwm[i] >= 1 && st_pwm[i] <= dt_m) begin
            if (drv_hi[i] || drv_lo[i]) begin
              failures++;
              if (failures < 10) $display("leg %0d: switch on during dead time", i);
            end
          end else if (st_pwm[i] > dt_m) begin
            if (drv_hi[i] != pwm[i] || drv_lo[i] != !pwm[i]) begin
              failures++;
              if (failures < 10) $display("leg %0d: wrong switch state", i);
            end
          end
        end
      end
      sw = {drv_lo[2], drv_hi[2], drv_lo[1], drv_hi[1], drv_lo[0], drv_hi[0]};
      for (int j = 0; j < 6; j++) begin
        if (sw[j] != sw_q[j]) begin
          st_sw[j] = 0;
          if (sw[j]) n_gd_on++; else n_gd_off++;
        end else st_sw[j]++;
        if (settle == 0 && edges > 3) begin
          checks++;
          if (st_sw[j] >= 1 && st_sw[j] <= gw_m && st_sw[j] < 1000) begin
            if (gd_on[j] != sw[j] || gd_off[j] != !sw[j]) begin
              failures++;
              if (failures < 10) $display("switch %0d: impulse missing", j);
            end
          end else if (st_sw[j] > gw_m) begin
            if (gd_on[j] || gd_off[j]) begin
              failures++;
              if (failures < 10) $display("switch %0d: impulse too long", j);
            end
          end
          if (gd_on[j] && gd_off[j]) failures++;
        end
      end
      pwm_q = pwm;
      sw_q  = sw;
      cyc++;
    end
  end

  task automatic periods(input int n);
    repeat (n) @(posedge clk iff fs_sync);
  endtask

  task automatic count_check(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never seen: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reset state: zero amplitude, every pulse 128 ticks
    periods(6);
    checks++;
    if (k_cur[0] != N / 2 || k_cur[1] != N / 2 || k_cur[2] != N / 2) failures++;
    // peripheral mode, full amplitude, about 2 kHz, short times
    // longest deletion time, so that the narrowest pulses of a 12-bit timer
    // (24 ticks at full amplitude) are deleted
    spi_write(2, tcr_word(0, 3, 0, 0));
    spi_write(1, 255);
    spi_write(0, 20000);
    periods(60);
    // phase step: a larger increment for one period, then back
    spi_write(0, 120000);
    spi_write(0, 20000);
    periods(20);
    // reduced amplitude, longer dead time / impulses, wide deletion, prescaler
    spi_write(1, 100);
    spi_write(2, tcr_word(1, 2, 1, 1));
    periods(30);
    spi_write(2, tcr_word(0, 1, 2, 0));
    spi_write(1, 230);
    periods(30);
    // stand-alone mode at the reset frequency of 50 Hz
    spi_write(0, SA_PIR);
    spi_write(2, tcr_word(0, 0, 0, 0));
    @(negedge clk);
    standalone = 1;
    n_mode++;
    settle = 3;
    periods(SA_PERIODS);
    standalone = 0;
    n_mode++;
    settle = 3;
    periods(10);
    count_check("SPI write PIR", n_spi_pir);
    count_check("SPI write ACR", n_spi_acr);
    count_check("SPI write TCR", n_spi_tcr);
    count_check("deleted short high pulse", n_del_low);
    count_check("deleted short low pulse", n_del_high);
    count_check("dead time", n_dead);
    count_check("turn-on impulse", n_gd_on);
    count_check("turn-off impulse", n_gd_off);
    count_check("prescaled period", n_presc);
    count_check("ADC conversion", n_adc > 1 ? n_adc : 0);
    count_check("mode switch", n_mode);
    count_check("output period wrap", n_wrap);
    $display("checked periods %0d, spi %0d/%0d/%0d, deleted %0d/%0d, dead times %0d, impulses %0d/%0d, prescaled %0d, adc %0d, mode switches %0d, wraps %0d",
             n_periods_checked, n_spi_pir, n_spi_acr, n_spi_tcr, n_del_low, n_del_high,
             n_dead, n_gd_on, n_gd_off, n_presc, n_adc, n_mode, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
