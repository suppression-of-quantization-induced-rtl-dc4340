// vin_sweep_tb: static output error over the input-voltage range.
//
// The ADC full scale stays at 10 V while the converter's input voltage is
// swept from 9.2 V to 10.8 V in 0.1 V steps, so the duty cycle needed for
// 5.12 V moves across the DPWM quantization levels. Two configurations of
// the controller (default parameters, N = 5) regulate the behavioural buck
// at no load: N_ADC = 4 with plain 5-bit DPWM, and N_ADC = 8 with 9-bit
// DDPWM (k = 4). After 3000 periods of settling, the mean output over 1024
// periods is compared with 5.12 V.
// Checks: the DDPWM configuration stays free of limit cycles with an error
// below 40 mV (one 8-bit bin) at every input voltage, while the coarse
// configuration shows an error above 150 mV somewhere in the sweep.
module vin_sweep_tb;
  localparam int WATCHDOG = 8_000_000;
  import ddpwm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [15:0] bus_addr = '0;
  logic bus_write = 0, bus_read = 0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic bus_rdvalid;
  logic adc_start, adc_ch, adc_done;
  logic [11:0] adc_data, vo_code, vin_code;
  logic c_hs, c_ls;
  real vo, vin_v = 10.0, i_load = 0.0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ddpwm_controller_top dut (
    .clk, .rst_n, .bus_addr, .bus_write, .bus_wdata, .bus_read, .bus_rdata, .bus_rdvalid,
    .adc_start, .adc_ch, .adc_done, .adc_data, .c_hs, .c_ls);

  buck_model #(.SUB(4)) u_buck (
    .clk, .c_hs, .c_ls, .vin(vin_v), .i_load, .vo, .vo_code, .vin_code);

  adc_model #(.LATENCY(6)) u_adc (
    .clk, .start(adc_start), .ch(adc_ch), .ain0(vo_code), .ain1(vin_code),
    .done(adc_done), .data(adc_data));

  localparam int P = 32;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    bus_addr = 16'(a); bus_wdata = d; bus_write = 1;
    @(negedge clk);
    bus_write = 0;
  endtask

  // Observe `periods` periods: bins of the output samples at N_ADC bits,
  // p-p of the per-period mean output voltage, and its mean.
  task automatic observe(input int periods, input int nadc,
                         output int nbins, output real pp, output real mean);
    int lo, hi, b;
    real s, mn, mx, tot;
    lo = 1 << 12; hi = -1; mn = 1.0e9; mx = -1.0e9; tot = 0.0;
    for (int j = 0; j < periods; j++) begin
      s = 0.0;
      for (int c = 0; c < P; c++) begin
        @(negedge clk);
        s += vo;
        if (adc_done && !adc_ch) begin
          b = int'(adc_data) >> (12 - nadc);
          if (b < lo) lo = b;
          if (b > hi) hi = b;
        end
      end
      s = s / P;
      tot += s;
      if (s < mn) mn = s;
      if (s > mx) mx = s;
    end
    nbins = hi - lo + 1;
    pp    = mx - mn;
    mean  = tot / periods;
  endtask

  int nb;
  real pp, mean, err, worst_coarse, worst_fine;
  initial begin
    worst_coarse = 0.0; worst_fine = 0.0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    $display("  V_IN   error N_ADC=4 plain (mV)   error N_ADC=8 DDPWM k=4 (mV)");
    for (int v = 92; v <= 108; v++) begin
      real e4, e8;
      vin_v = v / 10.0;
      // coarse: N_ADC = 4, plain 5-bit DPWM
      wr(REG_NADC, 32'd4);
      wr(REG_MBITS, 32'd0);
      wr(REG_CTRL, {28'd0, 1'b1, 1'b1, MODE_DIRECT});
      repeat (3000 * P) @(negedge clk);
      observe(1024, 4, nb, pp, mean);
      e4 = mean - 5.12;
      if ((e4 < 0 ? -e4 : e4) > worst_coarse) worst_coarse = e4 < 0 ? -e4 : e4;
      // fine: N_ADC = 8, 9-bit DDPWM
      wr(REG_NADC, 32'd8);
      wr(REG_MBITS, 32'd4);
      wr(REG_CTRL, {28'd0, 1'b1, 1'b1, MODE_DDPM});
      repeat (3000 * P) @(negedge clk);
      observe(1024, 8, nb, pp, mean);
      e8 = mean - 5.12;
      if ((e8 < 0 ? -e8 : e8) > worst_fine) worst_fine = e8 < 0 ? -e8 : e8;
      $display("  %.1f   %8.1f                 %8.1f", vin_v, e4 * 1e3, e8 * 1e3);
      check(nb == 1, $sformatf("V_IN %.1f: DDPWM loop free of limit cycles", vin_v));
      check((e8 < 0 ? -e8 : e8) < 0.040, $sformatf("V_IN %.1f: DDPWM error %.1f mV", vin_v, e8 * 1e3));
    end
    $display("worst error: plain N_ADC=4 %.1f mV, DDPWM N_ADC=8 %.1f mV", worst_coarse * 1e3, worst_fine * 1e3);
    check(worst_coarse > 0.150, "coarse configuration shows a large static error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
